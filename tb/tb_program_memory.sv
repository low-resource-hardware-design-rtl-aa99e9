// tb_program_memory: reads the whole table and checks the structure of the
// bundled program from its control vectors: the main program begins by
// loading the I/O base address, CALLs four routines (multiply, add,
// subtract, Montgomery multiply) and ends in HALT; each routine ends in
// RET; the table holds exactly 432 MULACCs on a loaded word and W0 (144
// word products in the multiplication, 288 in the Montgomery routine),
// 34 column stores with RSACC (23 and 11), 12 multiplications by the
// immediate -n^-1, 23 ADC and 44 SBC vectors; every entry
// outside main and the routines, and any PC past the table, is HALT.
// Every vector of the program is also checked on its own: CALL and RET make
// no memory access and do not write SP; a vector that uses the loaded word
// (MOVNF, MULACC on the loaded word, ALU operand B) directly follows a load;
// absolute RAM accesses stay below the stack word; B1-based accesses are ROM
// loads inside the stored constants; B0-based accesses stay in the I/O block
// and store only to the outputs; branch targets lie inside the program.
module tb_program_memory;
  import ecp_pkg::*;
  logic [PC_W-1:0] pc;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  program_memory dut (.pc, .ctrl);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ctrl_t prog [PM_DEPTH];

  // One vector of the program against the rules above; prev_ld tells
  // whether the vector before it issued a load.
  function automatic bit well_formed(ctrl_t c, bit prev_ld, int last);
    bit ok = 1'b1;
    bit uses_rdata = c.movnf || (c.mac_op != MAC_NONE && c.mac_b == MB_RDATA) ||
                     (c.alu_op != ALU_NOP && c.alu_b == AB_RDATA);
    if (c.br_op == BR_CALL || c.br_op == BR_RET)
      ok &= (c.mem_op == MEM_NONE) && !(c.rd_we && c.rd_sel == RD_SP);
    if (uses_rdata) ok &= prev_ld;
    if (c.mem_op != MEM_NONE) begin
      unique case (c.addr_base)
        AB_ABS:  ok &= int'(c.addr_off) < RAM_WORDS - 1;
        AB_B1:   ok &= (c.mem_op == MEM_LD) && int'(c.addr_off) < ROM_USED;
        AB_B0:   ok &= int'(c.addr_off) < IO_N_IN + IO_N_OUT &&
                       (c.mem_op == MEM_LD || int'(c.addr_off) >= IO_N_IN);
        default: ok = 1'b0;
      endcase
    end
    if (c.br_op inside {[BR_JMP:BR_CALL]}) ok &= int'(c.br_target) <= last;
    return ok;
  endfunction

  initial begin
    automatic int n_mac0 = 0, n_col = 0, n_adc = 0, n_mimm = 0, n_sbc = 0, first_halt = -1, last = 0;
    int tgt [$];
    bit in_code [PM_DEPTH];
    for (int i = 0; i < PM_DEPTH; i++) begin
      pc = PC_W'(i); #1;
      prog[i] = ctrl;
      in_code[i] = 1'b0;
      if (ctrl.mac_op == MAC_ACC && ctrl.mac_a == 0 && ctrl.mac_b == MB_RDATA) n_mac0++;
      if (ctrl.mac_op == MAC_ACC && ctrl.mac_a == 0 && ctrl.acc_shr &&
          ctrl.mem_op == MEM_ST && ctrl.st_src == ST_ACC0) n_col++;
      if (ctrl.alu_op == ALU_ADC) n_adc++;
      if (ctrl.mac_op == MAC_LOAD && ctrl.mac_b == MB_IMM &&
          ctrl.imm * P192_N[15:0] == 16'hFFFF) n_mimm++;
      if (ctrl.alu_op == ALU_SBC) n_sbc++;
      if (ctrl.br_op == BR_CALL) tgt.push_back(int'(ctrl.br_target));
      if (ctrl.br_op == BR_HALT && first_halt < 0) first_halt = i;
      if (i == 0) chk(ctrl.rd_we && ctrl.rd_sel == RD_B0 && ctrl.alu_b == AB_IMM &&
                      ctrl.imm == IO_BASE, "entry 0 loads I/O base into B0");
    end
    chk(n_mac0 == 432, $sformatf("432 product MULACCs (got %0d)", n_mac0));
    chk(n_col == 34, $sformatf("34 column stores (got %0d)", n_col));
    chk(n_mimm == 12, $sformatf("12 multiplications by -n^-1 (got %0d)", n_mimm));
    // FADD: 11 in the sum, 1 saving the carry; FSUB: 11 adding p back
    chk(n_adc == 23, $sformatf("23 ADC vectors (got %0d)", n_adc));
    // one 11-word SBC chain each in FMUL, FADD, FSUB and MMUL
    chk(n_sbc == 44, $sformatf("44 SBC vectors (got %0d)", n_sbc));
    chk(tgt.size() == 4, $sformatf("main has four CALLs (got %0d)", tgt.size()));
    for (int i = 0; i <= first_halt; i++) in_code[i] = 1'b1;
    foreach (tgt[k]) begin
      automatic int e = tgt[k];
      chk(e > first_halt && first_halt > 0, $sformatf("routine %0d starts after main", k));
      while (e < PM_DEPTH - 1 && prog[e].br_op != BR_RET) e++;
      chk(prog[e].br_op == BR_RET, $sformatf("routine %0d ends in RET", k));
      for (int i = tgt[k]; i <= e; i++) in_code[i] = 1'b1;
      if (e > last) last = e;
    end
    for (int i = 0; i < PM_DEPTH; i++) begin
      if (!in_code[i])
        chk(prog[i].br_op == BR_HALT, $sformatf("unused entry %0d is HALT", i));
      else
        chk(well_formed(prog[i], i > 0 && prog[i-1].mem_op == MEM_LD, last),
            $sformatf("entry %0d is well formed", i));
    end
    pc = '1; #1;
    chk(ctrl.br_op == BR_HALT, "PC past the table reads HALT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
