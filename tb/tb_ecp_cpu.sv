// tb_ecp_cpu: runs the CPU on a short program held in the testbench, with a
// single-port memory model that returns loads one cycle later.
// Part 1 is the optimised column of the published design's example code:
// A1*B11 + A2*B10 + A3*B9 in 7 vectors, with loads overlapping MOVNF and
// MULACC, ending in STR Acc0 || RSACC. Part 2 CALLs a routine that uses
// the ALU (immediate move, ADD with status bits, conditional branch) and
// RETurns; RET costs one stall cycle. Checks stored words, accumulator,
// work register, stack contents, and the cycle count to HALT.
module tb_ecp_cpu;
  import ecp_pkg::*;
  logic clk = 0, rst_n;
  ctrl_t ctrl;
  logic [PC_W-1:0] pc;
  logic mem_req, mem_we, halted, ret_stall, br_taken;
  word_t mem_addr, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  word_t mem [256];

  ecp_cpu dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (mem_req) begin
      if (mem_we) mem[mem_addr[7:0]] <= mem_wdata;
      else        mem_rdata <= mem[mem_addr[7:0]];
    end

  function automatic ctrl_t prog(int a);
    ctrl_t x = CTRL_NOP;
    case (a)
      0: begin x.mem_op = MEM_LD; x.addr_off = 8'd10; end                         // LD A1
      1: begin x.movnf = 1; x.mem_op = MEM_LD; x.addr_off = 8'd22; end            // MOVNF || LD B11
      2: begin x.mac_op = MAC_ACC; x.acc_clr = 1; x.mem_op = MEM_LD; x.addr_off = 8'd11; end // MULACC || LD A2
      3: begin x.movnf = 1; x.mem_op = MEM_LD; x.addr_off = 8'd21; end            // MOVNF || LD B10
      4: begin x.mac_op = MAC_ACC; x.mem_op = MEM_LD; x.addr_off = 8'd12; end     // MULACC || LD A3
      5: begin x.movnf = 1; x.mem_op = MEM_LD; x.addr_off = 8'd20; end            // MOVNF || LD B9
      6: begin x.mac_op = MAC_ACC; x.mem_op = MEM_ST; x.addr_off = 8'd30;         // MULACC || STR Acc0 || RSACC
               x.st_src = ST_ACC0; x.acc_shr = 1; end
      7: begin x.br_op = BR_CALL; x.br_target = 11'd20; end
      8: begin x.mem_op = MEM_ST; x.addr_off = 8'd31; x.st_src = ST_ACC0; end     // store shifted acc
      9: begin x.mem_op = MEM_ST; x.addr_off = 8'd32; x.st_src = ST_W3; end
      10: x.br_op = BR_HALT;
      20: begin x.alu_op = ALU_PASSB; x.alu_b = AB_IMM; x.imm = 16'hFFFF;
                x.rd_we = 1; x.rd_sel = RD_W3; end
      21: begin x.alu_op = ALU_ADD; x.alu_a = AA_W3; x.alu_b = AB_IMM; x.imm = 16'd2;
                x.rd_we = 1; x.rd_sel = RD_W3; x.flags_we = 1; end              // carry out
      22: begin x.br_op = BR_NC; x.br_target = 11'd25; end                       // not taken
      23: begin x.br_op = BR_C; x.br_target = 11'd25; end                        // taken
      24: begin x.alu_op = ALU_PASSB; x.alu_b = AB_IMM; x.imm = 16'hDEAD;        // skipped
                x.rd_we = 1; x.rd_sel = RD_W3; end
      25: x.br_op = BR_RET;
      default: x.br_op = BR_HALT;
    endcase
    return x;
  endfunction

  assign ctrl = prog(int'(pc));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [47:0] sum;
    automatic int cyc = 0, stalls = 0, taken = 0;
    word_t a1, a2, a3, b9, b10, b11;
    for (int i = 0; i < 256; i++) mem[i] = 0;
    for (int t = 0; t < 20; t++) begin
      a1 = word_t'($urandom); a2 = word_t'($urandom); a3 = word_t'($urandom);
      b9 = word_t'($urandom); b10 = word_t'($urandom); b11 = word_t'($urandom);
      if (t == 0) {a1, a2, a3, b9, b10, b11} = '1;
      mem[10] = a1; mem[11] = a2; mem[12] = a3; mem[20] = b9; mem[21] = b10; mem[22] = b11;
      mem_rdata = 0;
      rst_n = 0; @(posedge clk); #1; rst_n = 1;
      cyc = 0; stalls = 0; taken = 0;
      while (!halted && cyc < 100) begin
        @(posedge clk); #1; cyc++;
        stalls += ret_stall;
      end
      sum = 48'(a1) * 48'(b11) + 48'(a2) * 48'(b10) + 48'(a3) * 48'(b9);
      chk(mem[30] == sum[15:0], "STR Acc0 stores low word");
      chk(mem[31] == sum[31:16], "RSACC shifted the accumulator");
      chk(dut.acc == sum >> 16, "accumulator after shift");
      chk(mem[32] == 16'h0001, "routine result W3 = 0xFFFF + 2, branch skipped 24");
      chk(dut.flags.c, "carry flag from ADD");
      chk(mem[RAM_WORDS - 1] == 16'd8, "return address pushed");
      chk(dut.sp == word_t'(RAM_WORDS - 1), "stack pointer restored");
      chk(stalls == 1, "RET stalls one cycle");
      // 7 (column) + 1 (CALL) + 5 (20..23, 25) + 1 (RET stall) + 2 (8, 9) = 16
      chk(cyc == 16, $sformatf("cycles to HALT = 16 (got %0d)", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
