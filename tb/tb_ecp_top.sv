// tb_ecp_top: end-to-end test of the processor at its default size.
//
// Runs the bundled program several times: each run resets the processor,
// writes two random 192-bit operands A and B (plus the edge cases 0,
// p-1 and 2^192-1) through the host port, writes the start word (1 multiply,
// 2 add, 3 subtract, 4 Montgomery multiply modulo the group order n) and
// waits for the done word. The result in io_out[0..11] is compared with
// (A*B), (A+B) or (A-B) mod p192 computed here with wide integer
// arithmetic; a Montgomery result E is checked by its definition, E < n and
// E*2^192 = A*B (mod n). Addition, subtraction and Montgomery runs use
// operands below their modulus, as the routines expect. It also counts
// the mechanisms the design relies on and fails if one never happened:
// MOVNF, MULACC on a freshly loaded word in parallel with a new load,
// STR Acc0 together with RSACC, CALL, the RET stall cycle, a taken
// conditional branch, a constant-ROM read, an I/O write, both outcomes
// of the multiplication's final conditional subtraction, an ADC, a MUL by
// an immediate, and each way the addition and subtraction can end. How the
// Montgomery runs ended is printed but not required, since it depends on
// the random operands. Cycles per run are printed.
module tb_ecp_top;
  import ecp_pkg::*;

  localparam logic [191:0] P = 192'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFFFF_FFFFFFFF;
  localparam logic [191:0] N = 192'hFFFFFFFF_FFFFFFFF_FFFFFFFF_99DEF836_146BC9B1_B4D22831;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       host_we;
  logic [5:0] host_addr;
  word_t      host_wdata;
  word_t      io_out [IO_N_OUT];
  logic       halted;

  int checks = 0, failures = 0;
  int n_movnf = 0, n_macld = 0, n_strsh = 0, n_call = 0, n_retstall = 0;
  int n_cbr = 0, n_rom = 0, n_iowr = 0, n_keep_d = 0, n_keep_r = 0, n_adc = 0;
  int n_add_wrap = 0, n_add_ge = 0, n_add_lt = 0, n_sub_neg = 0, n_sub_pos = 0;
  int n_mont = 0, n_mul_imm = 0, n_mont_d = 0, n_mont_r = 0;
  int unsigned cycles;

  ecp_top dut (.clk, .rst_n, .host_we, .host_addr, .host_wdata, .io_out, .halted);

  always #5 clk = ~clk;

  // mechanism counters (observed inside the CPU)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cpu.c.movnf) n_movnf++;
    if (dut.u_cpu.c.mac_op == MAC_ACC && dut.u_cpu.c.mem_op == MEM_LD) n_macld++;
    if (dut.u_cpu.c.mem_op == MEM_ST && dut.u_cpu.c.st_src == ST_ACC0 &&
        dut.u_cpu.c.mac_op == MAC_ACC && dut.u_cpu.c.acc_shr) n_strsh++;
    if (dut.u_cpu.c.br_op == BR_CALL) n_call++;
    if (dut.u_cpu.ret_stall) n_retstall++;
    if (dut.u_cpu.br_taken && dut.u_cpu.c.br_op inside {[BR_Z:BR_NV]}) n_cbr++;
    if (dut.u_dm.rom_en) n_rom++;
    if (dut.u_dm.io_en && dut.mem_we) n_iowr++;
    if (dut.u_cpu.c.alu_op == ALU_ADC) n_adc++;
    if (dut.u_cpu.c.mac_op == MAC_LOAD && dut.u_cpu.c.mac_b == MB_IMM) n_mul_imm++;
  end

  task automatic host_write(int a, word_t d);
    @(negedge clk);
    host_we = 1'b1; host_addr = 6'(a); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  function automatic logic [191:0] rnd192();
    logic [191:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic run(logic [191:0] a, logic [191:0] b, int op = 1);
    logic [383:0] prod;
    logic [191:0] expv, got;
    logic [191:0] r_unsub;
    rst_n = 1'b0; host_we = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 12; i++) host_write(FW_IO_A + i, a[16*i +: 16]);
    for (int i = 0; i < 12; i++) host_write(FW_IO_B + i, b[16*i +: 16]);
    repeat (5) @(negedge clk);
    checks++;
    if (io_out[FW_OUT_DONE] != 0 || halted) begin
      failures++; $display("FAIL: ran before start");
    end
    host_write(FW_IO_START, 16'(op));
    cycles = 0;
    while (io_out[FW_OUT_DONE] != 16'd1 && cycles < 5000) begin
      @(posedge clk); cycles++;
    end
    @(posedge clk);
    if (op == 2)      prod = 384'(a) + 384'(b);
    else if (op == 3) prod = 384'(a) + 384'(P) - 384'(b);
    else              prod = 384'(a) * 384'(b);
    expv = 192'(prod % 384'(P));
    for (int i = 0; i < 12; i++) got[16*i +: 16] = io_out[FW_OUT_R + i];
    if (op == 4) begin
      // the Montgomery product is defined by E < n and E*2^192 = A*B mod n
      prod = 384'(a) * 384'(b);
      if (got < N && ((384'(got) << 192) % 384'(N)) == prod % 384'(N)) expv = got;
      else expv = ~got;
      n_mont++;
    end
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL: A=%h B=%h got %h exp %h", a, b, got, expv);
    end
    checks++;
    if (!halted) begin failures++; $display("FAIL: not halted after done"); end
    // which branch of the final subtraction was taken: compare R before it
    for (int i = 0; i < 12; i++) r_unsub[16*i +: 16] = dut.u_dm.u_ram.mem[60 + i];
    if (op == 2) begin
      if (193'(a) + 193'(b) >= 193'(1) << 192) n_add_wrap++;
      else if (a + b >= P)                      n_add_ge++;
      else                                      n_add_lt++;
    end else if (op == 3) begin
      if (a < b) n_sub_neg++; else n_sub_pos++;
    end else if (op == 4) begin
      if (r_unsub == got) n_mont_d++; else n_mont_r++;
    end else if (r_unsub == expv) n_keep_d++;
    else n_keep_r++;
    $display("run op %0d: %0d cycles from start to done", op, cycles);
  endtask

  initial begin
    logic [191:0] a, b;
    host_we = 1'b0; host_addr = '0; host_wdata = '0; rst_n = 1'b0;
    run(192'd0, rnd192());
    run(P - 1, P - 1);
    run('1, '1);
    run(P - 1, 192'd1);
    run(192'd1, P + 192'd5);   // input above p: result must still be reduced
    for (int t = 0; t < 6; t++) begin
      a = rnd192(); b = rnd192();
      run(a, b);
    end
    // addition: sum wraps past 2^192, lands in [p, 2^192), stays below p
    run(P - 1, P - 1, 2);
    run(P - 192'd3, 192'd5, 2);
    run(192'd7, 192'd9, 2);
    run(P - 1, 192'd0, 2);
    // subtraction: with and without a borrow, and equal operands
    run(192'd5, P - 1, 3);
    run(P - 1, 192'd5, 3);
    run(192'd42, 192'd42, 3);
    run(192'd0, 192'd1, 3);
    for (int t = 0; t < 4; t++) begin
      a = rnd192() % P; b = rnd192() % P;
      run(a, b, 2);
      run(a, b, 3);
    end
    // Montgomery multiplication modulo n
    run(N - 1, N - 1, 4);
    run(192'd0, N - 1, 4);
    run(192'd1, 192'd1, 4);
    for (int t = 0; t < 5; t++) begin
      a = rnd192() % N; b = rnd192() % N;
      run(a, b, 4);
    end
    checks++;
    if (n_movnf == 0 || n_macld == 0 || n_strsh == 0 || n_call == 0 || n_retstall == 0 ||
        n_cbr == 0 || n_rom == 0 || n_iowr == 0 || n_keep_d == 0 || n_keep_r == 0 ||
        n_adc == 0 || n_add_wrap == 0 || n_add_ge == 0 || n_add_lt == 0 ||
        n_sub_neg == 0 || n_sub_pos == 0 || n_mont == 0 || n_mul_imm == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("mechanisms: movnf=%0d mulacc||ld=%0d str+rsacc=%0d call=%0d ret_stall=%0d cond_branch_taken=%0d rom_reads=%0d io_writes=%0d sub_kept=%0d sub_skipped=%0d",
             n_movnf, n_macld, n_strsh, n_call, n_retstall, n_cbr, n_rom, n_iowr, n_keep_d, n_keep_r);
    $display("montgomery runs=%0d mul_by_immediate=%0d sub_kept=%0d sub_skipped=%0d",
             n_mont, n_mul_imm, n_mont_d, n_mont_r);
    $display("add/sub: adc=%0d add_wrapped=%0d add_ge_p=%0d add_lt_p=%0d sub_borrow=%0d sub_no_borrow=%0d",
             n_adc, n_add_wrap, n_add_ge, n_add_lt, n_sub_neg, n_sub_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
