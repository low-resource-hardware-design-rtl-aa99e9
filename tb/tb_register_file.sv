// tb_register_file: random writes through all ports against a reference
// model, including the ALU-port-over-MOVNF and ALU-port-over-accumulator
// priorities and the reset values.
module tb_register_file;
  import ecp_pkg::*;
  logic clk = 0, rst_n;
  logic pc_we, sp_we, acc_we, flags_we, rd_we, mv_we;
  logic [PC_W-1:0] pc_d, pc;
  word_t sp_d, rd_d, mv_d, sp;
  logic [ACC_W-1:0] acc_d, acc;
  flags_t flags_d, flags;
  rd_sel_e rd_sel;
  logic [1:0] mv_sel;
  word_t base [3];
  word_t work [4];
  int checks = 0, failures = 0;

  register_file dut (.*);
  always #5 clk = ~clk;

  logic [PC_W-1:0] m_pc; word_t m_sp; logic [ACC_W-1:0] m_acc; flags_t m_fl;
  word_t m_b [3]; word_t m_w [4];

  task automatic compare(string what);
    checks++;
    if (pc !== m_pc || sp !== m_sp || acc !== m_acc || flags !== m_fl ||
        base != m_b || work != m_w) begin
      failures++;
      $display("FAIL %s: pc=%0d/%0d sp=%h/%h acc=%h/%h", what, pc, m_pc, sp, m_sp, acc, m_acc);
    end
  endtask

  initial begin
    {pc_we, sp_we, acc_we, flags_we, rd_we, mv_we} = '0;
    pc_d = '0; sp_d = '0; rd_d = '0; mv_d = '0; acc_d = '0; flags_d = '0;
    rd_sel = RD_W0; mv_sel = '0;
    rst_n = 0; @(posedge clk); #1;
    m_pc = 0; m_sp = word_t'(RAM_WORDS - 1); m_acc = 0; m_fl = 0;
    m_b = '{default: 0}; m_w = '{default: 0};
    compare("reset");
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {pc_we, sp_we, acc_we, flags_we, rd_we, mv_we} = 6'($urandom);
      pc_d = PC_W'($urandom); sp_d = word_t'($urandom); rd_d = word_t'($urandom);
      mv_d = word_t'($urandom); acc_d = 48'({$urandom, $urandom}); flags_d = 4'($urandom);
      rd_sel = rd_sel_e'($urandom_range(10)); mv_sel = 2'($urandom);
      if (pc_we) m_pc = pc_d;
      if (flags_we) m_fl = flags_d;
      if (sp_we) m_sp = sp_d;
      if (acc_we) m_acc = acc_d;
      if (mv_we) m_w[mv_sel] = mv_d;
      if (rd_we) begin
        if (rd_sel <= RD_W3) m_w[rd_sel] = rd_d;
        else if (rd_sel <= RD_B2) m_b[rd_sel - RD_B0] = rd_d;
        else if (rd_sel == RD_SP) m_sp = rd_d;
        else m_acc[16*(rd_sel - RD_ACC0) +: 16] = rd_d;
      end
      @(posedge clk); #1;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
