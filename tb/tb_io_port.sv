// tb_io_port: random host writes and CPU reads/writes against a model of
// the mailbox: inputs written only by the host, outputs only by the CPU,
// registered CPU reads, zero for unmapped offsets.
module tb_io_port;
  import ecp_pkg::*;
  logic clk = 0, rst_n, en, we, host_we;
  logic [5:0] addr, host_addr;
  word_t wdata, rdata, host_wdata;
  word_t out_regs [IO_N_OUT];
  int checks = 0, failures = 0;
  word_t m_in [IO_N_IN];
  word_t m_out [IO_N_OUT];

  io_port dut (.*);
  always #5 clk = ~clk;

  initial begin
    word_t exp_r;
    en = 0; we = 0; addr = 0; wdata = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    m_in = '{default: 0}; m_out = '{default: 0}; exp_r = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en = 1'($urandom); we = 1'($urandom); addr = 6'($urandom);
      wdata = word_t'($urandom);
      host_we = 1'($urandom); host_addr = 6'($urandom); host_wdata = word_t'($urandom);
      if (en && !we) begin
        if (addr < IO_N_IN) exp_r = m_in[addr];
        else if (addr < IO_N_IN + IO_N_OUT) exp_r = m_out[addr - IO_N_IN];
        else exp_r = 0;
      end
      if (host_we && host_addr < IO_N_IN) m_in[host_addr] = host_wdata;
      if (en && we && addr >= IO_N_IN && addr < IO_N_IN + IO_N_OUT) m_out[addr - IO_N_IN] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_r || out_regs != m_out) begin
        failures++; $display("FAIL rdata=%h exp %h", rdata, exp_r);
      end
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
