// tb_data_ram: random single-port accesses against a reference array;
// checks one-cycle read latency, that a write does not disturb rdata and
// that out-of-range addresses are ignored.
module tb_data_ram;
  import ecp_pkg::*;
  localparam int AW = $clog2(RAM_WORDS);
  logic clk = 0, en, we;
  logic [AW-1:0] addr;
  word_t wdata, rdata;
  int checks = 0, failures = 0;
  word_t model [RAM_WORDS];

  data_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    word_t exp_r;
    en = 0; we = 0; addr = 0; wdata = 0;
    // fill every word first
    for (int i = 0; i < RAM_WORDS; i++) begin
      @(negedge clk); en = 1; we = 1; addr = AW'(i); wdata = word_t'($urandom); model[i] = wdata;
    end
    @(negedge clk); en = 1; we = 0; addr = 0; exp_r = model[0];
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_r) begin failures++; $display("FAIL rdata=%h exp %h", rdata, exp_r); end
      @(negedge clk);
      en = 1'($urandom); we = 1'($urandom);
      addr = AW'($urandom_range(RAM_WORDS + 8));
      wdata = word_t'($urandom);
      if (en && int'(addr) < RAM_WORDS) begin
        if (we) model[addr] = wdata;
        else    exp_r = model[addr];
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
