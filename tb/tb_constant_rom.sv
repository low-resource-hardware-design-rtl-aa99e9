// tb_constant_rom: reads all 100 entries and checks the stored curve
// constants by their properties rather than by copying them: p equals
// 2^192 - 2^64 - 1, the base point (Gx, Gy) lies on y^2 = x^3 - 3x + b
// mod p, n is odd and in (p - 2^97, p), and the unused entries are zero.
// Also checks the one-cycle read latency.
module tb_constant_rom;
  import ecp_pkg::*;
  localparam int AW = $clog2(ROM_WORDS);
  logic clk = 0, en;
  logic [AW-1:0] addr;
  word_t rdata;
  int checks = 0, failures = 0;
  word_t v [ROM_WORDS];

  constant_rom dut (.*);
  always #5 clk = ~clk;

  function automatic logic [191:0] get(int off);
    logic [191:0] r;
    for (int i = 0; i < 12; i++) r[16*i +: 16] = v[off + i];
    return r;
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [191:0] p, n, b, gx, gy;
    logic [383:0] P, lhs, rhs;
    en = 0; addr = 0;
    for (int i = 0; i < ROM_WORDS; i++) begin
      @(negedge clk); en = 1; addr = AW'(i);
      @(posedge clk); #1; v[i] = rdata;
      @(negedge clk); en = 0; addr = AW'(ROM_WORDS - 1 - i);
      @(posedge clk); #1;
      chk(rdata == v[i], "rdata held while not enabled");
    end
    p = get(ROM_P); n = get(ROM_N); b = get(ROM_B); gx = get(ROM_GX); gy = get(ROM_GY);
    P = 384'(p);
    chk(384'(p) == (384'(1) << 192) - (384'(1) << 64) - 1, "p192");
    lhs = (384'(gy) * 384'(gy)) % P;
    rhs = ((((384'(gx) * 384'(gx)) % P) * 384'(gx)) % P + 3 * P - 3 * 384'(gx) + 384'(b)) % P;
    chk(lhs == rhs, "base point on curve");
    chk(gx != 0 && gy != 0 && b != 0, "constants non-zero");
    chk(n[0] && n < p && n > p - (192'(1) << 97), "order n range");
    for (int i = ROM_USED; i < ROM_WORDS; i++) chk(v[i] == 0, "unused entry zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
