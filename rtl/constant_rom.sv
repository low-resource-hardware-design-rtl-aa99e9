// constant_rom: look-up table of 100 16-bit constants in data memory.
//
// The published design keeps the curve constants in a synthesized look-up table of
// 100 words that is read through the data-memory port. Its exact contents
// are part of the firmware and not published; this table holds the NIST
// P-192 domain parameters p, n, b and the base point (Gx, Gy), 12 words
// each, least significant word first (offsets ROM_P, ROM_N, ROM_B, ROM_GX,
// ROM_GY in ecp_pkg). The remaining 40 entries, which the firmware would use
// for further fixed values, read as zero.
// Timing: synchronous read like the RAM, data on rdata one cycle after en.
module constant_rom
  import ecp_pkg::*;
#(
  parameter int unsigned WORDS = ROM_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output word_t         rdata
);
  function automatic word_t rom_word(int unsigned i);
    logic [191:0] v;
    int unsigned  k;
    if      (i < ROM_N)    begin v = P192_P;  k = i - ROM_P;  end
    else if (i < ROM_B)    begin v = P192_N;  k = i - ROM_N;  end
    else if (i < ROM_GX)   begin v = P192_B;  k = i - ROM_B;  end
    else if (i < ROM_GY)   begin v = P192_GX; k = i - ROM_GX; end
    else if (i < ROM_USED) begin v = P192_GY; k = i - ROM_GY; end
    else                   begin v = '0;      k = 0;          end
    return v[k*WORD +: WORD];
  endfunction

  always_ff @(posedge clk) begin
    if (en) rdata <= (int'(addr) < WORDS) ? rom_word(int'(addr)) : '0;
  end
endmodule
