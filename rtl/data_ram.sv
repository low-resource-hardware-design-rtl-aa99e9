// data_ram: single-port data RAM, 111 words of 16 bits.
//
// Stands for the single-port RAM macro the published design chooses over a larger
// dual-port memory; written here as a synchronous memory array. One access
// per cycle: with en and we the word is written, with en alone it is read
// and appears on rdata in the next cycle; rdata holds its value otherwise.
// Size from the published design; read-during-write returns nothing new (rdata
// holds), which is this design's choice. Contents are not reset.
module data_ram
  import ecp_pkg::*;
#(
  parameter int unsigned WORDS = RAM_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output word_t         rdata
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && addr < AW'(WORDS)) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
