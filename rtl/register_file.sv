// register_file: the CPU's registers.
//
// Holds the program counter, the stack pointer, the 48-bit accumulator of
// the multiply-accumulate unit (three 16-bit words ACC2:ACC1:ACC0), three
// base registers B0..B2 that address data memory, four general work
// registers W0..W3 and the status bits C, Z, V, N. This register set is the
// published design's; the write ports and their priorities are this design's.
// Write ports (all take effect at the rising clock edge):
//   pc_we/pc_d, sp_we/sp_d, acc_we/acc_d, flags_we/flags_d;
//   rd_we/rd_sel/rd_d  - ALU result to any W, B, SP or ACC word;
//   mv_we/mv_sel/mv_d  - MOVNF path, freshly loaded word to a W register.
// When both write the same register, the ALU result port wins over the MOVNF
// port and over acc_we/sp_we. Each register only loads when written, which
// is the enable a clock-gating cell would use in an ASIC flow.
// Reset (active low, synchronous): PC = 0, SP = SP_RESET, others 0.
module register_file
  import ecp_pkg::*;
#(
  parameter word_t SP_RESET = word_t'(RAM_WORDS - 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pc_we,
  input  logic [PC_W-1:0]  pc_d,
  input  logic             sp_we,
  input  word_t            sp_d,
  input  logic             acc_we,
  input  logic [ACC_W-1:0] acc_d,
  input  logic             flags_we,
  input  flags_t           flags_d,
  input  logic             rd_we,
  input  rd_sel_e          rd_sel,
  input  word_t            rd_d,
  input  logic             mv_we,
  input  logic [1:0]       mv_sel,
  input  word_t            mv_d,
  output logic [PC_W-1:0]  pc,
  output word_t            sp,
  output logic [ACC_W-1:0] acc,
  output word_t            base [3],
  output word_t            work [4],
  output flags_t           flags
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc    <= '0;
      sp    <= SP_RESET;
      acc   <= '0;
      base  <= '{default: '0};
      work  <= '{default: '0};
      flags <= '0;
    end else begin
      if (pc_we)    pc    <= pc_d;
      if (flags_we) flags <= flags_d;
      if (sp_we)    sp    <= sp_d;
      if (acc_we)   acc   <= acc_d;
      if (mv_we)    work[mv_sel] <= mv_d;
      if (rd_we) begin
        unique case (rd_sel)
          RD_W0:   work[0] <= rd_d;
          RD_W1:   work[1] <= rd_d;
          RD_W2:   work[2] <= rd_d;
          RD_W3:   work[3] <= rd_d;
          RD_B0:   base[0] <= rd_d;
          RD_B1:   base[1] <= rd_d;
          RD_B2:   base[2] <= rd_d;
          RD_SP:   sp      <= rd_d;
          RD_ACC0: acc[WORD-1:0]        <= rd_d;
          RD_ACC1: acc[2*WORD-1:WORD]   <= rd_d;
          RD_ACC2: acc[3*WORD-1:2*WORD] <= rd_d;
          default: ;
        endcase
      end
    end
  end
endmodule
