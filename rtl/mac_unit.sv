// mac_unit: 16x16-bit multiply-accumulate unit with a 48-bit accumulator.
//
// The central unit for product-scanning field multiplication: each column
// sum A[i]*B[j] over i+j=k is accumulated into the 48-bit accumulator
// (three 16-bit registers), its low word is stored and the accumulator is
// shifted right by one word (RSACC) to carry into the next column. The
// published design gives the 16-bit multiplier, the three-word accumulator, the
// MULACC and RSACC operations, and operand isolation of the multiplier for
// low power; here the multiplier inputs are forced to zero whenever no
// multiplication is requested.
// acc_sum is the accumulator after the multiplication (what a store of ACC0
// in the same cycle writes); acc_next additionally applies clear/shift and
// is what the accumulator registers load.
// Timing: purely combinational; the accumulator registers live in the
// register file.
module mac_unit
  import ecp_pkg::*;
(
  input  mac_op_e          op,
  input  word_t            a,
  input  word_t            b,
  input  logic [ACC_W-1:0] acc_in,
  input  logic             clr,      // start from zero instead of acc_in
  input  logic             shr,      // shift the result right by one word
  output logic [ACC_W-1:0] acc_sum,
  output logic [ACC_W-1:0] acc_next
);
  word_t              a_iso, b_iso;
  logic [2*WORD-1:0]  prod;
  logic [ACC_W-1:0]   base;

  always_comb begin
    // operand isolation: the multiplier sees constant zeros when idle
    a_iso = (op != MAC_NONE) ? a : '0;
    b_iso = (op != MAC_NONE) ? b : '0;
    prod  = a_iso * b_iso;
    base  = (clr || op == MAC_LOAD) ? '0 : acc_in;
    acc_sum  = base + ACC_W'(prod);
    acc_next = shr ? (acc_sum >> WORD) : acc_sum;
  end
endmodule
