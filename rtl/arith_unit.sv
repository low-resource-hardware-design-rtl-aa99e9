// arith_unit: 16-bit adder/subtractor of the ALU's arithmetic unit.
//
// Computes a+b, a+b+cin, a-b or a-b-cin in one combinational step. Multi-word
// field additions and subtractions of 192-bit operands are built from twelve
// of these, chained through the carry flag (ADC/SBC). For subtraction the
// carry output is the borrow (1 when the unsigned result wrapped), so SBC
// subtracts the borrow of the previous word. v is the signed overflow.
// The published design names the arithmetic unit and the carry/overflow status
// bits; the operation set and the borrow convention are this design's choice.
// Interface: op selects ALU_ADD/ADC/SUB/SBC; other ops give y = 0.
// Timing: purely combinational.
module arith_unit
  import ecp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  logic    cin,
  output word_t   y,
  output logic    c,
  output logic    v
);
  logic [WORD:0] sum;
  logic          is_sub;

  always_comb begin
    is_sub = (op == ALU_SUB) || (op == ALU_SBC);
    unique case (op)
      ALU_ADD: sum = {1'b0, a} + {1'b0, b};
      ALU_ADC: sum = {1'b0, a} + {1'b0, b} + {{WORD{1'b0}}, cin};
      ALU_SUB: sum = {1'b0, a} - {1'b0, b};
      ALU_SBC: sum = {1'b0, a} - {1'b0, b} - {{WORD{1'b0}}, cin};
      default: sum = '0;
    endcase
    y = sum[WORD-1:0];
    c = sum[WORD];
    if (is_sub) v = (a[WORD-1] != b[WORD-1]) && (y[WORD-1] != a[WORD-1]);
    else        v = (a[WORD-1] == b[WORD-1]) && (y[WORD-1] != a[WORD-1]);
  end
endmodule
