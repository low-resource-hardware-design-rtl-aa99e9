// logic_unit: bitwise logic, one-bit shifts and moves of the ALU.
//
// AND, OR, XOR, NOT (of b), shift left and right by one bit (the bit shifted
// out goes to c), and pass-through of either operand (used to move a loaded
// word or a register into a register or into memory). The published design names a
// logic unit in the ALU; the operation set is modelled on the general-purpose
// instructions of small 16-bit instruction sets and is this design's choice.
// Interface: op selects the operation; c is only meaningful for the shifts.
// Timing: purely combinational.
module logic_unit
  import ecp_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    c
);
  always_comb begin
    c = 1'b0;
    unique case (op)
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~b;
      ALU_SHL:   begin y = {a[WORD-2:0], 1'b0}; c = a[WORD-1]; end
      ALU_SHR:   begin y = {1'b0, a[WORD-1:1]}; c = a[0]; end
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
