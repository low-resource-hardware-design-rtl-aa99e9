// branch_unit: next-program-counter logic (the ALU's branching unit).
//
// Selects PC+1, an absolute target (JMP, CALL, and the conditional branches
// on the C/Z/V/N status bits when their condition holds), the current PC
// (HALT, and the first cycle of RET while the return address is read from
// the stack), or the return address read from memory (second cycle of RET).
// Conditions use the status bits as registered by earlier instructions.
// The published design names the branching unit and the CALL/RET instructions;
// the condition set and the two-cycle RET are this design's choice.
// Timing: purely combinational.
module branch_unit
  import ecp_pkg::*;
(
  input  br_op_e          op,
  input  logic [PC_W-1:0] target,
  input  logic [PC_W-1:0] pc,
  input  flags_t          flags,
  input  logic            ret_phase,  // 1 in the second cycle of RET
  input  word_t           ret_addr,   // return address read from the stack
  output logic [PC_W-1:0] pc_next,
  output logic            taken       // a non-sequential PC was selected
);
  logic cond;

  always_comb begin
    unique case (op)
      BR_JMP, BR_CALL: cond = 1'b1;
      BR_Z:  cond =  flags.z;
      BR_NZ: cond = !flags.z;
      BR_C:  cond =  flags.c;
      BR_NC: cond = !flags.c;
      BR_N:  cond =  flags.n;
      BR_NN: cond = !flags.n;
      BR_V:  cond =  flags.v;
      BR_NV: cond = !flags.v;
      default: cond = 1'b0;
    endcase

    taken = 1'b0;
    if (op == BR_RET) begin
      pc_next = ret_phase ? ret_addr[PC_W-1:0] : pc;
      taken   = ret_phase;
    end else if (op == BR_HALT) begin
      pc_next = pc;
    end else if (cond) begin
      pc_next = target;
      taken   = 1'b1;
    end else begin
      pc_next = pc + PC_W'(1);
    end
  end
endmodule
