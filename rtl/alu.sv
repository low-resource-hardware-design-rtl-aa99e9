// alu: the processor's ALU, combining its four units.
//
// Arithmetic unit (add/subtract with carry), logic unit (bitwise, shifts,
// moves), multiply-accumulate unit and branching unit all work in the same
// cycle on operands selected by the CPU, so one control vector can, for
// example, multiply-accumulate a freshly loaded word while the branching
// unit advances the PC. This grouping follows the published design's block diagram.
// Status bits: arithmetic operations set C (carry, or borrow for
// subtraction), V, Z and N; shifts set C to the bit shifted out, Z and N;
// the other logic operations set Z and N and keep C and V; ALU_NOP keeps
// all four. Whether the CPU loads them is decided by the control vector.
// Timing: purely combinational.
module alu
  import ecp_pkg::*;
(
  // arithmetic / logic
  input  alu_op_e          alu_op,
  input  word_t            a,
  input  word_t            b,
  input  flags_t           flags_in,
  output word_t            y,
  output flags_t           flags_out,
  // multiply-accumulate
  input  mac_op_e          mac_op,
  input  word_t            mac_a,
  input  word_t            mac_b,
  input  logic [ACC_W-1:0] acc_in,
  input  logic             acc_clr,
  input  logic             acc_shr,
  output logic [ACC_W-1:0] acc_sum,
  output logic [ACC_W-1:0] acc_next,
  // branching
  input  br_op_e           br_op,
  input  logic [PC_W-1:0]  br_target,
  input  logic [PC_W-1:0]  pc,
  input  logic             ret_phase,
  input  word_t            ret_addr,
  output logic [PC_W-1:0]  pc_next,
  output logic             br_taken
);
  word_t ar_y, lu_y;
  logic  ar_c, ar_v, lu_c;
  logic  is_arith, is_shift;

  arith_unit u_arith (.op(alu_op), .a(a), .b(b), .cin(flags_in.c),
                      .y(ar_y), .c(ar_c), .v(ar_v));
  logic_unit u_logic (.op(alu_op), .a(a), .b(b), .y(lu_y), .c(lu_c));
  mac_unit   u_mac   (.op(mac_op), .a(mac_a), .b(mac_b), .acc_in(acc_in),
                      .clr(acc_clr), .shr(acc_shr),
                      .acc_sum(acc_sum), .acc_next(acc_next));
  branch_unit u_br   (.op(br_op), .target(br_target), .pc(pc),
                      .flags(flags_in), .ret_phase(ret_phase),
                      .ret_addr(ret_addr), .pc_next(pc_next), .taken(br_taken));

  always_comb begin
    is_arith = alu_op inside {ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC};
    is_shift = alu_op inside {ALU_SHL, ALU_SHR};
    y = is_arith ? ar_y : lu_y;
    flags_out = flags_in;
    if (alu_op != ALU_NOP) begin
      flags_out.z = (y == '0);
      flags_out.n = y[WORD-1];
      if (is_arith) begin
        flags_out.c = ar_c;
        flags_out.v = ar_v;
      end else if (is_shift) begin
        flags_out.c = lu_c;
      end
    end
  end
endmodule
