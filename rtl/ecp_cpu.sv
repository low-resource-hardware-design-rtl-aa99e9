// ecp_cpu: the CPU of the elliptic-curve processor (register file + ALU).
//
// Every cycle the CPU executes the 72-bit control vector that the program
// memory returns for the current PC. Several operations share one vector
// and one cycle: a load or store on the single data port, an ALU operation
// whose result can go to a register and to memory at once, a MOVNF that
// copies the word loaded in the previous cycle into a work register, a
// multiply-accumulate on that same freshly loaded word, an accumulator right
// shift, and a change of control flow. A loaded word is available to the
// very next vector without first being moved into a register, as the
// published design describes; so "LD x" followed by "MULACC || LD y" multiplies x.
//
// Memory address = selected base register (or 0) + 8-bit offset.
// CALL stores the return address (PC+1) at SP and decrements SP, using the
// data port in the same cycle. RET takes two cycles: it reads the word at
// SP+1 and increments SP, holds the PC (a stall), then jumps to the word
// read. HALT holds the PC and does nothing else. The stack in data RAM and
// the two-cycle RET are this design's choices; the published design only names
// CALL/RET and the stack pointer.
// Interface: ctrl in (combinational from program memory), pc out; the data
// port (mem_req/mem_we/mem_addr/mem_wdata) is presented combinationally and
// mem_rdata must be the word loaded one cycle earlier.
module ecp_cpu
  import ecp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_t           ctrl,
  output logic [PC_W-1:0] pc,
  output logic            mem_req,
  output logic            mem_we,
  output word_t           mem_addr,
  output word_t           mem_wdata,
  input  word_t           mem_rdata,
  output logic            halted,
  output logic            ret_stall,  // second cycle of a RET
  output logic            br_taken    // this cycle selects a non-sequential PC
);
  word_t            sp;
  logic [ACC_W-1:0] acc, acc_sum, acc_next;
  word_t            base [3];
  word_t            work [4];
  flags_t           flags, flags_alu;
  logic             ret_phase;
  ctrl_t            c;       // control vector with side effects suppressed when stalled
  word_t            op_a, op_b, alu_y, mac_b, st_data, ab;
  logic [PC_W-1:0]  pc_next;
  logic             is_call, is_ret;
  word_t            sp_d;
  logic             sp_we;

  always_comb begin
    c = ctrl;
    if (ret_phase || ctrl.br_op == BR_HALT) begin
      c = CTRL_NOP;
      c.br_op = ctrl.br_op;
    end
    is_call = (c.br_op == BR_CALL);
    is_ret  = (c.br_op == BR_RET) && !ret_phase;
  end

  // operand selection
  always_comb begin
    unique case (c.alu_a)
      AA_W0: op_a = work[0];
      AA_W1: op_a = work[1];
      AA_W2: op_a = work[2];
      AA_W3: op_a = work[3];
      AA_B0: op_a = base[0];
      AA_B1: op_a = base[1];
      AA_B2: op_a = base[2];
      default: op_a = acc[WORD-1:0];
    endcase
    unique case (c.alu_b)
      AB_RDATA: op_b = mem_rdata;
      AB_IMM:   op_b = c.imm;
      AB_ACC1:  op_b = acc[2*WORD-1:WORD];
      AB_ACC2:  op_b = acc[3*WORD-1:2*WORD];
      AB_W0:    op_b = work[0];
      AB_W1:    op_b = work[1];
      AB_W2:    op_b = work[2];
      default:  op_b = work[3];
    endcase
    mac_b = (c.mac_b == MB_IMM) ? c.imm : mem_rdata;
    unique case (c.addr_base)
      AB_B0:   ab = base[0];
      AB_B1:   ab = base[1];
      AB_B2:   ab = base[2];
      default: ab = '0;
    endcase
  end

  alu u_alu (
    .alu_op(c.alu_op), .a(op_a), .b(op_b), .flags_in(flags),
    .y(alu_y), .flags_out(flags_alu),
    .mac_op(c.mac_op), .mac_a(work[c.mac_a]), .mac_b(mac_b), .acc_in(acc),
    .acc_clr(c.acc_clr), .acc_shr(c.acc_shr),
    .acc_sum(acc_sum), .acc_next(acc_next),
    .br_op(c.br_op), .br_target(c.br_target), .pc(pc), .ret_phase(ret_phase),
    .ret_addr(mem_rdata), .pc_next(pc_next), .br_taken(br_taken));

  // store data
  always_comb begin
    unique case (c.st_src)
      ST_ALU:  st_data = alu_y;
      ST_ACC0: st_data = acc_sum[WORD-1:0];
      ST_ACC1: st_data = acc_sum[2*WORD-1:WORD];
      ST_ACC2: st_data = acc_sum[3*WORD-1:2*WORD];
      ST_W0:   st_data = work[0];
      ST_W1:   st_data = work[1];
      ST_W2:   st_data = work[2];
      default: st_data = work[3];
    endcase
  end

  // data port and stack pointer
  always_comb begin
    mem_req   = (c.mem_op != MEM_NONE);
    mem_we    = (c.mem_op == MEM_ST);
    mem_addr  = ab + word_t'(c.addr_off);
    mem_wdata = st_data;
    sp_we     = 1'b0;
    sp_d      = sp;
    if (is_call) begin
      mem_req   = 1'b1;
      mem_we    = 1'b1;
      mem_addr  = sp;
      mem_wdata = word_t'(pc) + word_t'(1);
      sp_we     = 1'b1;
      sp_d      = sp - word_t'(1);
    end else if (is_ret) begin
      mem_req   = 1'b1;
      mem_we    = 1'b0;
      mem_addr  = sp + word_t'(1);
      sp_we     = 1'b1;
      sp_d      = sp + word_t'(1);
    end
  end

  register_file u_rf (
    .clk, .rst_n,
    .pc_we(1'b1), .pc_d(pc_next),
    .sp_we, .sp_d,
    .acc_we(c.mac_op != MAC_NONE || c.acc_clr || c.acc_shr), .acc_d(acc_next),
    .flags_we(c.flags_we), .flags_d(flags_alu),
    .rd_we(c.rd_we), .rd_sel(c.rd_sel), .rd_d(alu_y),
    .mv_we(c.movnf), .mv_sel(c.movnf_reg), .mv_d(mem_rdata),
    .pc, .sp, .acc, .base, .work, .flags);

  always_ff @(posedge clk) begin
    if (!rst_n) ret_phase <= 1'b0;
    else        ret_phase <= is_ret;
  end

  assign halted    = (ctrl.br_op == BR_HALT);
  assign ret_stall = ret_phase;

  // CALL and RET use the data port themselves.
  a_call_port: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.br_op inside {BR_CALL, BR_RET}) |-> ctrl.mem_op == MEM_NONE);
  // a stack pointer write by the ALU would race a CALL/RET
  a_sp_race: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.br_op inside {BR_CALL, BR_RET}) |-> !(ctrl.rd_we && ctrl.rd_sel == RD_SP));
endmodule
