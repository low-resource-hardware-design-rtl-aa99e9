// tb_branch_unit: every control-flow operation with random flags, PC and
// target; expected next PC written out case by case.
module tb_branch_unit;
  import ecp_pkg::*;
  br_op_e          op;
  logic [PC_W-1:0] target, pc, pc_next;
  flags_t          flags;
  logic            ret_phase, taken;
  word_t           ret_addr;
  int checks = 0, failures = 0;

  branch_unit dut (.op, .target, .pc, .flags, .ret_phase, .ret_addr, .pc_next, .taken);

  initial begin
    logic [PC_W-1:0] e;
    logic et, cond;
    for (int n = 0; n < 3000; n++) begin
      op = br_op_e'($urandom_range(12));
      target = PC_W'($urandom); pc = PC_W'($urandom); flags = 4'($urandom);
      ret_phase = 1'($urandom); ret_addr = word_t'($urandom);
      case (op)
        BR_JMP, BR_CALL: cond = 1;
        BR_Z: cond = flags.z;  BR_NZ: cond = ~flags.z;
        BR_C: cond = flags.c;  BR_NC: cond = ~flags.c;
        BR_N: cond = flags.n;  BR_NN: cond = ~flags.n;
        BR_V: cond = flags.v;  BR_NV: cond = ~flags.v;
        default: cond = 0;
      endcase
      if (op == BR_HALT)     begin e = pc; et = 0; end
      else if (op == BR_RET) begin e = ret_phase ? ret_addr[PC_W-1:0] : pc; et = ret_phase; end
      else if (cond)         begin e = target; et = 1; end
      else                   begin e = pc + 1; et = 0; end
      #1;
      checks++;
      if (pc_next !== e || taken !== et) begin
        failures++;
        $display("FAIL op=%s flags=%b pc=%0d tgt=%0d: %0d/%b exp %0d/%b",
                 op.name(), flags, pc, target, pc_next, taken, e, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
