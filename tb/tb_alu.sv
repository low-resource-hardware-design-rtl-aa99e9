// tb_alu: checks that the ALU routes operations to its units and forms
// the status bits as specified: Z/N from the result, C/V from arithmetic,
// C from the shifted-out bit, C/V kept by other logic operations, all kept
// by NOP. Also checks that MAC and branch results are passed through in the
// same cycle as an ALU operation.
module tb_alu;
  import ecp_pkg::*;
  alu_op_e          alu_op;
  word_t            a, b, y;
  flags_t           flags_in, flags_out;
  mac_op_e          mac_op;
  word_t            mac_a, mac_b;
  logic [ACC_W-1:0] acc_in, acc_sum, acc_next;
  logic             acc_clr, acc_shr;
  br_op_e           br_op;
  logic [PC_W-1:0]  br_target, pc, pc_next;
  logic             ret_phase, br_taken;
  word_t            ret_addr;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    word_t ey; flags_t ef; int r;
    for (int n = 0; n < 4000; n++) begin
      alu_op = alu_op_e'($urandom_range(12));
      a = word_t'($urandom); b = word_t'($urandom); flags_in = 4'($urandom);
      if (n % 7 == 0) b = a;   // exercise zero results
      mac_op = MAC_ACC; mac_a = word_t'($urandom); mac_b = word_t'($urandom);
      acc_in = 48'($urandom); acc_clr = 0; acc_shr = 0;
      br_op = BR_JMP; br_target = PC_W'($urandom); pc = PC_W'($urandom);
      ret_phase = 0; ret_addr = '0;
      ef = flags_in;
      case (alu_op)
        ALU_ADD: begin r = int'(a) + int'(b); ey = word_t'(r); ef.c = r > 65535;
                 ef.v = (a[15] == b[15]) && (ey[15] != a[15]); end
        ALU_ADC: begin r = int'(a) + int'(b) + int'(flags_in.c); ey = word_t'(r); ef.c = r > 65535;
                 ef.v = (a[15] == b[15]) && (ey[15] != a[15]); end
        ALU_SUB: begin r = int'(a) - int'(b); ey = word_t'(r); ef.c = r < 0;
                 ef.v = (a[15] != b[15]) && (ey[15] != a[15]); end
        ALU_SBC: begin r = int'(a) - int'(b) - int'(flags_in.c); ey = word_t'(r); ef.c = r < 0;
                 ef.v = (a[15] != b[15]) && (ey[15] != a[15]); end
        ALU_AND: ey = a & b;
        ALU_OR:  ey = a | b;
        ALU_XOR: ey = a ^ b;
        ALU_NOT: ey = ~b;
        ALU_SHL: begin ey = a << 1; ef.c = a[15]; end
        ALU_SHR: begin ey = a >> 1; ef.c = a[0]; end
        ALU_PASSA: ey = a;
        ALU_PASSB: ey = b;
        default: ey = '0;
      endcase
      if (alu_op != ALU_NOP) begin ef.z = (ey == 0); ef.n = ey[15]; end
      #1;
      checks++;
      if ((alu_op != ALU_NOP && y !== ey) || flags_out !== ef) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h fin=%b: y=%h f=%b exp %h %b",
                 alu_op.name(), a, b, flags_in, y, flags_out, ey, ef);
      end
      checks++;
      if (acc_sum !== acc_in + 48'(32'(mac_a) * 32'(mac_b)) || pc_next !== br_target || !br_taken) begin
        failures++;
        $display("FAIL: MAC or branch result not passed through");
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
