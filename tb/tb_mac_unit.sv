// tb_mac_unit: checks MULACC, MUL, clear and right shift of the
// multiply-accumulate unit against 64-bit integer arithmetic, that the
// accumulator wraps at 48 bits, and that an idle unit leaves the
// accumulator unchanged (operand isolation).
module tb_mac_unit;
  import ecp_pkg::*;
  mac_op_e          op;
  word_t            a, b;
  logic [ACC_W-1:0] acc_in, acc_sum, acc_next;
  logic             clr, shr;
  int checks = 0, failures = 0;

  mac_unit dut (.op, .a, .b, .acc_in, .clr, .shr, .acc_sum, .acc_next);

  initial begin
    longint unsigned base, s, e_sum, e_next;
    mac_op_e ops [3] = '{MAC_NONE, MAC_ACC, MAC_LOAD};
    for (int n = 0; n < 4000; n++) begin
      op = ops[$urandom_range(2)];
      a = word_t'($urandom); b = word_t'($urandom);
      if (n < 20) begin a = '1; b = '1; end
      acc_in = {16'($urandom), 32'($urandom)};
      if (n < 10) acc_in = '1;
      clr = ($urandom_range(3) == 0); shr = 1'($urandom);
      base = (clr || op == MAC_LOAD) ? 64'd0 : 64'(acc_in);
      s = (op == MAC_NONE) ? 64'd0 : 64'(a) * 64'(b);
      e_sum = (base + s) & 64'hFFFF_FFFF_FFFF;
      e_next = shr ? (e_sum >> 16) : e_sum;
      #1;
      checks++;
      if (64'(acc_sum) != e_sum || 64'(acc_next) != e_next) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h acc=%h clr=%b shr=%b: %h %h exp %h %h",
                 op.name(), a, b, acc_in, clr, shr, acc_sum, acc_next, e_sum, e_next);
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
