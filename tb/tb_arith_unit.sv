// tb_arith_unit: random and corner-case check of the 16-bit add/subtract
// unit against 32-bit integer arithmetic (sum, carry/borrow, signed overflow).
module tb_arith_unit;
  import ecp_pkg::*;
  alu_op_e op;
  word_t   a, b, y;
  logic    cin, c, v;
  int checks = 0, failures = 0;

  arith_unit dut (.op, .a, .b, .cin, .y, .c, .v);

  task automatic check1();
    int ia, ib, ci, r, sa, sb, sr;
    logic ec, ev;
    ia = int'(a); ib = int'(b); ci = int'(cin);
    sa = int'($signed(a)); sb = int'($signed(b));
    case (op)
      ALU_ADD: begin r = ia + ib;      sr = sa + sb;      end
      ALU_ADC: begin r = ia + ib + ci; sr = sa + sb + ci; end
      ALU_SUB: begin r = ia - ib;      sr = sa - sb;      end
      default: begin r = ia - ib - ci; sr = sa - sb - ci; end
    endcase
    ec = (r < 0) || (r > 65535);
    ev = (sr < -32768) || (sr > 32767);
    #1;
    checks++;
    if (y !== word_t'(r) || c !== ec || v !== ev) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h cin=%b: y=%h c=%b v=%b exp %h %b %b",
               op.name(), a, b, cin, y, c, v, word_t'(r), ec, ev);
    end
  endtask

  initial begin
    alu_op_e ops [4] = '{ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC};
    word_t corner [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    foreach (ops[k]) foreach (corner[i]) foreach (corner[j])
      for (int ci = 0; ci < 2; ci++) begin
        op = ops[k]; a = corner[i]; b = corner[j]; cin = 1'(ci); check1();
      end
    for (int n = 0; n < 4000; n++) begin
      op = ops[$urandom_range(3)]; a = word_t'($urandom); b = word_t'($urandom);
      cin = 1'($urandom); check1();
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
