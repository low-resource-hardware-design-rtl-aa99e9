// tb_logic_unit: random check of the bitwise, shift and move operations,
// with the expected values built bit by bit.
module tb_logic_unit;
  import ecp_pkg::*;
  alu_op_e op;
  word_t   a, b, y;
  logic    c;
  int checks = 0, failures = 0;

  logic_unit dut (.op, .a, .b, .y, .c);

  initial begin
    alu_op_e ops [8] = '{ALU_AND, ALU_OR, ALU_XOR, ALU_NOT, ALU_SHL, ALU_SHR, ALU_PASSA, ALU_PASSB};
    word_t ey;
    logic  ec;
    for (int n = 0; n < 4000; n++) begin
      op = ops[n % 8]; a = word_t'($urandom); b = word_t'($urandom);
      ec = 1'b0;
      for (int i = 0; i < 16; i++) begin
        case (op)
          ALU_AND: ey[i] = a[i] & b[i];
          ALU_OR:  ey[i] = a[i] | b[i];
          ALU_XOR: ey[i] = a[i] ^ b[i];
          ALU_NOT: ey[i] = !b[i];
          ALU_SHL: ey[i] = (i == 0) ? 1'b0 : a[i-1];
          ALU_SHR: ey[i] = (i == 15) ? 1'b0 : a[i+1];
          ALU_PASSA: ey[i] = a[i];
          default: ey[i] = b[i];
        endcase
      end
      if (op == ALU_SHL) ec = a[15];
      if (op == ALU_SHR) ec = a[0];
      #1;
      checks++;
      if (y !== ey || ((op == ALU_SHL || op == ALU_SHR) && c !== ec)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h c=%b exp %h %b", op.name(), a, b, y, c, ey, ec);
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
