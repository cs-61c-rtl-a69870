// tb_extender: zero and sign extension of random 16-bit immediates.
module tb_extender;
  logic [15:0] imm16;
  logic ext_op;
  logic [31:0] out, exp;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      imm16 = 16'($urandom); ext_op = 1'($urandom);
      exp = ext_op ? 32'($signed(imm16)) : 32'(imm16);
      #1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL imm=%h ext=%b out=%h exp=%h", imm16, ext_op, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
