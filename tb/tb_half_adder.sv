// tb_half_adder: exhaustive check of the one-bit half adder against a + b.
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] exp;
      {a, b} = 2'(i);
      exp = 2'(a) + 2'(b);
      #1;
      checks++;
      if ({c, s} !== exp) begin
        failures++;
        $display("FAIL a=%b b=%b got c,s=%b%b exp=%b", a, b, c, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
