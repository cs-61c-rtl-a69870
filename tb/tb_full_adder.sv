// tb_full_adder: exhaustive check of the one-bit full adder against a + b + cin.
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] exp;
      {a, b, cin} = 3'(i);
      exp = 2'(a) + 2'(b) + 2'(cin);
      #1;
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b got %b%b exp %b", a, b, cin, cout, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
