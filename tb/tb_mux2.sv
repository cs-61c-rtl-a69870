// tb_mux2: random vectors for the 32-bit 2-to-1 multiplexer (s=0 -> a, s=1 -> b).
module tb_mux2;
  logic [31:0] a, b, c;
  logic s;
  int checks = 0, failures = 0;

  mux2 #(.N(32)) dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = $urandom; b = $urandom; s = 1'($urandom);
      #1;
      checks++;
      if (c !== (s ? b : a)) begin
        failures++;
        $display("FAIL s=%b a=%h b=%h c=%h", s, a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
