// tb_mux4: random vectors for the 32-bit 4-to-1 multiplexer
// (s=00 -> a, 01 -> b, 10 -> c, 11 -> d).
module tb_mux4;
  logic [31:0] in [4];
  logic [31:0] e;
  logic [1:0] s;
  int checks = 0, failures = 0;

  mux4 #(.N(32)) dut (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .s(s), .e(e));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      foreach (in[k]) in[k] = $urandom;
      s = 2'(i);
      #1;
      checks++;
      if (e !== in[s]) begin
        failures++;
        $display("FAIL s=%0d e=%h exp=%h", s, e, in[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
