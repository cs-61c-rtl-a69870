// tb_summation: random inputs Xi; after each rising edge S must equal the
// running sum (mod 2^32) kept by the testbench; reset clears S.
module tb_summation;
  localparam int W = 32;
  logic clk = 0, rst;
  logic [W-1:0] x, s, model;
  int checks = 0, failures = 0, cycles = 0;

  summation #(.W(W)) dut (.clk(clk), .rst(rst), .x(x), .s(s));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; x = '0;
    @(posedge clk); #1;
    rst = 0; model = '0;
    checks++; if (s !== 0) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x = $urandom;
      rst = (i == 1000);
      @(posedge clk);
      model = rst ? '0 : model + x;
      #1;
      checks++;
      if (s !== model) begin failures++; $display("FAIL i=%0d s=%h exp=%h", i, s, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
