// tb_three_ones_fsm: a random bit stream (biased toward 1s) into the detector;
// the expected output is computed from a count of consecutive 1s that restarts
// after each detection. Also checks the present-state sequence 00/01/10.
module tb_three_ones_fsm;
  logic clk = 0, rst, in_bit, out_bit;
  logic [1:0] ps;
  int checks = 0, failures = 0, cycles = 0, run = 0, detections = 0;

  three_ones_fsm dut (.clk(clk), .rst(rst), .in_bit(in_bit), .out_bit(out_bit), .ps(ps));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; in_bit = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_bit = ($urandom % 4 != 0);
      #1;
      checks++;
      if (ps !== 2'(run)) begin failures++; $display("FAIL i=%0d ps=%b exp=%0d", i, ps, run); end
      checks++;
      if (out_bit !== (in_bit && run == 2)) begin
        failures++; $display("FAIL i=%0d out=%b in=%b run=%0d", i, out_bit, in_bit, run);
      end
      if (out_bit) detections++;
      @(posedge clk);
      run = in_bit ? ((run == 2) ? 0 : run + 1) : 0;
    end
    checks++; if (detections == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
