// tb_ideal_memory: random writes and reads of the idealized memory against a
// reference array. Reads are combinational (checked without a clock edge),
// writes land on the rising edge only when we = 1.
module tb_ideal_memory;
  localparam int WORDS = 1024;
  localparam int AW = $clog2(WORDS);
  logic clk = 0, we;
  logic [AW-1:0] addr, dbg_addr;
  logic [31:0] din, dout, dbg_dout;
  logic [31:0] ref_m [WORDS];
  int checks = 0, failures = 0, cycles = 0;

  ideal_memory #(.WORDS(WORDS), .W(32)) dut (
    .clk(clk), .we(we), .addr(addr), .din(din), .dout(dout), .dbg_addr(dbg_addr), .dbg_dout(dbg_dout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_m[i]) ref_m[i] = '0;
    we = 0; addr = '0; din = '0; dbg_addr = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = AW'($urandom % 64); din = $urandom; dbg_addr = AW'($urandom % 64);
      #1;
      checks++;
      if (dout !== ref_m[addr] || dbg_dout !== ref_m[dbg_addr]) begin
        failures++;
        $display("FAIL read addr=%0d dout=%h exp=%h", addr, dout, ref_m[addr]);
      end
      @(posedge clk);
      if (we) ref_m[addr] = din;
      #1;
      checks++;
      if (dout !== ref_m[addr]) begin
        failures++;
        $display("FAIL after edge addr=%0d dout=%h exp=%h", addr, dout, ref_m[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
