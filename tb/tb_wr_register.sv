// tb_wr_register: the register takes Data In on a rising edge only when
// Write Enable is 1, holds otherwise, and loads its reset value on rst.
module tb_wr_register;
  localparam int N = 32;
  logic clk = 0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0, cycles = 0;

  wr_register #(.N(N), .RST_VAL(32'hA5A5_0001)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    model = 32'hA5A5_0001;
    checks++; if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); d = $urandom; rst = (i % 97 == 50);
      @(posedge clk);
      if (rst) model = 32'hA5A5_0001; else if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
