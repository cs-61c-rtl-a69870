// tb_add_sub: checks the two's complement adder/subtractor against A + B and
// A - B, including carry out and signed overflow, on random and corner values.
module tb_add_sub;
  localparam int N = 32;
  logic [N-1:0] a, b, sum;
  logic sub, cout, ovf;
  int checks = 0, failures = 0;

  add_sub #(.N(N)) dut (.a(a), .b(b), .sub(sub), .sum(sum), .cout(cout), .ovf(ovf));

  task automatic check();
    logic [N:0] full;
    logic signed [N:0] sfull;
    logic exp_ovf;
    if (sub) begin
      full  = {1'b0, a} + {1'b0, ~b} + 1;
      sfull = $signed({a[N-1], a}) - $signed({b[N-1], b});
    end else begin
      full  = {1'b0, a} + {1'b0, b};
      sfull = $signed({a[N-1], a}) + $signed({b[N-1], b});
    end
    exp_ovf = sfull[N] ^ sfull[N-1];
    #1;
    checks++;
    if (sum !== full[N-1:0] || cout !== full[N] || ovf !== exp_ovf) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b got %h c%b v%b exp %h c%b v%b", a, b, sub, sum, cout, ovf,
               full[N-1:0], full[N], exp_ovf);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h8000_0000; b = 32'h1; sub = 1; check();
    a = 32'h7FFF_FFFF; b = 32'h1; sub = 0; check();
    a = 32'h5; b = 32'h5; sub = 1; check();
    a = 32'h0; b = 32'h1; sub = 1; check();
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; sub = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
