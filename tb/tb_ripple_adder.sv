// tb_ripple_adder: random and corner-case vectors for the 32-bit ripple-carry
// adder, compared with a 33-bit sum computed by the testbench.
module tb_ripple_adder;
  localparam int N = 32;
  logic [N-1:0] a, b, sum;
  logic cin, cout, c_msb;
  int checks = 0, failures = 0;

  ripple_adder #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .c_msb(c_msb));

  task automatic check();
    logic [N:0] exp;
    logic [N-1:0] low;
    exp = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
    low = {1'b0, a[N-2:0]} + {1'b0, b[N-2:0]} + N'(cin);
    #1;
    checks++;
    if ({cout, sum} !== exp || c_msb !== low[N-1]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b %h (cmsb %b) exp %h", a, b, cin, cout, sum, c_msb, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; cin = 1; check();
    a = '1; b = '1; cin = 1; check();
    a = 32'h7FFF_FFFF; b = 32'h1; cin = 0; check();
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
