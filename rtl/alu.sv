// alu: simple 32-bit arithmetic and logic unit with a zero flag.
//
// Four operations selected by the 2-bit S input: 00 R = A + B, 01 R = A - B,
// 10 R = A AND B, 11 R = A OR B. The adder/subtractor, the AND and the OR are
// computed in parallel and a 4-to-1 multiplexer picks the result. zero is 1
// when R is all zeros; with S = SUB it answers the A == B test used by beq.
// The operation set and encoding are the lecture's simple ALU; the zero output
// follows the "test the output for zero" remark. Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      s,
  output logic [W-1:0] r,
  output logic         zero
);
  logic [W-1:0] sum;
  logic         cout_unused, ovf_unused;

  add_sub #(.N(W)) u_addsub (
    .a   (a),
    .b   (b),
    .sub (s == ALU_SUB),
    .sum (sum),
    .cout(cout_unused),
    .ovf (ovf_unused)
  );

  mux4 #(.N(W)) u_sel (
    .a(sum),
    .b(sum),
    .c(a & b),
    .d(a | b),
    .s(s),
    .e(r)
  );

  assign zero = (r == '0);
endmodule
