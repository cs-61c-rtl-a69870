// mux4: N-bit-wide 4-to-1 multiplexer, built hierarchically.
//
// e = a when s = 00, b when s = 01, c when s = 10, d when s = 11.
// Two 2-to-1 multiplexers on s[0] choose within {a, b} and {c, d}, and a
// third on s[1] chooses between their outputs; this gives the same function
// as the flat sum of products s1's0'a + s1's0b + s1s0'c + s1s0d.
// Purely combinational.
module mux4 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  input  logic [1:0]   s,
  output logic [N-1:0] e
);
  logic [N-1:0] ab, cd;

  mux2 #(.N(N)) u_ab  (.a(a),  .b(b),  .s(s[0]), .c(ab));
  mux2 #(.N(N)) u_cd  (.a(c),  .b(d),  .s(s[0]), .c(cd));
  mux2 #(.N(N)) u_out (.a(ab), .b(cd), .s(s[1]), .c(e));
endmodule
