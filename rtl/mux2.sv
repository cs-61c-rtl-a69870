// mux2: N-bit-wide 2-to-1 data multiplexer.
//
// Built as N instances of a one-bit multiplexer, each obeying c = (~s & a) | (s & b),
// the reduced form of the one-bit truth table. s = 0 passes a, s = 1 passes b.
// Purely combinational.
module mux2 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         s,
  output logic [N-1:0] c
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    assign c[i] = (~s & a[i]) | (s & b[i]);
  end
endmodule
