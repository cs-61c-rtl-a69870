// half_adder: one-bit adder for the least significant bit of a sum.
//
// With no carry coming in, the sum bit is the exclusive OR of the two input
// bits and the carry out is their AND (s0 = a0 XOR b0, c1 = a0 AND b0), which
// is the truth table of the lecture's least-significant-bit adder.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
