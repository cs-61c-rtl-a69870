// ripple_adder: N-bit adder made of N one-bit full adders.
//
// The carry out of bit i-1 is wired to the carry in of bit i, so the carry
// ripples from the least significant bit upward; the carry chain is the
// critical path. Interface as in the building-block adder: A, B, CarryIn in;
// Sum and CarryOut out. The carry into the most significant bit is brought
// out as well (c_msb) so that a caller can form signed overflow; that output
// is this design's addition. Purely combinational.
module ripple_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         c_msb
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout  = c[N];
  assign c_msb = c[N-1];
endmodule
