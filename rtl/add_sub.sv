// add_sub: N-bit two's complement adder/subtractor.
//
// A - B is computed as A + ~B + 1: every bit of B passes through an XOR with
// the sub signal, and sub is also the carry into the ripple-carry adder. With
// sub = 0 the circuit is a plain adder. cout is the unsigned carry out (for a
// subtraction it is 1 when no borrow occurred); ovf flags signed overflow as
// carry-into-MSB XOR carry-out, an output this design adds.
// Purely combinational.
module add_sub #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         ovf
);
  logic [N-1:0] b_x;
  logic         c_msb;

  assign b_x = b ^ {N{sub}};

  ripple_adder #(.N(N)) u_add (
    .a    (a),
    .b    (b_x),
    .cin  (sub),
    .sum  (sum),
    .cout (cout),
    .c_msb(c_msb)
  );

  assign ovf = c_msb ^ cout;
endmodule
