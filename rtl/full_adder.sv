// full_adder: one-bit adder with carry in.
//
// Sum is the three-input exclusive OR and the carry out is the majority of
// the three inputs: s = XOR(a, b, cin), cout = a.b + a.cin + b.cin, as in the
// eight-row truth table of the one-bit adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
