// extender: widens a 16-bit immediate to 32 bits.
//
// ext_op = 0 fills the upper half with zeros (ori); ext_op = 1 copies bit 15
// into the upper half (lw, sw). The 0/1 encoding of ext_op is this design's
// choice. Purely combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] out
);
  assign out = {{16{ext_op & imm16[15]}}, imm16};
endmodule
