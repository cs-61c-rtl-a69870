// summation: accumulating adder, S <- S + Xi on every rising clock edge.
//
// A W-bit register holds the running sum S; a ripple-carry adder adds the
// input Xi to S and the register captures the result at the clock edge. The
// register separates successive additions, so Xi must be stable for an adder
// delay plus setup time before each edge. The sum wraps modulo 2^W. The width
// and the synchronous clear (rst) are this design's choices.
module summation #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x,
  output logic [W-1:0] s
);
  logic [W-1:0] s_next;
  logic         cout_unused, cmsb_unused;

  ripple_adder #(.N(W)) u_add (
    .a(s), .b(x), .cin(1'b0), .sum(s_next), .cout(cout_unused), .c_msb(cmsb_unused)
  );

  wr_register #(.N(W)) u_s (.clk(clk), .rst(rst), .we(1'b1), .d(s_next), .q(s));
endmodule
