// three_ones_fsm: detects three consecutive 1s on a serial input.
//
// A Mealy machine: a 2-bit state register PS counts the 1s seen in a row
// (00 none, 01 one, 10 two), and combinational logic maps PS and the input to
// the next state NS and the output:
//   NS0 = ~PS1 & ~PS0 & In,  NS1 = ~PS1 & PS0 & In,  Out = PS1 & ~PS0 & In.
// Out is 1 during the cycle in which the third 1 is present on the input, and
// the machine then returns to 00, so a run of six 1s gives two detections.
// Any 0 returns it to 00. The unused state 11 goes to 00 by the same
// equations. The synchronous reset to 00 is this design's addition.
module three_ones_fsm (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_bit,
  output logic       out_bit,
  output logic [1:0] ps
);
  logic [1:0] ns;

  always_comb begin
    ns[0]   = ~ps[1] & ~ps[0] & in_bit;
    ns[1]   = ~ps[1] &  ps[0] & in_bit;
    out_bit =  ps[1] & ~ps[0] & in_bit;
  end

  wr_register #(.N(2)) u_state (.clk(clk), .rst(rst), .we(1'b1), .d(ns), .q(ps));
endmodule
