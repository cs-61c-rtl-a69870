// wr_register: N-bit register with write enable.
//
// N D-type flip-flops sharing one clock. On a rising edge, Data Out takes
// Data In when Write Enable is 1 and holds its value when it is 0. A
// synchronous, active-high reset loading RST_VAL is this design's addition.
module wr_register #(
  parameter int unsigned   N       = 32,
  parameter logic [N-1:0]  RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RST_VAL;
    else if (we) q <= d;
  end
endmodule
