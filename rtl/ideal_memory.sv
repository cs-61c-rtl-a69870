// ideal_memory: idealized word memory with one write port and combinational reads.
//
// WORDS words of W bits. The address selects the word that appears on dout
// after the access time, independent of the clock; when we = 1 the addressed
// word takes din on the rising edge of clk. The clock matters only for writes.
// A second, read-only port (dbg_addr/dbg_dout) lets the surrounding system or
// a test look at the contents; it and the clear-to-zero at power-up are this
// design's additions. Used both as instruction memory and as data memory.
module ideal_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout,
  input  logic [AW-1:0] dbg_addr,
  output logic [W-1:0]  dbg_dout
);
  logic [W-1:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout     = mem[addr];
  assign dbg_dout = mem[dbg_addr];
endmodule
