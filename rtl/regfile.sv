// regfile: register file of NREGS x W-bit registers, two read ports, one write port.
//
// RA selects the register driven onto busA and RB the one driven onto busB;
// both reads are combinational, valid one access time after the address. When
// we = 1, register RW takes busW on the rising clock edge; a read of RW in the
// same cycle still returns the old value. A third read port (rd_dbg/bus_dbg)
// is provided for observation. Register 0 always reads as zero and ignores
// writes (the MIPS convention), and reset clears every register; the debug port,
// the zero register and the reset are this design's choices.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  input  logic [AW-1:0] rw,
  input  logic [W-1:0]  busw,
  output logic [W-1:0]  busa,
  output logic [W-1:0]  busb,
  input  logic [AW-1:0] rd_dbg,
  output logic [W-1:0]  bus_dbg
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  assign busa    = (ra     == '0) ? '0 : regs[ra];
  assign busb    = (rb     == '0) ? '0 : regs[rb];
  assign bus_dbg = (rd_dbg == '0) ? '0 : regs[rd_dbg];
endmodule
