// single_cycle_cpu: MIPS-lite processor executing one instruction per clock cycle.
//
// Instruction subset: addu, subu, ori, lw, sw, beq. The PC addresses the
// instruction memory; the fetched word feeds the control unit (op, funct) and
// the datapath (register numbers, immediate). The datapath drives the data
// memory with the ALU result as byte address and busB as store data. Both
// memories are idealized (combinational read, write on the clock edge) and word
// addressed, so byte addresses are dropped to bits [AW+1:2] and wrap modulo the
// memory size. Separate instruction and data memories follow the description;
// their sizes, the program-load write port of the instruction memory, the debug
// read ports and the synchronous reset (PC <- 0, registers <- 0) are this
// design's choices.
//
// Timing: after a rising edge the new PC settles, the instruction is read, and
// by the next rising edge the register file, the data memory and the PC all
// take their new values together. A program is loaded through the instruction
// memory's write port, normally while rst is held.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [29:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr,
  input  logic [4:0]  dbg_raddr,
  output logic [31:0] dbg_rdata,
  input  logic [29:0] dmem_dbg_addr,
  output logic [31:0] dmem_dbg_data
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  ctrl_t       ctrl;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata, imem_unused;
  logic        dmem_we;

  // Instruction memory: the write port loads the program, the second read
  // port fetches at the PC.
  ideal_memory #(.WORDS(IMEM_WORDS), .W(32)) u_imem (
    .clk(clk), .we(imem_we), .addr(imem_waddr[IAW-1:0]), .din(imem_wdata),
    .dout(imem_unused), .dbg_addr(pc[IAW+1:2]), .dbg_dout(instr)
  );

  control u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));

  datapath u_dp (
    .clk(clk), .rst(rst), .instr(instr), .ctrl(ctrl), .pc(pc),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_we(dmem_we),
    .dmem_rdata(dmem_rdata), .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata)
  );

  ideal_memory #(.WORDS(DMEM_WORDS), .W(32)) u_dmem (
    .clk(clk), .we(dmem_we & ~rst), .addr(dmem_addr[DAW+1:2]), .din(dmem_wdata),
    .dout(dmem_rdata), .dbg_addr(dmem_dbg_addr[DAW-1:0]), .dbg_dout(dmem_dbg_data)
  );
endmodule
