// datapath: MIPS-lite single-cycle datapath.
//
// The instruction's rs and rt fields address the register file's read ports
// (Ra, Rb); RegDst chooses rd or rt as the write register Rw. busA is the
// ALU's first operand and ALUSrc chooses busB or the extended immediate
// (ExtOp: zero or sign) as the second. The ALU result is the data memory
// address and, through MemtoReg, either it or the loaded word goes back on
// busW. busB is the store data. The ALU's Zero flag ANDed with Branch is
// nPC_sel of the instruction fetch unit, which also owns the PC. Everything
// between the PC's clock edge and the register file / memory write on the next
// edge is combinational, so each instruction takes exactly one cycle.
// The data memory sits outside, in single_cycle_cpu; the debug read port of
// the register file is this design's addition.
module datapath
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] instr,
  input  ctrl_t       ctrl,
  output logic [31:0] pc,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        dmem_we,
  input  logic [31:0] dmem_rdata,
  input  logic [4:0]  dbg_raddr,
  output logic [31:0] dbg_rdata
);
  rtype_t      rf;
  itype_t      imf;
  logic [4:0]  rw;
  logic [31:0] busa, busb, busw, ext_imm, alu_b, alu_r;
  logic        zero;

  assign rf  = instr;
  assign imf = instr;

  mux2 #(.N(5)) u_regdst (.a(rf.rt), .b(rf.rd), .s(ctrl.reg_dst), .c(rw));

  regfile u_rf (
    .clk(clk), .rst(rst), .we(ctrl.reg_wr),
    .ra(rf.rs), .rb(rf.rt), .rw(rw), .busw(busw),
    .busa(busa), .busb(busb),
    .rd_dbg(dbg_raddr), .bus_dbg(dbg_rdata)
  );

  extender u_ext (.imm16(imf.imm16), .ext_op(ctrl.ext_op), .out(ext_imm));

  mux2 #(.N(32)) u_alusrc (.a(busb), .b(ext_imm), .s(ctrl.alu_src), .c(alu_b));

  alu u_alu (.a(busa), .b(alu_b), .s(ctrl.alu_ctr), .r(alu_r), .zero(zero));

  mux2 #(.N(32)) u_memtoreg (.a(alu_r), .b(dmem_rdata), .s(ctrl.mem_to_reg), .c(busw));

  ifu u_ifu (
    .clk(clk), .rst(rst), .npc_sel(ctrl.branch & zero), .imm16(imf.imm16), .pc(pc)
  );

  assign dmem_addr  = alu_r;
  assign dmem_wdata = busb;
  assign dmem_we    = ctrl.mem_wr;
endmodule
