// cs61c_top: the datapath building blocks and examples of the lecture, side by side.
//
// Four independent designs share only the clock and the reset:
//   * the MIPS-lite single-cycle processor (single_cycle_cpu), with its
//     program-load port and debug read ports brought out;
//   * the three-consecutive-ones detector (three_ones_fsm);
//   * the summation circuit S <- S + Xi (summation);
//   * the least-significant-bit half adder (half_adder), combinational.
// All registers are clocked on the rising edge of clk; rst is a synchronous,
// active-high reset for every sequential part.
module cs61c_top #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned SUM_W      = 32
) (
  input  logic             clk,
  input  logic             rst,
  // MIPS-lite processor
  input  logic             imem_we,
  input  logic [29:0]      imem_waddr,
  input  logic [31:0]      imem_wdata,
  output logic [31:0]      pc,
  output logic [31:0]      instr,
  input  logic [4:0]       dbg_raddr,
  output logic [31:0]      dbg_rdata,
  input  logic [29:0]      dmem_dbg_addr,
  output logic [31:0]      dmem_dbg_data,
  // three-ones detector
  input  logic             fsm_in,
  output logic             fsm_out,
  output logic [1:0]       fsm_state,
  // summation circuit
  input  logic [SUM_W-1:0] sum_x,
  output logic [SUM_W-1:0] sum_s,
  // half adder
  input  logic             ha_a,
  input  logic             ha_b,
  output logic             ha_s,
  output logic             ha_c
);
  single_cycle_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_cpu (
    .clk(clk), .rst(rst),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr),
    .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata),
    .dmem_dbg_addr(dmem_dbg_addr), .dmem_dbg_data(dmem_dbg_data)
  );

  three_ones_fsm u_fsm (.clk(clk), .rst(rst), .in_bit(fsm_in), .out_bit(fsm_out), .ps(fsm_state));

  summation #(.W(SUM_W)) u_sum (.clk(clk), .rst(rst), .x(sum_x), .s(sum_s));

  half_adder u_ha (.a(ha_a), .b(ha_b), .s(ha_s), .c(ha_c));
endmodule
