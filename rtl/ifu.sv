// ifu: instruction fetch unit, the program counter and its next-address logic.
//
// The PC register holds the upper 30 bits of the instruction address; its two
// low bits are always 00 because instructions are word aligned. One adder forms
// PC + 4. A second adder adds to PC + 4 the branch offset, sign_ext(imm16) || 00
// ("PC Ext"). nPC_sel picks the next PC: 0 -> PC + 4, 1 -> branch target. The PC
// is written on every rising clock edge; a synchronous reset sets it to 0
// (reset value is this design's choice).
module ifu (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic [15:0] imm16,
  output logic [31:0] pc
);
  logic [29:0] pc_q;
  logic [31:0] pc_plus4, pc_ext, pc_branch, pc_next;
  logic        c0_unused, c1_unused, m0_unused, m1_unused;

  assign pc = {pc_q, 2'b00};

  ripple_adder #(.N(32)) u_add4 (
    .a(pc), .b(32'd4), .cin(1'b0),
    .sum(pc_plus4), .cout(c0_unused), .c_msb(m0_unused)
  );

  assign pc_ext = {{14{imm16[15]}}, imm16, 2'b00};

  ripple_adder #(.N(32)) u_addbr (
    .a(pc_plus4), .b(pc_ext), .cin(1'b0),
    .sum(pc_branch), .cout(c1_unused), .c_msb(m1_unused)
  );

  mux2 #(.N(32)) u_nmux (.a(pc_plus4), .b(pc_branch), .s(npc_sel), .c(pc_next));

  wr_register #(.N(30)) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(pc_next[31:2]), .q(pc_q)
  );
endmodule
