// control: main control of the MIPS-lite single-cycle processor.
//
// Decodes the opcode (and funct for R-type) into the datapath control points:
//   instr  RegDst ALUSrc MemtoReg RegWr MemWr Branch ExtOp ALUctr
//   addu     1      0      0        1     0     0      x    ADD
//   subu     1      0      0        1     0     0      x    SUB
//   ori      0      1      0        1     0     0    zero   OR
//   lw       0      1      1        1     0     0    sign   ADD
//   sw       x      1      x        0     1     0    sign   ADD
//   beq      x      0      x        0     0     1      x    SUB
// The signal meanings and per-instruction settings follow the single-cycle
// datapath walk-through; don't-care entries (x) are driven to 0, and the opcode
// and funct numbers are the standard MIPS ones (see mips_pkg). Any other
// instruction writes nothing. Purely combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{default: '0, alu_ctr: ALU_ADD};
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU || funct == FN_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FN_SUBU) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
        ctrl.ext_op  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch  = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
      end
      default: ;
    endcase
  end
endmodule
