// tb_control: control signals for each MIPS-lite instruction against the
// table of settings, plus an unknown opcode that must write nothing.
module tb_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  // exp: {reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, branch, ext_op}, alu
  task automatic chk(string name, logic [5:0] o, logic [5:0] f, logic [6:0] exp, alu_op_e ea,
                     logic [6:0] care, bit ca);
    logic [6:0] got;
    op = o; funct = f;
    #1;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_wr, ctrl.mem_wr, ctrl.branch, ctrl.ext_op};
    checks++;
    if (((got ^ exp) & care) != 0 || (ca && ctrl.alu_ctr !== ea)) begin
      failures++;
      $display("FAIL %s got %b alu %0d exp %b alu %0d", name, got, ctrl.alu_ctr, exp, ea);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //                          RD AS MR RW MW BR EX
    chk("addu", 6'h00, 6'h21, 7'b1__0__0__1__0__0__0, ALU_ADD, 7'b1111110, 1);
    chk("subu", 6'h00, 6'h23, 7'b1__0__0__1__0__0__0, ALU_SUB, 7'b1111110, 1);
    chk("ori",  6'h0D, 6'h3F, 7'b0__1__0__1__0__0__0, ALU_OR,  7'b1111111, 1);
    chk("lw",   6'h23, 6'h00, 7'b0__1__1__1__0__0__1, ALU_ADD, 7'b1111111, 1);
    chk("sw",   6'h2B, 6'h00, 7'b0__1__0__0__1__0__1, ALU_ADD, 7'b0101111, 1);
    chk("beq",  6'h04, 6'h00, 7'b0__0__0__0__0__1__0, ALU_SUB, 7'b0101110, 1);
    chk("bad",  6'h3F, 6'h00, 7'b0__0__0__0__0__0__0, ALU_ADD, 7'b0001110, 0);
    chk("badf", 6'h00, 6'h20, 7'b0__0__0__0__0__0__0, ALU_ADD, 7'b0001110, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
