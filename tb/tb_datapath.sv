// tb_datapath: feeds the datapath a random stream of MIPS-lite instructions
// together with the control settings for each (from a table kept here), serves
// its data memory from a testbench array, and checks the PC every cycle and one
// register every cycle against the instruction-level reference model.
module tb_datapath;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  localparam int DW = 1024;
  logic clk = 0, rst;
  logic [31:0] instr, pc, dmem_addr, dmem_wdata, dmem_rdata, dbg_rdata;
  logic dmem_we;
  logic [4:0] dbg_raddr;
  ctrl_t ctrl;
  logic [31:0] dmem [DW];
  int checks = 0, failures = 0, cycles = 0;
  int kinds [K_NUM];
  mips_model mdl;

  datapath dut (
    .clk(clk), .rst(rst), .instr(instr), .ctrl(ctrl), .pc(pc),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_we(dmem_we),
    .dmem_rdata(dmem_rdata), .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata)
  );

  assign dmem_rdata = dmem[dmem_addr[11:2]];
  always @(posedge clk) if (dmem_we) dmem[dmem_addr[11:2]] <= dmem_wdata;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic ctrl_t ctl_for(logic [31:0] ins);
    ctrl_t c = '{default: '0, alu_ctr: ALU_ADD};
    case (ins[31:26])
      6'h00: begin c.reg_dst = 1; c.reg_wr = 1; c.alu_ctr = (ins[5:0] == 6'h23) ? ALU_SUB : ALU_ADD; end
      6'h0D: begin c.alu_src = 1; c.reg_wr = 1; c.alu_ctr = ALU_OR; end
      6'h23: begin c.alu_src = 1; c.reg_wr = 1; c.mem_to_reg = 1; c.ext_op = 1; end
      6'h2B: begin c.alu_src = 1; c.mem_wr = 1; c.ext_op = 1; end
      6'h04: begin c.branch = 1; c.alu_ctr = ALU_SUB; end
      default: ;
    endcase
    return c;
  endfunction

  function automatic logic [31:0] rand_instr();
    logic [4:0] a = 5'($urandom % 8), b = 5'($urandom % 8), d = 5'($urandom % 8);
    logic [15:0] im = 16'($urandom);
    case ($urandom % 6)
      0: return addu(d, a, b);
      1: return subu(d, a, b);
      2: return ori(d, a, im);
      3: return lw(d, a, 16'($signed(8'(im))));
      4: return sw(d, a, 16'($signed(8'(im))));
      default: return beq(a, b, 16'($signed(6'(im))));
    endcase
  endfunction

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdl = new(DW);
    foreach (dmem[i]) dmem[i] = '0;
    foreach (kinds[i]) kinds[i] = 0;
    rst = 1; instr = '0; ctrl = ctl_for('0); dbg_raddr = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      instr = rand_instr();
      ctrl = ctl_for(instr);
      dbg_raddr = 5'($urandom % 8);
      #1;
      checks++;
      if (pc !== mdl.pc) begin failures++; $display("FAIL i=%0d pc=%h exp=%h", i, pc, mdl.pc); end
      checks++;
      if (dbg_rdata !== mdl.r[dbg_raddr]) begin
        failures++; $display("FAIL i=%0d r%0d=%h exp=%h", i, dbg_raddr, dbg_rdata, mdl.r[dbg_raddr]);
      end
      @(posedge clk);
      kinds[mdl.step(instr)]++;
    end
    for (int k = 0; k < K_R0_WRITE; k++) begin
      checks++;
      if (kinds[k] == 0) begin failures++; $display("FAIL kind %0d never executed", k); end
    end
    for (int i = 0; i < DW; i++) begin
      checks++;
      if (dmem[i] !== mdl.m[i]) begin failures++; $display("FAIL mem[%0d]=%h exp=%h", i, dmem[i], mdl.m[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
