// tb_single_cycle_cpu: loads programs into the instruction memory under reset
// and runs the processor against the instruction-level reference model.
// Phase 1 is a directed loop program that sums 5+4+3+2+1 into memory using
// every instruction of the subset (branch taken and not taken, negative
// offsets, zero extension, a write to register 0); phase 2 is a random
// program. Every cycle the PC, the fetched word and one register are compared,
// and the register file and data memory are compared in full at the end.
// One instruction per clock is checked by the model stepping once per cycle.
module tb_single_cycle_cpu;
  import mips_asm_pkg::*;
  localparam int IW = 256, DW = 256;
  logic clk = 0, rst, imem_we;
  logic [29:0] imem_waddr, dmem_dbg_addr;
  logic [31:0] imem_wdata, pc, instr, dbg_rdata, dmem_dbg_data;
  logic [4:0] dbg_raddr;
  logic [31:0] prog [IW];
  int checks = 0, failures = 0, cycles = 0;
  int kinds [K_NUM];
  mips_model mdl;

  single_cycle_cpu #(.IMEM_WORDS(IW), .DMEM_WORDS(DW)) dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr), .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata),
    .dmem_dbg_addr(dmem_dbg_addr), .dmem_dbg_data(dmem_dbg_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_reset();
    rst = 1;
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 30'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    @(posedge clk); #1;
    rst = 0;
    mdl.reset();
  endtask

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      dbg_raddr = 5'($urandom);
      #1;
      checks++;
      if (pc !== mdl.pc || instr !== prog[(mdl.pc >> 2) % IW]) begin
        failures++; $display("FAIL cyc=%0d pc=%h exp=%h instr=%h", i, pc, mdl.pc, instr);
      end
      checks++;
      if (dbg_rdata !== mdl.r[dbg_raddr]) begin
        failures++; $display("FAIL cyc=%0d r%0d=%h exp=%h", i, dbg_raddr, dbg_rdata, mdl.r[dbg_raddr]);
      end
      @(posedge clk);
      kinds[mdl.step(prog[(mdl.pc >> 2) % IW])]++;
    end
    @(negedge clk);
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = 5'(r); #1;
      checks++;
      if (dbg_rdata !== mdl.r[r]) begin failures++; $display("FAIL end r%0d=%h exp=%h", r, dbg_rdata, mdl.r[r]); end
    end
    for (int a = 0; a < DW; a++) begin
      dmem_dbg_addr = 30'(a); #1;
      checks++;
      if (dmem_dbg_data !== mdl.m[a]) begin failures++; $display("FAIL end m[%0d]=%h exp=%h", a, dmem_dbg_data, mdl.m[a]); end
    end
  endtask

  initial begin
    mdl = new(DW);
    foreach (kinds[i]) kinds[i] = 0;
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; dbg_raddr = 0; dmem_dbg_addr = 0;

    // Phase 1: directed program.
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = ori(1, 0, 16'd5);
    prog[1]  = ori(2, 0, 16'd1);
    prog[2]  = ori(7, 0, 16'd4);
    prog[3]  = ori(4, 0, 16'h0040);
    prog[4]  = addu(3, 3, 1);          // loop: sum += n
    prog[5]  = sw(3, 4, 16'd0);
    prog[6]  = addu(4, 4, 7);
    prog[7]  = subu(1, 1, 2);
    prog[8]  = beq(1, 0, 16'd1);       // exit when n == 0
    prog[9]  = beq(0, 0, 16'hFFFA);    // back to the loop
    prog[10] = lw(5, 4, 16'hFFFC);     // last partial sum
    prog[11] = lw(6, 4, 16'hFFEC);     // first partial sum
    prog[12] = ori(10, 5, 16'hF000);   // zero extension
    prog[13] = addu(0, 1, 2);          // write to register 0 is ignored
    prog[14] = subu(11, 0, 2);         // -1
    prog[15] = sw(11, 0, 16'd0);
    prog[16] = beq(0, 0, 16'hFFFF);    // stay here
    load_and_reset();
    run(60);
    checks++;
    if (mdl.r[5] != 15 || mdl.r[6] != 5 || mdl.r[10] != 32'h0000_F00F || mdl.r[11] != 32'hFFFF_FFFF) begin
      failures++; $display("FAIL reference model disagrees with hand-worked results");
    end

    // Phase 2: random program.
    foreach (prog[i]) begin
      logic [4:0] a = 5'($urandom % 8), b = 5'($urandom % 8), d = 5'($urandom % 8);
      logic [15:0] im = 16'($urandom);
      case ($urandom % 6)
        0: prog[i] = addu(d, a, b);
        1: prog[i] = subu(d, a, b);
        2: prog[i] = ori(d, a, im);
        3: prog[i] = lw(d, a, 16'($signed(8'(im))));
        4: prog[i] = sw(d, a, 16'($signed(8'(im))));
        default: prog[i] = beq(a, b, 16'($signed(5'(im))));
      endcase
    end
    load_and_reset();
    run(2000);

    for (int k = 0; k < K_OTHER; k++) begin
      checks++;
      if (kinds[k] == 0) begin failures++; $display("FAIL kind %0d never executed", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
