// tb_cs61c_top: end-to-end test of the whole design at its default sizes
// (1024-word memories, 32-bit summation register).
//
// The processor runs a program that copies a 16-word table, adds it up in a
// loop and stores the results: it exercises every instruction of the subset,
// taken and untaken branches, negative load/store offsets, zero extension and a
// write to register 0. Each cycle the PC and fetched word are checked against
// the instruction-level reference model, and at the end every register and
// data-memory word is. In parallel the three-ones detector gets a random bit
// stream, the summation circuit random 32-bit inputs, and the half adder all
// input pairs. Counted mechanisms, each of which must occur: every instruction
// kind, branch taken / not taken, a write to register 0, a three-ones
// detection, a wrap-around of the summation register, and a half-adder carry.
module tb_cs61c_top;
  import mips_asm_pkg::*;
  localparam int IW = 1024, DW = 1024;
  logic clk = 0, rst, imem_we;
  logic [29:0] imem_waddr, dmem_dbg_addr;
  logic [31:0] imem_wdata, pc, instr, dbg_rdata, dmem_dbg_data;
  logic [4:0] dbg_raddr;
  logic fsm_in, fsm_out;
  logic [1:0] fsm_state;
  logic [31:0] sum_x, sum_s, sum_model;
  logic ha_a, ha_b, ha_s, ha_c;
  logic [31:0] prog [IW];
  int checks = 0, failures = 0, cycles = 0;
  int kinds [K_NUM];
  int fsm_run = 0, fsm_detect = 0, sum_wraps = 0, ha_carries = 0;
  mips_model mdl;

  cs61c_top dut (
    .clk(clk), .rst(rst),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr), .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_rdata),
    .dmem_dbg_addr(dmem_dbg_addr), .dmem_dbg_data(dmem_dbg_data),
    .fsm_in(fsm_in), .fsm_out(fsm_out), .fsm_state(fsm_state),
    .sum_x(sum_x), .sum_s(sum_s),
    .ha_a(ha_a), .ha_b(ha_b), .ha_s(ha_s), .ha_c(ha_c)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    int pcw;
    mdl = new(DW);
    foreach (kinds[i]) kinds[i] = 0;
    foreach (prog[i]) prog[i] = '0;
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; dbg_raddr = 0; dmem_dbg_addr = 0;
    fsm_in = 0; sum_x = 0; ha_a = 0; ha_b = 0;

    // r1 = table base 0x100, r2 = 1, r3 = 4, r4 = count 16, r5 = dest 0x200
    pcw = 0;
    prog[pcw++] = ori(1, 0, 16'h0100);
    prog[pcw++] = ori(2, 0, 16'd1);
    prog[pcw++] = ori(3, 0, 16'd4);
    prog[pcw++] = ori(4, 0, 16'd16);
    prog[pcw++] = ori(5, 0, 16'h0200);
    // fill: table[i] = (i+1) * 0x1001, built with an accumulating adder
    prog[pcw++] = ori(6, 0, 16'h1001);       // 5: step
    prog[pcw++] = addu(7, 0, 0);             // 6: value = 0
    prog[pcw++] = addu(8, 4, 0);             // 7: n = 16
    prog[pcw++] = addu(9, 1, 0);             // 8: p = base
    prog[pcw++] = addu(7, 7, 6);             // 9: fill loop: value += step
    prog[pcw++] = sw(7, 9, 16'd0);           // 10
    prog[pcw++] = addu(9, 9, 3);             // 11
    prog[pcw++] = subu(8, 8, 2);             // 12
    prog[pcw++] = beq(8, 0, 16'd1);          // 13: done -> 15
    prog[pcw++] = beq(0, 0, 16'hFFFA);       // 14: -> 9
    // copy and sum, walking backwards with negative offsets
    prog[pcw++] = addu(10, 0, 0);            // 15: sum = 0
    prog[pcw++] = addu(8, 4, 0);             // 16: n = 16
    prog[pcw++] = lw(11, 9, 16'hFFFC);       // 17: loop: x = p[-1]
    prog[pcw++] = addu(10, 10, 11);          // 18
    prog[pcw++] = sw(11, 5, 16'd0);          // 19: dest[k] = x
    prog[pcw++] = addu(5, 5, 3);             // 20
    prog[pcw++] = subu(9, 9, 3);             // 21
    prog[pcw++] = subu(8, 8, 2);             // 22
    prog[pcw++] = beq(8, 0, 16'd1);          // 23: done -> 25
    prog[pcw++] = beq(0, 0, 16'hFFF8);       // 24: -> 17
    prog[pcw++] = sw(10, 0, 16'h0300);       // 25: result
    prog[pcw++] = ori(12, 10, 16'h8000);     // 26: zero-extended OR
    prog[pcw++] = addu(0, 10, 10);           // 27: write to r0 is dropped
    prog[pcw++] = sw(0, 0, 16'h0304);        // 28: stores 0
    prog[pcw++] = beq(0, 0, 16'hFFFF);       // 29: halt loop

    rst = 1;
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 30'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    @(posedge clk); #1;
    rst = 0;
    sum_model = '0;

    for (int i = 0; i < 400; i++) begin
      logic [32:0] wide;
      @(negedge clk);
      fsm_in = ($urandom % 4 != 0);
      sum_x  = $urandom;
      {ha_a, ha_b} = 2'(i);
      dbg_raddr = 5'($urandom);
      #1;
      checks++;
      if (pc !== mdl.pc || instr !== prog[(mdl.pc >> 2) % IW]) begin
        failures++; $display("FAIL cyc=%0d pc=%h exp=%h", i, pc, mdl.pc);
      end
      checks++;
      if (dbg_rdata !== mdl.r[dbg_raddr]) begin
        failures++; $display("FAIL cyc=%0d r%0d=%h exp=%h", i, dbg_raddr, dbg_rdata, mdl.r[dbg_raddr]);
      end
      checks++;
      if (fsm_out !== (fsm_in && fsm_run == 2) || fsm_state !== 2'(fsm_run)) begin
        failures++; $display("FAIL cyc=%0d fsm out=%b state=%b run=%0d", i, fsm_out, fsm_state, fsm_run);
      end
      if (fsm_out) fsm_detect++;
      checks++;
      if ({ha_c, ha_s} !== 2'(ha_a) + 2'(ha_b)) begin failures++; $display("FAIL half adder"); end
      if (ha_c) ha_carries++;
      checks++;
      if (sum_s !== sum_model) begin failures++; $display("FAIL cyc=%0d S=%h exp=%h", i, sum_s, sum_model); end
      @(posedge clk);
      kinds[mdl.step(prog[(mdl.pc >> 2) % IW])]++;
      fsm_run = fsm_in ? ((fsm_run == 2) ? 0 : fsm_run + 1) : 0;
      wide = {1'b0, sum_model} + {1'b0, sum_x};
      if (wide[32]) sum_wraps++;
      sum_model = wide[31:0];
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
    // Hand-worked result: sum of (i+1)*0x1001 for i = 0..15 = 136 * 0x1001.
    dmem_dbg_addr = 30'(32'h300 >> 2); #1;
    checks++;
    if (dmem_dbg_data !== 32'd136 * 32'h1001) begin failures++; $display("FAIL result %h", dmem_dbg_data); end
    // Program must have reached its halt loop.
    checks++;
    if (pc !== 32'd29 * 4) begin failures++; $display("FAIL did not reach halt, pc=%h", pc); end

    $display("mechanisms:");
    count("addu", kinds[K_ADDU]);
    count("subu", kinds[K_SUBU]);
    count("ori", kinds[K_ORI]);
    count("lw", kinds[K_LW]);
    count("sw", kinds[K_SW]);
    count("beq taken", kinds[K_BEQ_TAKEN]);
    count("beq not taken", kinds[K_BEQ_NOT]);
    count("write to register 0", kinds[K_R0_WRITE]);
    count("three-ones detection", fsm_detect);
    count("summation wrap-around", sum_wraps);
    count("half-adder carry", ha_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
