// tb_ifu: the program counter advances by 4 each cycle, or to
// PC + 4 + (sign_ext(imm16) << 2) when nPC_sel = 1, and resets to 0.
module tb_ifu;
  logic clk = 0, rst, npc_sel;
  logic [15:0] imm16;
  logic [31:0] pc, model;
  int checks = 0, failures = 0, cycles = 0, taken = 0;

  ifu dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .imm16(imm16), .pc(pc));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; imm16 = 0;
    @(posedge clk); #1;
    model = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      npc_sel = ($urandom % 4 == 0); imm16 = 16'($urandom);
      @(posedge clk);
      if (npc_sel) begin
        model = model + 4 + {{14{imm16[15]}}, imm16, 2'b00};
        taken++;
      end else model = model + 4;
      #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL i=%0d pc=%h exp=%h", i, pc, model); end
    end
    checks++; if (taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
