// tb_regfile: random traffic on the 32 x 32 register file against a reference
// array: two combinational reads, one clocked write with enable, register 0
// reading as zero, and a read of the register being written returning the old
// value until the edge.
module tb_regfile;
  logic clk = 0, rst, we;
  logic [4:0] ra, rb, rw, rd_dbg;
  logic [31:0] busw, busa, busb, bus_dbg;
  logic [31:0] model [32];
  int checks = 0, failures = 0, cycles = 0;

  regfile dut (
    .clk(clk), .rst(rst), .we(we), .ra(ra), .rb(rb), .rw(rw), .busw(busw),
    .busa(busa), .busb(busb), .rd_dbg(rd_dbg), .bus_dbg(bus_dbg)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; rw = 0; busw = 0; rd_dbg = 0;
    @(posedge clk); #1;
    rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      ra = (i % 3 == 0) ? rw : 5'($urandom); rb = 5'($urandom); rd_dbg = 5'($urandom);
      #1;
      checks++;
      if (busa !== model[ra] || busb !== model[rb] || bus_dbg !== model[rd_dbg]) begin
        failures++;
        $display("FAIL ra=%0d busa=%h exp=%h rb=%0d busb=%h exp=%h", ra, busa, model[ra], rb, busb, model[rb]);
      end
      @(posedge clk);
      if (we && rw != 0) model[rw] = busw;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
