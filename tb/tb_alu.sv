// tb_alu: checks the four ALU operations (ADD, SUB, AND, OR) and the zero flag
// on random operands and on equal operands, against arithmetic done here.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, r, exp;
  alu_op_e s;
  logic zero;
  int checks = 0, failures = 0;
  int seen_zero = 0;

  alu dut (.a(a), .b(b), .s(s), .r(r), .zero(zero));

  task automatic check();
    case (s)
      ALU_ADD: exp = a + b;
      ALU_SUB: exp = a - b;
      ALU_AND: exp = a & b;
      default: exp = a | b;
    endcase
    #1;
    checks++;
    if (r !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL s=%0d a=%h b=%h r=%h z=%b exp=%h", s, a, b, r, zero, exp);
    end
    if (zero) seen_zero++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = (i % 5 == 0) ? a : $urandom; s = alu_op_e'(i % 4);
      check();
    end
    a = 32'h0; b = 32'h0; s = ALU_OR; check();
    a = 32'h0F0F_0000; b = 32'h00F0_F0F0; s = ALU_AND; check();
    checks++;
    if (seen_zero == 0) begin failures++; $display("FAIL zero flag never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
