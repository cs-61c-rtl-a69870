// mips_asm_pkg: test support for the MIPS-lite processor.
//
// Instruction encoders for the six-instruction subset (standard MIPS
// encodings) and an instruction-level reference model, written independently
// of the RTL, that keeps its own registers, data memory and PC. Testbenches
// step the model once per clock and compare the processor against it.
package mips_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [4:0] rd, rs, rt, input logic [5:0] fn);
    return {6'h00, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input logic [4:0] rt, rs,
                                        input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] addu(input logic [4:0] rd, rs, rt); return enc_r(rd, rs, rt, 6'h21); endfunction
  function automatic logic [31:0] subu(input logic [4:0] rd, rs, rt); return enc_r(rd, rs, rt, 6'h23); endfunction
  function automatic logic [31:0] ori (input logic [4:0] rt, rs, input logic [15:0] imm); return enc_i(6'h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] lw  (input logic [4:0] rt, rs, input logic [15:0] imm); return enc_i(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] sw  (input logic [4:0] rt, rs, input logic [15:0] imm); return enc_i(6'h2B, rt, rs, imm); endfunction
  function automatic logic [31:0] beq (input logic [4:0] rs, rt, input logic [15:0] imm); return enc_i(6'h04, rt, rs, imm); endfunction

  typedef enum int {K_ADDU, K_SUBU, K_ORI, K_LW, K_SW, K_BEQ_TAKEN, K_BEQ_NOT, K_R0_WRITE, K_OTHER, K_NUM} kind_e;

  // Instruction-level model: executes one instruction per call of step().
  class mips_model;
    logic [31:0] r [32];
    logic [31:0] m [];
    logic [31:0] pc;
    int unsigned words;

    function new(int unsigned dmem_words);
      words = dmem_words;
      m = new[dmem_words];
      foreach (m[i]) m[i] = '0;
      reset();
    endfunction

    // Processor reset: registers and PC cleared, data memory kept.
    function void reset();
      foreach (r[i]) r[i] = '0;
      pc = '0;
    endfunction

    function automatic int unsigned widx(logic [31:0] a);
      return (a >> 2) % words;
    endfunction

    // Returns what kind of instruction was executed.
    function kind_e step(logic [31:0] ins);
      logic [5:0]  op = ins[31:26];
      logic [4:0]  rs = ins[25:21], rt = ins[20:16], rd = ins[15:11];
      logic [15:0] imm = ins[15:0];
      logic [31:0] se = {{16{imm[15]}}, imm};
      logic [31:0] ze = {16'h0, imm};
      logic [31:0] npc = pc + 32'd4;
      kind_e k = K_OTHER;
      logic [4:0]  wr = 5'd0;
      logic        we = 1'b0;
      logic [31:0] wv = '0;
      case (op)
        6'h00: begin
          if (ins[5:0] == 6'h21) begin k = K_ADDU; we = 1; wr = rd; wv = r[rs] + r[rt]; end
          if (ins[5:0] == 6'h23) begin k = K_SUBU; we = 1; wr = rd; wv = r[rs] - r[rt]; end
        end
        6'h0D: begin k = K_ORI; we = 1; wr = rt; wv = r[rs] | ze; end
        6'h23: begin k = K_LW;  we = 1; wr = rt; wv = m[widx(r[rs] + se)]; end
        6'h2B: begin k = K_SW;  m[widx(r[rs] + se)] = r[rt]; end
        6'h04: begin
          if (r[rs] == r[rt]) begin k = K_BEQ_TAKEN; npc = npc + (se << 2); end
          else k = K_BEQ_NOT;
        end
        default: ;
      endcase
      if (we && wr != 0) r[wr] = wv;
      if (we && wr == 0) k = K_R0_WRITE;
      pc = npc;
      return k;
    endfunction
  endclass

endpackage
