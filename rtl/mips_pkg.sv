// mips_pkg: shared types and constants of the MIPS-lite single-cycle processor.
//
// Holds the instruction field layout (op/rs/rt/rd/shamt/funct, or op/rs/rt/imm16),
// the ALU operation codes and the bundle of control signals that the control
// unit hands to the datapath. The field positions and the control signal names
// follow the MIPS-lite description; the numeric opcode and funct values are the
// standard MIPS ones, which this design adopts because the description prints none.
package mips_pkg;

  // ALU operation select S / ALUctr of the simple four-function ALU.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_AND = 2'b10,
    ALU_OR  = 2'b11
  } alu_op_e;

  // Primary opcodes (instruction bits 31:26).
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;
  localparam logic [5:0] OP_BEQ   = 6'h04;

  // funct codes of R-type instructions (instruction bits 5:0).
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUBU  = 6'h23;

  // R-format: op rs rt rd shamt funct.
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  // I-format: op rs rt immediate.
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm16;
  } itype_t;

  // Control points of the datapath.
  typedef struct packed {
    logic    reg_dst;    // 0: write rt, 1: write rd
    logic    alu_src;    // 0: busB, 1: extended immediate
    logic    mem_to_reg; // 0: ALU result, 1: data memory
    logic    reg_wr;     // write the register file
    logic    mem_wr;     // write the data memory
    logic    branch;     // beq: take the branch when the ALU result is zero
    logic    ext_op;     // 0: zero extend, 1: sign extend
    alu_op_e alu_ctr;    // ALU operation
  } ctrl_t;

endpackage
