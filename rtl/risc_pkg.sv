// Shared types and constants of the 32-bit load/store RISC processor.
//
// Instruction word (this design's encoding; the document fixes only the 32-bit width, the
// load/store style and the count of 16 instructions):
//   [31:28] opcode   [27:24] rd   [23:20] rs1   [19:16] rs2   [15:0] imm (signed)
// Register-register operations compute rd = rs1 op rs2 (NOT, INC and DEC use rs1 only,
// shifts and rotates take the amount from rs2[4:0]); LD rd, imm(rs1) and ST rs2, imm(rs1)
// address memory words at rs1 + imm. r0 reads as zero, so writing r0 is a no-operation and
// the all-zero word (ADD r0, r0, r0) is a NOP.
package risc_pkg;

  parameter int unsigned XLEN      = 32;    // data path width
  parameter int unsigned NUM_GPR   = 16;    // general purpose registers
  parameter int unsigned MEM_WORDS = 1024;  // words of the shared program/data memory

  parameter int unsigned GPR_W     = $clog2(NUM_GPR);
  parameter int unsigned MADDR_W   = $clog2(MEM_WORDS);

  typedef logic [XLEN-1:0]    xword_t;
  typedef logic [GPR_W-1:0]   gpr_t;
  typedef logic [MADDR_W-1:0] maddr_t;

  typedef enum logic [3:0] {
    OP_ADD  = 4'h0, OP_SUB  = 4'h1, OP_MUL  = 4'h2, OP_AND = 4'h3,
    OP_OR   = 4'h4, OP_XOR  = 4'h5, OP_NOT  = 4'h6, OP_NAND = 4'h7,
    OP_INC  = 4'h8, OP_DEC  = 4'h9, OP_SHL  = 4'hA, OP_SHR = 4'hB,
    OP_ROL  = 4'hC, OP_ROR  = 4'hD, OP_LD   = 4'hE, OP_ST  = 4'hF
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOT, ALU_NAND, ALU_INC, ALU_DEC
  } alu_op_e;

  typedef enum logic [1:0] {SH_SHL, SH_SHR, SH_ROL, SH_ROR} shift_op_e;

  // which unit's result the accumulator takes
  typedef enum logic [1:0] {RES_ALU, RES_SHIFT, RES_MUL} res_sel_e;

  typedef struct packed {
    logic [3:0]  op;
    gpr_t        rd;
    gpr_t        rs1;
    gpr_t        rs2;
    logic [15:0] imm;
  } instr_t;

  // decoded control signals of one instruction
  typedef struct packed {
    logic      valid;    // a real instruction, not a bubble
    alu_op_e   alu_op;
    shift_op_e sh_op;
    res_sel_e  res_sel;
    logic      use_imm;  // ALU operand b is the immediate (address calculation)
    logic      mem_rd;
    logic      mem_wr;
    logic      reg_we;
    logic      use_rs1;
    logic      use_rs2;
    gpr_t      rd;
    gpr_t      rs1;
    gpr_t      rs2;
    xword_t    imm;      // sign-extended immediate
  } ctrl_t;

endpackage
