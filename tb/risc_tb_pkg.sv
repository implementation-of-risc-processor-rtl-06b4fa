// Testbench helpers for the RISC processor: an instruction encoder, a random program
// generator and an instruction-level reference model that executes a program one
// instruction at a time on its own register and memory arrays.
package risc_tb_pkg;
  import risc_pkg::*;

  localparam int DATA_BASE = 512;   // data area used by the generated programs
  localparam int DATA_SIZE = 256;
  localparam int RES_BASE  = 800;   // where programs store their final registers

  function automatic xword_t enc(opcode_e op, int rd, int rs1, int rs2, int imm);
    instr_t i;
    i.op  = op;
    i.rd  = gpr_t'(rd);
    i.rs1 = gpr_t'(rs1);
    i.rs2 = gpr_t'(rs2);
    i.imm = 16'(imm);
    return xword_t'(i);
  endfunction

  // Executes the instruction at address pc on the model state.
  function automatic void iss_step(ref xword_t mem [MEM_WORDS], ref xword_t r [NUM_GPR],
                                   input int pc);
    instr_t i;
    xword_t a, b, y, addr;
    logic [63:0] p;
    i = instr_t'(mem[pc]);
    a = r[i.rs1];
    b = r[i.rs2];
    addr = a + {{16{i.imm[15]}}, i.imm};
    p = $signed(a) * $signed(b);
    case (opcode_e'(i.op))
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = p[31:0];
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_NOT:  y = ~a;
      OP_NAND: y = ~(a & b);
      OP_INC:  y = a + 1;
      OP_DEC:  y = a - 1;
      OP_SHL:  y = a << b[4:0];
      OP_SHR:  y = a >> b[4:0];
      OP_ROL:  y = (b[4:0] == 0) ? a : (a << b[4:0]) | (a >> (6'd32 - b[4:0]));
      OP_ROR:  y = (b[4:0] == 0) ? a : (a >> b[4:0]) | (a << (6'd32 - b[4:0]));
      OP_LD:   y = mem[addr[MADDR_W-1:0]];
      default: y = '0;
    endcase
    if (opcode_e'(i.op) == OP_ST) mem[addr[MADDR_W-1:0]] = b;
    else if (i.rd != 0) r[i.rd] = y;
  endfunction

  // Fills mem with a program of n random instructions from address 0: registers are first
  // loaded from the data area, then random operations (all 16 opcodes, loads and stores
  // inside the data area) run, and finally every register is stored at RES_BASE.
  // Returns the number of instructions written.
  function automatic int gen_program(ref xword_t mem [MEM_WORDS], input int n);
    int pc = 0;
    for (int d = 0; d < DATA_SIZE; d++) mem[DATA_BASE + d] = $urandom;
    for (int k = 1; k < NUM_GPR; k++) mem[pc++] = enc(OP_LD, k, 0, 0, DATA_BASE + k);
    for (int k = 0; k < n; k++) begin
      opcode_e op;
      int rd, rs1, rs2;
      op  = opcode_e'($urandom_range(0, 15));
      rd  = $urandom_range(1, NUM_GPR - 1);
      rs1 = $urandom_range(0, NUM_GPR - 1);
      rs2 = $urandom_range(0, NUM_GPR - 1);
      // favour back-to-back dependences so that forwarding and stalls happen often
      if ($urandom_range(0, 1)) rs1 = int'(mem[pc-1][27:24]);   // rd of the previous instruction
      if (op == OP_LD || op == OP_ST) mem[pc++] = enc(op, rd, 0, rs2, $urandom_range(DATA_BASE, DATA_BASE + DATA_SIZE - 1));
      else                            mem[pc++] = enc(op, rd, rs1, rs2, $urandom);
    end
    for (int k = 1; k < NUM_GPR; k++) mem[pc++] = enc(OP_ST, 0, 0, k, RES_BASE + k);
    return pc;
  endfunction
endpackage
