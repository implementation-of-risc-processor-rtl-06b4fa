// Control unit of the RISC processor: instruction register and instruction decoder.
//
// The instruction register (the IF/ID pipeline register) takes the fetched word on every
// enabled clock edge; `hold` keeps its content (load-use stall) and `bubble` loads a NOP (a
// fetch lost to a data access on the shared memory bus). The decoder turns the held word
// into ctrl_t: which unit executes it (ALU, barrel shifter, Booth multiplier), the ALU or
// shift operation, memory read/write, register write and the registers it reads.
// Reset, synchronous and active low, loads a bubble. The encoding is this design's (see risc_pkg); the document fixes 16
// instructions covering arithmetic, logic, shift, rotate, increment/decrement and load/store.
module risc_control_unit
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    hold,
  input  logic    bubble,
  input  xword_t  fetch_word,
  output ctrl_t   ctrl
);
  instr_t ir;
  logic   ir_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir       <= '0;
      ir_valid <= 1'b0;
    end else if (en && !hold) begin
      ir       <= bubble ? '0 : instr_t'(fetch_word);
      ir_valid <= !bubble;
    end
  end

  always_comb begin
    ctrl         = '0;
    ctrl.valid   = ir_valid;
    ctrl.rd      = ir.rd;
    ctrl.rs1     = ir.rs1;
    ctrl.rs2     = ir.rs2;
    ctrl.imm     = {{(XLEN-16){ir.imm[15]}}, ir.imm};
    ctrl.res_sel = RES_ALU;
    ctrl.alu_op  = ALU_ADD;
    ctrl.sh_op   = SH_SHL;
    ctrl.use_rs1 = 1'b1;
    ctrl.use_rs2 = 1'b1;
    ctrl.reg_we  = ir_valid;
    unique case (opcode_e'(ir.op))
      OP_ADD:  ctrl.alu_op = ALU_ADD;
      OP_SUB:  ctrl.alu_op = ALU_SUB;
      OP_AND:  ctrl.alu_op = ALU_AND;
      OP_OR:   ctrl.alu_op = ALU_OR;
      OP_XOR:  ctrl.alu_op = ALU_XOR;
      OP_NAND: ctrl.alu_op = ALU_NAND;
      OP_NOT:  begin ctrl.alu_op = ALU_NOT; ctrl.use_rs2 = 1'b0; end
      OP_INC:  begin ctrl.alu_op = ALU_INC; ctrl.use_rs2 = 1'b0; end
      OP_DEC:  begin ctrl.alu_op = ALU_DEC; ctrl.use_rs2 = 1'b0; end
      OP_MUL:  ctrl.res_sel = RES_MUL;
      OP_SHL:  begin ctrl.res_sel = RES_SHIFT; ctrl.sh_op = SH_SHL; end
      OP_SHR:  begin ctrl.res_sel = RES_SHIFT; ctrl.sh_op = SH_SHR; end
      OP_ROL:  begin ctrl.res_sel = RES_SHIFT; ctrl.sh_op = SH_ROL; end
      OP_ROR:  begin ctrl.res_sel = RES_SHIFT; ctrl.sh_op = SH_ROR; end
      OP_LD:   begin
        ctrl.use_imm = 1'b1; ctrl.mem_rd = ir_valid; ctrl.use_rs2 = 1'b0;
      end
      OP_ST:   begin
        ctrl.use_imm = 1'b1; ctrl.mem_wr = ir_valid; ctrl.reg_we = 1'b0;
      end
      default: ;
    endcase
  end
endmodule
