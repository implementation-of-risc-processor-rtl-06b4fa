// Self-checking testbench of risc_control_unit: each of the 16 opcodes with random register
// fields is loaded into the instruction register and the decoded control is compared with
// the expected unit, operation and flags; hold and bubble are checked too.
module tb_risc_control_unit;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, hold = 0, bubble = 0;
  xword_t fw = '0;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  risc_control_unit dut (.clk, .rst_n, .en, .hold, .bubble, .fetch_word(fw), .ctrl);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(logic got, logic exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 8) $display("%s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    expect_bit(ctrl.valid, 0, "reset bubble");
    rst_n = 1;
    for (int i = 0; i < 320; i++) begin
      instr_t ins;
      opcode_e op;
      ins = instr_t'($urandom);
      ins.op = 4'(i % 16);
      op = opcode_e'(ins.op);
      fw = ins;
      @(posedge clk); #1;
      expect_bit(ctrl.valid, 1, "valid");
      checks++;
      if (ctrl.rd !== ins.rd || ctrl.rs1 !== ins.rs1 || ctrl.rs2 !== ins.rs2 ||
          ctrl.imm !== {{16{ins.imm[15]}}, ins.imm}) failures++;
      expect_bit(ctrl.mem_rd, op == OP_LD, "mem_rd");
      expect_bit(ctrl.mem_wr, op == OP_ST, "mem_wr");
      expect_bit(ctrl.reg_we, op != OP_ST, "reg_we");
      expect_bit(ctrl.use_imm, op inside {OP_LD, OP_ST}, "use_imm");
      expect_bit(ctrl.res_sel == RES_MUL, op == OP_MUL, "mul sel");
      expect_bit(ctrl.res_sel == RES_SHIFT, op inside {OP_SHL, OP_SHR, OP_ROL, OP_ROR}, "sh sel");
      checks++;
      case (op)
        OP_ADD, OP_LD, OP_ST: if (ctrl.alu_op !== ALU_ADD) failures++;
        OP_SUB:  if (ctrl.alu_op !== ALU_SUB)  failures++;
        OP_AND:  if (ctrl.alu_op !== ALU_AND)  failures++;
        OP_OR:   if (ctrl.alu_op !== ALU_OR)   failures++;
        OP_XOR:  if (ctrl.alu_op !== ALU_XOR)  failures++;
        OP_NOT:  if (ctrl.alu_op !== ALU_NOT)  failures++;
        OP_NAND: if (ctrl.alu_op !== ALU_NAND) failures++;
        OP_INC:  if (ctrl.alu_op !== ALU_INC)  failures++;
        OP_DEC:  if (ctrl.alu_op !== ALU_DEC)  failures++;
        OP_SHL:  if (ctrl.sh_op !== SH_SHL) failures++;
        OP_SHR:  if (ctrl.sh_op !== SH_SHR) failures++;
        OP_ROL:  if (ctrl.sh_op !== SH_ROL) failures++;
        OP_ROR:  if (ctrl.sh_op !== SH_ROR) failures++;
        default: ;
      endcase
      // hold keeps the word
      hold = 1; fw = ~fw;
      @(posedge clk); #1;
      checks++;
      if (ctrl.rd !== ins.rd || ctrl.rs1 !== ins.rs1) failures++;
      hold = 0;
    end
    bubble = 1;
    @(posedge clk); #1;
    expect_bit(ctrl.valid, 0, "bubble");
    expect_bit(ctrl.reg_we, 0, "bubble reg_we");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
