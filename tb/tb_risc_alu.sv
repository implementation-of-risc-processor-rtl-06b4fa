// Self-checking testbench of risc_alu: every operation on random and corner operands,
// compared with the operation written directly in SystemVerilog, plus the zero flag.
module tb_risc_alu;
  import risc_pkg::*;
  alu_op_e op;
  xword_t a, b, y;
  logic zero, carry, overflow;
  int checks = 0, failures = 0;

  risc_alu dut (.op(op), .a(a), .b(b), .y(y), .zero(zero), .carry(carry), .overflow(overflow));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      xword_t e;
      logic [XLEN:0] wide;
      op = alu_op_e'(i % 9);
      a = $urandom; b = $urandom;
      if (i < 18) begin a = (i < 9) ? '1 : 32'h7fff_ffff; b = 32'd1; end
      #1;
      case (op)
        ALU_ADD:  e = a + b;
        ALU_SUB:  e = a - b;
        ALU_AND:  e = a & b;
        ALU_OR:   e = a | b;
        ALU_XOR:  e = a ^ b;
        ALU_NOT:  e = ~a;
        ALU_NAND: e = ~(a & b);
        ALU_INC:  e = a + 1;
        default:  e = a - 1;
      endcase
      checks += 2;
      if (y !== e) begin
        failures++;
        if (failures < 5) $display("op %s a=%h b=%h got %h exp %h", op.name(), a, b, y, e);
      end
      if (zero !== (e == 0)) failures++;
      if (op == ALU_ADD) begin
        wide = {1'b0, a} + {1'b0, b};
        checks += 2;
        if (carry !== wide[XLEN]) failures++;
        if (overflow !== ((a[31] == b[31]) && (e[31] != a[31]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
