// Arithmetic logic unit of the RISC processor.
//
// 32-bit add, subtract, increment, decrement and the logic gates AND, OR, XOR, NOT (of a) and
// NAND, chosen by `op`. Addition also serves the load/store address calculation. Besides the
// result it flags a zero result, the carry out of add/increment (borrow-free for subtract)
// and signed overflow. Combinational. The operation set follows the document (arithmetic,
// increment/decrement, basic logic gates); the flags are this design's addition.
module risc_alu
  import risc_pkg::*;
(
  input  alu_op_e op,
  input  xword_t  a,
  input  xword_t  b,
  output xword_t  y,
  output logic    zero,
  output logic    carry,
  output logic    overflow
);
  logic [XLEN:0] sum;
  xword_t        bb;

  always_comb begin
    bb = '0;
    sum = '0;
    unique case (op)
      ALU_ADD:  bb = b;
      ALU_SUB:  bb = ~b;
      ALU_INC:  bb = xword_t'(1);
      ALU_DEC:  bb = '1;
      default:  bb = b;
    endcase
    sum = {1'b0, a} + {1'b0, bb} + {{XLEN{1'b0}}, (op == ALU_SUB)};
    unique case (op)
      ALU_ADD, ALU_SUB, ALU_INC, ALU_DEC: y = sum[XLEN-1:0];
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOT:  y = ~a;
      ALU_NAND: y = ~(a & b);
      default:  y = '0;
    endcase
    zero     = (y == '0);
    carry    = sum[XLEN] && (op inside {ALU_ADD, ALU_SUB, ALU_INC, ALU_DEC});
    overflow = (a[XLEN-1] == bb[XLEN-1]) && (sum[XLEN-1] != a[XLEN-1]) &&
               (op inside {ALU_ADD, ALU_SUB, ALU_INC, ALU_DEC});
  end
endmodule
