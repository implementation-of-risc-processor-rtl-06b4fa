// Self-checking testbench of barrel_shifter: all four modes with every amount 0..31 on
// random words, against shift operators and a rotate built from two shifts.
module tb_barrel_shifter;
  import risc_pkg::*;
  shift_op_e op;
  xword_t a, y;
  logic [4:0] amt;
  int checks = 0, failures = 0;

  barrel_shifter dut (.op(op), .a(a), .amt(amt), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      xword_t e;
      op = shift_op_e'(i % 4);
      amt = 5'((i / 4) % 32);
      a = $urandom;
      #1;
      case (op)
        SH_SHL:  e = a << amt;
        SH_SHR:  e = a >> amt;
        SH_ROL:  e = (amt == 0) ? a : ((a << amt) | (a >> (32 - amt)));
        default: e = (amt == 0) ? a : ((a >> amt) | (a << (32 - amt)));
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 5) $display("op %0d amt %0d a=%h got %h exp %h", op, amt, a, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
