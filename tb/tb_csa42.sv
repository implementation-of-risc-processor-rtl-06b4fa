// Self-checking testbench of csa42: random carry-save operands, both addition (cin=0, Y* as
// is) and subtraction (cin=1, Y* 1's-complemented as MUX0 does), compared with plain
// integer arithmetic modulo 2^32.
module tb_csa42;
  import accel_pkg::*;
  cs_t x, y, n;
  logic cin;
  int checks = 0, failures = 0;
  word_t exp_v;

  csa42 dut (.x(x), .y(y), .cin(cin), .n(n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      cs_t yy;
      x = '{c: $urandom, s: $urandom};
      yy = '{c: $urandom, s: $urandom};
      if (i < 4) begin x = '0; yy = (i == 1) ? cs_t'{c: '1, s: '1} : '0; end
      cin = i[0];
      y = cin ? cs_t'{c: ~yy.c, s: ~yy.s} : yy;
      #1;
      exp_v = cin ? (x.c + x.s) - (yy.c + yy.s) : (x.c + x.s) + (yy.c + yy.s);
      checks++;
      if (n.c + n.s !== exp_v) begin
        failures++;
        if (failures < 5) $display("mismatch: cin=%0d got %h exp %h", cin, n.c + n.s, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
