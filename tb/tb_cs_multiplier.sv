// Self-checking testbench of cs_multiplier: W* = A x P* + Q* (or - Q* with Q* complemented
// and q_cin2 set), random signed operands and corners, against integer arithmetic mod 2^32.
module tb_cs_multiplier;
  import accel_pkg::*;
  word_t a;
  cs_t p, q, w;
  logic q_cin2;
  int checks = 0, failures = 0;

  cs_multiplier dut (.a(a), .p(p), .q(q), .q_cin2(q_cin2), .w(w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      cs_t qq;
      word_t exp_v;
      a = $urandom;
      p = '{c: $urandom, s: $urandom};
      qq = '{c: $urandom, s: $urandom};
      if (i % 7 == 0) a = word_t'($signed(($urandom_range(0, 199)) - 100));
      if (i == 1) a = 32'h8000_0000;
      if (i == 2) begin a = '1; p = '{c: '1, s: '1}; end
      q_cin2 = i[0];
      q = q_cin2 ? cs_t'{c: ~qq.c, s: ~qq.s} : qq;
      #1;
      exp_v = a * (p.c + p.s) + (q_cin2 ? -(qq.c + qq.s) : (qq.c + qq.s));
      checks++;
      if (w.c + w.s !== exp_v) begin
        failures++;
        if (failures < 5) $display("mismatch: got %h exp %h", w.c + w.s, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
