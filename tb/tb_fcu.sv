// Self-checking testbench of the FCU: every template T1..T5 with every add/subtract choice,
// random carry-save operands, compared with Eq. (1)/(2) worked out in integer arithmetic
// modulo 2^32. Counts how often each template was exercised.
module tb_fcu;
  import accel_pkg::*;
  fcu_cfg_t cfg;
  cs_t x, y, k, w;
  word_t a;
  int checks = 0, failures = 0;
  int tcount [5];

  fcu dut (.cfg(cfg), .x(x), .y(y), .k(k), .a(a), .w(w));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      word_t xv, yv, kv, nv, exp_v;
      int t;
      t = i % 5;
      x = '{c: $urandom, s: $urandom};
      y = '{c: $urandom, s: $urandom};
      k = '{c: $urandom, s: $urandom};
      a = (i % 3 == 0) ? word_t'($signed(($urandom_range(0, 63)) - 32)) : $urandom;
      cfg = '0;
      cfg.cl0 = $urandom_range(0, 1);
      cfg.cl3 = $urandom_range(0, 1);
      xv = x.c + x.s; yv = y.c + y.s; kv = k.c + k.s;
      nv = cfg.cl0 ? xv - yv : xv + yv;
      case (t)
        0: exp_v = a * nv + (cfg.cl3 ? -kv : kv);                              // T1
        1: begin cfg.cl1 = 1; cfg.cl2 = 1; exp_v = a * kv + (cfg.cl3 ? -nv : nv); end // T2
        2: begin cfg.unit_mul = 1; exp_v = nv + (cfg.cl3 ? -kv : kv); end          // T3
        3: begin cfg.zero_add = 1; exp_v = a * nv; end                             // T4
        default: begin cfg.cl1 = 1; cfg.zero_add = 1; exp_v = a * kv; end          // T5
      endcase
      #1;
      checks++;
      tcount[t]++;
      if (w.c + w.s !== exp_v) begin
        failures++;
        if (failures < 5) $display("T%0d mismatch: got %h exp %h", t + 1, w.c + w.s, exp_v);
      end
    end
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (tcount[t] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
