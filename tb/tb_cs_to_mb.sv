// Self-checking testbench of cs_to_mb: for random and corner carry-save words it checks that
// every digit is a legal Modified Booth digit and that sum(e_j * 4^j) equals c + s modulo 2^32.
module tb_cs_to_mb;
  import accel_pkg::*;
  word_t pc, ps;
  mb_digit_t [WIDTH/2-1:0] digit;
  int checks = 0, failures = 0;

  cs_to_mb dut (.pc(pc), .ps(ps), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      word_t val;
      bit legal;
      pc = $urandom; ps = $urandom;
      case (i)
        0: begin pc = '0; ps = '0; end
        1: begin pc = '1; ps = '1; end
        2: begin pc = '1; ps = 32'd1; end
        3: begin pc = 32'haaaa_aaaa; ps = 32'h5555_5555; end
        4: begin pc = 32'h8000_0000; ps = 32'h8000_0000; end
        default: ;
      endcase
      #1;
      val = '0;
      legal = 1;
      for (int j = 0; j < WIDTH / 2; j++) begin
        int e;
        e = digit[j].two ? 2 : (digit[j].one ? 1 : 0);
        if (digit[j].one && digit[j].two) legal = 0;
        if (digit[j].neg && e == 0) legal = 0;
        if (digit[j].neg) e = -e;
        val = val + (word_t'(e) << (2 * j));
      end
      checks++;
      if (!legal || val !== pc + ps) begin
        failures++;
        if (failures < 5) $display("mismatch: %h+%h -> %h legal=%0d", pc, ps, val, legal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
