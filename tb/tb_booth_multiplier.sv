// Self-checking testbench of booth_multiplier: signed 32x32 products of random and corner
// operands compared with the 64-bit signed product computed by the simulator.
module tb_booth_multiplier;
  import risc_pkg::*;
  xword_t a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;

  booth_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xword_t corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'haaaa_aaaa};
    for (int i = 0; i < 3000; i++) begin
      logic signed [63:0] e;
      a = $urandom; b = $urandom;
      if (i < 36) begin a = corner[i % 6]; b = corner[i / 6]; end
      #1;
      e = $signed(a) * $signed(b);
      checks++;
      if (p !== e) begin
        failures++;
        if (failures < 5) $display("a=%h b=%h got %h exp %h", a, b, p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
