// Self-checking testbench of accel_src_mux: every select value, including indices beyond
// the source count (which must give zero), on random source contents.
module tb_accel_src_mux;
  import accel_pkg::*;
  cs_t src [NUM_SRC];
  logic [SRC_W-1:0] sel;
  cs_t y;
  int checks = 0, failures = 0;

  accel_src_mux dut (.src(src), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      for (int s = 0; s < NUM_SRC; s++) src[s] = '{c: $urandom, s: $urandom};
      for (int s = 0; s < (1 << SRC_W); s++) begin
        sel = SRC_W'(s);
        #1;
        checks++;
        if (y !== ((s < NUM_SRC) ? src[s] : cs_t'('0))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
