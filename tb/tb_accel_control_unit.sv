// Self-checking testbench of accel_control_unit: programs kernels of several lengths with
// random control words, starts them and checks that each step appears on ctrl for exactly
// one cycle, in order, that busy lasts N cycles, that done pulses once right after and
// that ctrl is zero while idle.
module tb_accel_control_unit;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, busy, done;
  caddr_t prog_addr = '0;
  ctrl_word_t prog_data = '0, ctrl;
  ctrl_word_t prog [CTRL_DEPTH];
  int checks = 0, failures = 0;

  accel_control_unit dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .start, .busy,
                          .done, .ctrl);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_word_t rand_word();
    ctrl_word_t w;
    logic [$bits(ctrl_word_t)-1:0] bits;
    for (int b = 0; b < $bits(ctrl_word_t); b += 32) bits[b +: 32] = $urandom;
    w = ctrl_word_t'(bits);
    return w;
  endfunction

  initial begin
    @(posedge clk); #1 rst_n = 1;
    foreach (prog[n]) begin : run_len
      int len;
      len = (n % 8) + 1 + ((n == 0) ? CTRL_DEPTH - 1 : 0);
      if (n > 10) break;
      for (int s = 0; s < len; s++) begin
        prog[s] = rand_word();
        prog[s].last = (s == len - 1);
        prog_we = 1; prog_addr = caddr_t'(s); prog_data = prog[s];
        @(posedge clk); #1;
      end
      prog_we = 0;
      checks++;
      if (ctrl !== '0 || busy) failures++;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      for (int s = 0; s < len; s++) begin
        checks++;
        if (!busy || ctrl !== prog[s] || done) begin
          failures++;
          if (failures < 5) $display("len %0d step %0d wrong", len, s);
        end
        @(posedge clk); #1;
      end
      checks++;
      if (!done || busy || ctrl !== '0) failures++;
      @(posedge clk); #1;
      checks++;
      if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
