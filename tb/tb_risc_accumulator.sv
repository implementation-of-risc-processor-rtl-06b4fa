// Self-checking testbench of risc_accumulator: random unit results and selects, the
// register must show the selected value one clock later, hold while en is low, reset to 0.
module tb_risc_accumulator;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  res_sel_e sel = RES_ALU;
  xword_t ay = '0, sy = '0, my = '0, acc;
  int checks = 0, failures = 0;

  risc_accumulator dut (.clk, .rst_n, .en, .sel, .alu_y(ay), .shift_y(sy), .mul_y(my), .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xword_t e = '0;
    @(posedge clk); #1;
    checks++;
    if (acc !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      en = ($urandom_range(0, 3)) != 0;
      sel = res_sel_e'($urandom_range(0, 2));
      ay = $urandom; sy = $urandom; my = $urandom;
      if (en) e = (sel == RES_ALU) ? ay : (sel == RES_SHIFT) ? sy : my;
      @(posedge clk); #1;
      checks++;
      if (acc !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
