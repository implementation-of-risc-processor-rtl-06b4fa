// Self-checking testbench of risc_register_file: random writes and reads against a model
// array, checking r0 = 0, write-through on a same-cycle read and reset clearing.
module tb_risc_register_file;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  gpr_t ra1 = '0, ra2 = '0, wa = '0;
  xword_t rd1, rd2, wd = '0;
  xword_t model [NUM_GPR];
  int checks = 0, failures = 0;

  risc_register_file dut (.clk, .rst_n, .raddr1(ra1), .rdata1(rd1), .raddr2(ra2),
                          .rdata2(rd2), .we, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NUM_GPR; r++) model[r] = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      xword_t e1, e2;
      we = $urandom_range(0, 1); wa = gpr_t'($urandom); wd = $urandom;
      ra1 = gpr_t'($urandom); ra2 = (i % 4 == 0) ? wa : gpr_t'($urandom);
      #1;
      e1 = (ra1 == 0) ? '0 : ((we && wa == ra1) ? wd : model[ra1]);
      e2 = (ra2 == 0) ? '0 : ((we && wa == ra2) ? wd : model[ra2]);
      checks += 2;
      if (rd1 !== e1) failures++;
      if (rd2 !== e2) failures++;
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    we = 0; rst_n = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < NUM_GPR; r++) begin
      ra1 = gpr_t'(r); #1;
      checks++;
      if (rd1 !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
