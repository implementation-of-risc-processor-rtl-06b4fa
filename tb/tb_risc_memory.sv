// Self-checking testbench of risc_memory: random writes and reads through the single port,
// compared with a model array; a write is seen by a read in the following cycle.
module tb_risc_memory;
  import risc_pkg::*;
  logic clk = 0, we = 0;
  maddr_t addr = '0;
  xword_t wdata = '0, rdata;
  xword_t model [MEM_WORDS];
  bit     known [MEM_WORDS];
  int checks = 0, failures = 0;

  risc_memory dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MEM_WORDS; i++) begin
      we = 1; addr = maddr_t'(i); wdata = $urandom; model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 4000; i++) begin
      we = $urandom_range(0, 1); addr = maddr_t'($urandom); wdata = $urandom;
      #1;
      if (!we) begin
        checks++;
        if (rdata !== model[addr]) failures++;
      end
      @(posedge clk);
      if (we) model[addr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
