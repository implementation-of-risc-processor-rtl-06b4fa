// Self-checking testbench of accel_register_bank: random multi-port writes (with colliding
// addresses) against a model that applies the ports in priority order; reset clears all.
module tb_accel_register_bank;
  import accel_pkg::*;
  localparam int NWP = NUM_FCU + 2;
  logic clk = 0, rst_n = 0;
  logic [NWP-1:0] we = '0;
  logic [NWP-1:0][REG_W-1:0] waddr = '0;
  cs_t [NWP-1:0] wdata = '0;
  cs_t rdata [NUM_REGS];
  cs_t model [NUM_REGS];
  int checks = 0, failures = 0;

  accel_register_bank dut (.clk, .rst_n, .we, .waddr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst_n = 1;
    for (int r = 0; r < NUM_REGS; r++) begin
      model[r] = '0;
      checks++;
      if (rdata[r] !== '0) failures++;
    end
    for (int i = 0; i < 1000; i++) begin
      for (int p = 0; p < NWP; p++) begin
        we[p] = ($urandom_range(0, 2)) == 0;
        waddr[p] = REG_W'($urandom_range(0, 3));       // few addresses: frequent collisions
        wdata[p] = '{c: $urandom, s: $urandom};
      end
      @(posedge clk); #1;
      for (int p = 0; p < NWP; p++) if (we[p]) model[waddr[p]] = wdata[p];
      for (int r = 0; r < NUM_REGS; r++) begin
        checks++;
        if (rdata[r] !== model[r]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
