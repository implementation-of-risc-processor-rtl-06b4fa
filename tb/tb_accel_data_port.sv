// Self-checking testbench of accel_data_port: host writes fill the storage, then random
// datapath stores, host writes and reads on both read ports are checked against a model,
// including the store-over-host priority.
module tb_accel_data_port;
  import accel_pkg::*;
  logic clk = 0, st_en = 0, host_we = 0;
  daddr_t ld_addr = '0, st_addr = '0, host_addr = '0;
  word_t st_data = '0, host_wdata = '0, ld_data, host_rdata;
  word_t model [DMEM_DEPTH];
  int checks = 0, failures = 0;

  accel_data_port dut (.clk, .ld_addr, .ld_data, .st_en, .st_addr, .st_data, .host_we,
                       .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DMEM_DEPTH; i++) begin
      host_we = 1; host_addr = daddr_t'(i); host_wdata = $urandom; model[i] = host_wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      st_en = $urandom_range(0, 1); st_addr = daddr_t'($urandom); st_data = $urandom;
      host_we = $urandom_range(0, 1); host_addr = (i % 5 == 0) ? st_addr : daddr_t'($urandom);
      host_wdata = $urandom;
      ld_addr = daddr_t'($urandom);
      #1;
      checks += 2;
      if (ld_data !== model[ld_addr]) failures++;
      if (host_rdata !== model[host_addr]) failures++;
      @(posedge clk);
      if (st_en) model[st_addr] = st_data;
      else if (host_we) model[host_addr] = host_wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
