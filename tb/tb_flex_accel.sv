// Self-checking testbench of flex_accel, the whole accelerator.
//
// 1. Random kernels: random control words (all templates, add/subtract, chained FCU
//    operands, CStoBin write-back, loads, stores, colliding register writes), each kernel
//    ending with a dump of every register through CStoBin and the data port. After each run
//    the whole data storage is compared with the value-level reference model, and the run
//    must take exactly one cycle per control step (done one cycle after the last step).
// 2. FIR16: four outputs of a 16-tap FIR filter mapped on four chained FCUs, checked against
//    the direct sum of products and its step count (36 cycles per output).
// Fails if a template or mechanism was never exercised.
module tb_flex_accel;
  import accel_pkg::*;
  import accel_tb_pkg::*;

  logic clk = 0, rst_n = 0, prog_we = 0, host_we = 0, start = 0, busy, done;
  caddr_t prog_addr = '0;
  ctrl_word_t prog_data = '0;
  daddr_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  model_t m;
  ctrl_word_t prog [CTRL_DEPTH];

  flex_accel dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .host_we, .host_addr,
                  .host_wdata, .host_rdata, .start, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_data(int a, word_t v);
    host_we = 1; host_addr = daddr_t'(a); host_wdata = v;
    @(posedge clk); #1;
    host_we = 0;
    m.mem[a] = v;
  endtask

  // programs `len` steps, runs them and checks the cycle count
  task automatic run_kernel(int len);
    int cyc;
    for (int s = 0; s < len; s++) begin
      prog_we = 1; prog_addr = caddr_t'(s); prog_data = prog[s];
      @(posedge clk); #1;
    end
    prog_we = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(posedge clk); #1;
    end
    checks++;
    if (cyc != len) begin
      failures++;
      $display("kernel of %0d steps ran %0d cycles", len, cyc);
    end
  endtask

  task automatic compare_memory(string what);
    for (int a = 0; a < DMEM_DEPTH; a++) begin
      host_addr = daddr_t'(a);
      #1;
      checks++;
      if (host_rdata !== m.mem[a]) begin
        failures++;
        if (failures < 6) $display("%s: mem[%0d] = %h, model %h", what, a, host_rdata, m.mem[a]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < NUM_REGS; r++) begin m.val[r] = '0; m.bin[r] = 1; end
    @(posedge clk); #1 rst_n = 1;
    for (int a = 0; a < DMEM_DEPTH; a++) write_data(a, (a % 5 == 0) ? word_t'($urandom_range(0, 15)) : $urandom);

    // ---------- 1: random kernels ----------
    for (int t = 0; t < 25; t++) begin
      int len;
      len = $urandom_range(1, CTRL_DEPTH - NUM_REGS);
      for (int s = 0; s < len; s++) begin
        prog[s] = rand_word(m);
        step(m, prog[s]);
      end
      for (int r = 1; r < NUM_REGS; r++) begin
        prog[len] = store_reg(r, 240 + r - 1);
        step(m, prog[len]);
        len++;
      end
      prog[len-1].last = 1;
      run_kernel(len);
      compare_memory($sformatf("random kernel %0d", t));
    end

    // ---------- 2: FIR16 ----------
    begin
      int len;
      word_t y;
      word_t yv [4];
      for (int k = 0; k < 16; k++) write_data(H_BASE + k, word_t'($signed(($urandom_range(0, 2000)) - 1000)));
      for (int k = 0; k < 19; k++) write_data(X_BASE + k, word_t'($signed(($urandom_range(0, 65535)) - 32768)));
      for (int n = 0; n < 4; n++) begin
        yv[n] = '0;
        for (int k = 0; k < 16; k++) yv[n] += m.mem[H_BASE + k] * m.mem[X_BASE + n + k];
      end
      len = fir16_kernel(prog, 4);
      for (int s = 0; s < len; s++) step(m, prog[s]);
      run_kernel(len);
      checks++;
      if (len != 4 * 36) failures++;
      for (int n = 0; n < 4; n++) begin
        host_addr = daddr_t'(Y_BASE + n);
        #1;
        checks++;
        if (host_rdata !== yv[n]) begin
          failures++;
          $display("FIR16 y[%0d]: got %0d expected %0d", n, $signed(host_rdata), $signed(yv[n]));
        end
      end
      compare_memory("FIR16");
    end

    $display("templates T1..T5 = %0d %0d %0d %0d %0d, subtract %0d, chained %0d",
             n_tmpl[0], n_tmpl[1], n_tmpl[2], n_tmpl[3], n_tmpl[4], n_sub, n_chain);
    $display("CStoBin write-back %0d, stores %0d, loads %0d, write collisions %0d",
             n_cb_wb, n_store, n_load, n_collide);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_tmpl[i] == 0) failures++;
    end
    checks += 6;
    if (n_sub == 0) failures++;
    if (n_chain == 0) failures++;
    if (n_cb_wb == 0) failures++;
    if (n_store == 0) failures++;
    if (n_load == 0) failures++;
    if (n_collide == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
