// End-to-end testbench of dsp_risc_top at its default sizes.
//
// The accelerator and the processor run at the same time. The accelerator runs random
// kernels and one FIR16 output, each compared word by word with the accelerator reference
// model; the processor runs random programs compared with the instruction-level model.
// Counted and required at least once: templates T1..T5, add/subtract, inter-FCU chaining,
// CStoBin write-back, loads, stores and register-write collisions in the accelerator;
// EX/MEM and MEM/WB forwarding, load-use stalls and memory-port stalls in the processor.
// Cycle counts: one cycle per control step in the accelerator, and one retired instruction
// per cycle for a dependence-free processor program.
module tb_dsp_risc_top;
  import accel_pkg::*;
  import accel_tb_pkg::*;
  import risc_pkg::*;
  import risc_tb_pkg::*;

  logic clk = 0, acc_rst_n = 0, cpu_rst_n = 0;
  logic acc_prog_we = 0, acc_host_we = 0, acc_start = 0, acc_busy, acc_done;
  caddr_t acc_prog_addr = '0;
  ctrl_word_t acc_prog_data = '0;
  daddr_t acc_host_addr = '0;
  word_t acc_host_wdata = '0, acc_host_rdata;
  logic cpu_run = 0, cpu_host_we = 0, cpu_retired;
  maddr_t cpu_host_addr = '0;
  xword_t cpu_host_wdata = '0, cpu_host_rdata;

  int checks = 0, failures = 0;
  int n_fwd_mem = 0, n_fwd_wb = 0, n_load_use = 0, n_port = 0, n_retired = 0;
  model_t m;
  ctrl_word_t prog [CTRL_DEPTH];
  xword_t cmem [MEM_WORDS];
  xword_t cregs [NUM_GPR];

  dsp_risc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (cpu_run && cpu_rst_n) begin
    if (cpu_retired) n_retired++;
    if (dut.u_cpu.load_use) n_load_use++;
    if (dut.u_cpu.data_access) n_port++;
    if (dut.u_cpu.ex_ctrl.valid && dut.u_cpu.ex_ctrl.rs1 != 0 && dut.u_cpu.mem_ctrl.valid &&
        dut.u_cpu.mem_ctrl.reg_we && !dut.u_cpu.mem_ctrl.mem_rd &&
        dut.u_cpu.mem_ctrl.rd == dut.u_cpu.ex_ctrl.rs1) n_fwd_mem++;
    else if (dut.u_cpu.ex_ctrl.valid && dut.u_cpu.ex_ctrl.rs1 != 0 && dut.u_cpu.wb_ctrl.valid &&
             dut.u_cpu.wb_ctrl.reg_we && dut.u_cpu.wb_ctrl.rd == dut.u_cpu.ex_ctrl.rs1) n_fwd_wb++;
  end

  // ---------------- accelerator side ----------------
  task automatic acc_write(int a, word_t v);
    acc_host_we = 1; acc_host_addr = daddr_t'(a); acc_host_wdata = v;
    @(posedge clk); #1;
    acc_host_we = 0;
    m.mem[a] = v;
  endtask

  task automatic acc_run(int len);
    int cyc = 0;
    for (int s = 0; s < len; s++) begin
      acc_prog_we = 1; acc_prog_addr = caddr_t'(s); acc_prog_data = prog[s];
      @(posedge clk); #1;
    end
    acc_prog_we = 0;
    acc_start = 1;
    @(posedge clk); #1;
    acc_start = 0;
    while (!acc_done) begin
      if (acc_busy) cyc++;
      @(posedge clk); #1;
    end
    checks++;
    if (cyc != len) failures++;
    for (int a = 0; a < DMEM_DEPTH; a++) begin
      acc_host_addr = daddr_t'(a);
      #1;
      checks++;
      if (acc_host_rdata !== m.mem[a]) begin
        failures++;
        if (failures < 6) $display("accel mem[%0d] = %h, model %h", a, acc_host_rdata, m.mem[a]);
      end
    end
  endtask

  task automatic accel_side();
    int len;
    word_t y;
    for (int r = 0; r < NUM_REGS; r++) begin m.val[r] = '0; m.bin[r] = 1; end
    for (int a = 0; a < DMEM_DEPTH; a++) acc_write(a, $urandom);
    for (int t = 0; t < 8; t++) begin
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
      acc_run(len);
    end
    for (int k = 0; k < 16; k++) acc_write(H_BASE + k, $urandom);
    for (int k = 0; k < 19; k++) acc_write(X_BASE + k, $urandom);
    y = '0;
    for (int k = 0; k < 16; k++) y += m.mem[H_BASE + k] * m.mem[X_BASE + 3 + k];
    len = fir16_kernel(prog, 4);
    for (int s = 0; s < len; s++) step(m, prog[s]);
    acc_run(len);
    acc_host_addr = daddr_t'(Y_BASE + 3);
    #1;
    checks++;
    if (acc_host_rdata !== y) failures++;
  endtask

  // ---------------- processor side ----------------
  task automatic cpu_load();
    cpu_run = 0;
    for (int i = 0; i < MEM_WORDS; i++) begin
      cpu_host_we = 1; cpu_host_addr = maddr_t'(i); cpu_host_wdata = cmem[i];
      @(posedge clk); #1;
    end
    cpu_host_we = 0;
    cpu_rst_n = 0;
    @(posedge clk); #1;
    cpu_rst_n = 1;
  endtask

  task automatic cpu_side();
    // dependence-free program: one instruction per cycle
    for (int i = 0; i < MEM_WORDS; i++) cmem[i] = '0;
    for (int i = 0; i < 64; i++) cmem[i] = enc(OP_XOR, 1 + i % 15, 0, 0, 0);
    cpu_load();
    n_retired = 0;
    cpu_run = 1;
    repeat (64 + 4) @(posedge clk);
    #1 cpu_run = 0;
    checks++;
    if (n_retired != 64) failures++;
    for (int t = 0; t < 6; t++) begin
      int len;
      for (int i = 0; i < MEM_WORDS; i++) cmem[i] = '0;
      len = gen_program(cmem, 150);
      cpu_load();
      for (int k = 0; k < NUM_GPR; k++) cregs[k] = '0;
      for (int pc = 0; pc < len; pc++) iss_step(cmem, cregs, pc);
      cpu_run = 1;
      repeat (3 * len + 8) @(posedge clk);
      #1 cpu_run = 0;
      for (int i = 0; i < MEM_WORDS; i++) begin
        cpu_host_addr = maddr_t'(i);
        #1;
        checks++;
        if (cpu_host_rdata !== cmem[i]) begin
          failures++;
          if (failures < 6) $display("cpu mem[%0d] = %h, model %h", i, cpu_host_rdata, cmem[i]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 acc_rst_n = 1;
    cpu_rst_n = 1;
    fork
      accel_side();
      cpu_side();
    join
    $display("accel: T1..T5 = %0d %0d %0d %0d %0d, subtract %0d, chained %0d, CStoBin wb %0d, loads %0d, stores %0d, collisions %0d",
             n_tmpl[0], n_tmpl[1], n_tmpl[2], n_tmpl[3], n_tmpl[4], n_sub, n_chain, n_cb_wb,
             n_load, n_store, n_collide);
    $display("cpu: forwarding EX/MEM %0d, MEM/WB %0d, load-use stalls %0d, port stalls %0d",
             n_fwd_mem, n_fwd_wb, n_load_use, n_port);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_tmpl[i] == 0) failures++;
    end
    checks += 10;
    if (n_sub == 0) failures++;
    if (n_chain == 0) failures++;
    if (n_cb_wb == 0) failures++;
    if (n_store == 0) failures++;
    if (n_load == 0) failures++;
    if (n_collide == 0) failures++;
    if (n_fwd_mem == 0) failures++;
    if (n_fwd_wb == 0) failures++;
    if (n_load_use == 0) failures++;
    if (n_port == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
