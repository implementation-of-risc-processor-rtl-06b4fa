// Self-checking testbench of risc_processor.
//
// 1. Throughput: a program of independent ALU instructions must retire one instruction per
//    cycle once the pipeline is full (N instructions in N + 4 cycles).
// 2. Random programs (all 16 opcodes, many back-to-back dependences, loads and stores) are
//    loaded through the host port, run, and the whole memory is compared with the
//    instruction-level reference model; retire counts must match the instruction count.
// It counts EX/MEM and MEM/WB forwarding, load-use stalls and memory-port stalls and fails
// if any of them never happened.
module tb_risc_processor;
  import risc_pkg::*;
  import risc_tb_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, host_we = 0, retired;
  maddr_t host_addr = '0;
  xword_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  int n_fwd_mem = 0, n_fwd_wb = 0, n_load_use = 0, n_port = 0, n_retired = 0;
  xword_t model_mem [MEM_WORDS];
  xword_t model_r [NUM_GPR];

  risc_processor dut (.clk, .rst_n, .run, .host_we, .host_addr, .host_wdata, .host_rdata,
                      .retired);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters, sampled while running
  always @(posedge clk) if (run && rst_n) begin
    if (retired) n_retired++;
    if (dut.load_use) n_load_use++;
    if (dut.data_access) n_port++;
    if (dut.ex_ctrl.valid && dut.ex_ctrl.rs1 != 0 && dut.mem_ctrl.valid && dut.mem_ctrl.reg_we &&
        !dut.mem_ctrl.mem_rd && dut.mem_ctrl.rd == dut.ex_ctrl.rs1) n_fwd_mem++;
    else if (dut.ex_ctrl.valid && dut.ex_ctrl.rs1 != 0 && dut.wb_ctrl.valid && dut.wb_ctrl.reg_we &&
             dut.wb_ctrl.rd == dut.ex_ctrl.rs1) n_fwd_wb++;
  end

  task automatic load_memory();
    run = 0;
    for (int i = 0; i < MEM_WORDS; i++) begin
      host_we = 1; host_addr = maddr_t'(i); host_wdata = model_mem[i];
      @(posedge clk); #1;
    end
    host_we = 0;
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
  endtask

  task automatic run_cycles(int n);
    run = 1;
    repeat (n) @(posedge clk);
    #1 run = 0;
  endtask

  initial begin
    // ---------- 1: one instruction per cycle ----------
    begin
      int n = 40;
      for (int i = 0; i < MEM_WORDS; i++) model_mem[i] = '0;
      for (int i = 0; i < n; i++) model_mem[i] = enc(OP_INC, 1 + i % 15, 0, 0, 0);
      load_memory();
      n_retired = 0;
      run_cycles(n + 4);
      checks++;
      if (n_retired != n) begin
        failures++;
        $display("throughput: %0d retired in %0d cycles, expected %0d", n_retired, n + 4, n);
      end
    end
    // ---------- 2: random programs against the reference model ----------
    for (int t = 0; t < 12; t++) begin
      int len, cycles;
      for (int i = 0; i < MEM_WORDS; i++) model_mem[i] = '0;
      len = gen_program(model_mem, 120);
      load_memory();
      // reference run
      for (int k = 0; k < NUM_GPR; k++) model_r[k] = '0;
      for (int pc = 0; pc < len; pc++) iss_step(model_mem, model_r, pc);
      n_retired = 0;
      // enough cycles for every instruction and its stalls; the trailing NOPs are harmless
      cycles = 3 * len + 8;
      run_cycles(cycles);
      for (int i = 0; i < MEM_WORDS; i++) begin
        host_addr = maddr_t'(i);
        #1;
        checks++;
        if (host_rdata !== model_mem[i]) begin
          failures++;
          if (failures < 6) $display("prog %0d mem[%0d] = %h, model %h", t, i, host_rdata, model_mem[i]);
        end
      end
      checks++;
      if (n_retired < len) failures++;
    end
    $display("forwarding EX/MEM=%0d MEM/WB=%0d load-use stalls=%0d port stalls=%0d",
             n_fwd_mem, n_fwd_wb, n_load_use, n_port);
    checks += 4;
    if (n_fwd_mem == 0) failures++;
    if (n_fwd_wb == 0) failures++;
    if (n_load_use == 0) failures++;
    if (n_port == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
