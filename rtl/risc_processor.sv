// 32-bit load/store RISC processor with a five-stage pipeline.
//
// Stages: IF fetches from the shared memory at PC; ID holds the word in the instruction
// register, decodes it and reads two registers; EX runs the ALU, the barrel shifter or the
// Booth multiplier and the accumulator collects the result; MEM performs the load or store
// through the same memory port; WB writes the register file. Without hazards one
// instruction completes every cycle.
// Hazards, all handled in hardware:
//  - data forwarding: EX takes an operand from the accumulator (EX/MEM) or from the
//    write-back value (MEM/WB) when an older instruction still in flight writes it;
//  - load-use stall: an instruction that needs the result of the load directly ahead of it
//    waits one cycle in ID (PC and instruction register hold, a bubble enters EX);
//  - memory-port stall: while a load or store uses the single memory port in MEM, IF cannot
//    fetch; PC holds and a bubble enters ID.
// Host interface: while `run` is low the pipeline is frozen and the host port reads and
// writes the memory (to load a program and its data, and to read results); `retired` pulses
// for every instruction that completes write-back. There are no branches: the program runs
// straight through memory from address 0 (the all-zero word is a NOP). Reset is synchronous,
// active low. The five stages, the shared memory and the unit set follow the document; the
// hazard handling, the host port and the instruction encoding are this design's choices.
module risc_processor
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  input  logic   host_we,
  input  maddr_t host_addr,
  input  xword_t host_wdata,
  output xword_t host_rdata,
  output logic   retired
);
  // ---------------- IF ----------------
  maddr_t pc_q;
  maddr_t mem_addr;
  logic   mem_we;
  xword_t mem_wdata, mem_rdata;

  // ---------------- ID ----------------
  ctrl_t  id_ctrl;
  xword_t id_a, id_b;

  // ---------------- EX ----------------
  ctrl_t  ex_ctrl;
  xword_t ex_a, ex_b, ex_fa, ex_fb, alu_b, alu_y, sh_y;
  logic [2*XLEN-1:0] mul_p;
  logic   alu_zero, alu_carry, alu_ovf;

  // ---------------- MEM / WB ----------------
  ctrl_t  mem_ctrl, wb_ctrl;
  xword_t acc, mem_st, wb_data;

  logic data_access, load_use;

  assign data_access = mem_ctrl.valid && (mem_ctrl.mem_rd || mem_ctrl.mem_wr);
  assign load_use    = ex_ctrl.valid && ex_ctrl.mem_rd && ex_ctrl.rd != '0 && id_ctrl.valid &&
                       ((id_ctrl.use_rs1 && id_ctrl.rs1 == ex_ctrl.rd) ||
                        (id_ctrl.use_rs2 && id_ctrl.rs2 == ex_ctrl.rd));

  // single memory port: host (when stopped), data access in MEM, or instruction fetch
  always_comb begin
    mem_we    = 1'b0;
    mem_wdata = mem_st;
    if (!run) begin
      mem_addr  = host_addr;
      mem_we    = host_we;
      mem_wdata = host_wdata;
    end else if (data_access) begin
      mem_addr  = acc[MADDR_W-1:0];
      mem_we    = mem_ctrl.mem_wr;
    end else begin
      mem_addr  = pc_q;
    end
  end

  risc_memory u_mem (.clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata));
  assign host_rdata = mem_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n)                             pc_q <= '0;
    else if (run && !load_use && !data_access) pc_q <= pc_q + 1'b1;
  end

  risc_control_unit u_cu (
    .clk, .rst_n, .en(run), .hold(load_use), .bubble(data_access),
    .fetch_word(mem_rdata), .ctrl(id_ctrl)
  );

  risc_register_file u_rf (
    .clk, .rst_n,
    .raddr1(id_ctrl.rs1), .rdata1(id_a),
    .raddr2(id_ctrl.rs2), .rdata2(id_b),
    .we(wb_ctrl.valid && wb_ctrl.reg_we), .waddr(wb_ctrl.rd), .wdata(wb_data)
  );

  // ID/EX
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_ctrl <= '0;
      ex_a    <= '0;
      ex_b    <= '0;
    end else if (run) begin
      ex_ctrl <= load_use ? '0 : id_ctrl;
      ex_a    <= id_a;
      ex_b    <= id_b;
    end
  end

  // forwarding into EX
  function automatic xword_t forward(gpr_t rs, xword_t from_rf);
    if (rs != '0 && mem_ctrl.valid && mem_ctrl.reg_we && !mem_ctrl.mem_rd && mem_ctrl.rd == rs)
      return acc;
    else if (rs != '0 && wb_ctrl.valid && wb_ctrl.reg_we && wb_ctrl.rd == rs)
      return wb_data;
    else
      return from_rf;
  endfunction

  assign ex_fa = forward(ex_ctrl.rs1, ex_a);
  assign ex_fb = forward(ex_ctrl.rs2, ex_b);
  assign alu_b = ex_ctrl.use_imm ? ex_ctrl.imm : ex_fb;

  risc_alu u_alu (
    .op(ex_ctrl.alu_op), .a(ex_fa), .b(alu_b), .y(alu_y),
    .zero(alu_zero), .carry(alu_carry), .overflow(alu_ovf)
  );

  barrel_shifter u_sh (.op(ex_ctrl.sh_op), .a(ex_fa), .amt(ex_fb[$clog2(XLEN)-1:0]), .y(sh_y));

  booth_multiplier u_mul (.a(ex_fa), .b(ex_fb), .p(mul_p));

  risc_accumulator u_acc (
    .clk, .rst_n, .en(run), .sel(ex_ctrl.res_sel),
    .alu_y(alu_y), .shift_y(sh_y), .mul_y(mul_p[XLEN-1:0]), .acc(acc)
  );

  // EX/MEM and MEM/WB
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_ctrl <= '0;
      mem_st   <= '0;
      wb_ctrl  <= '0;
      wb_data  <= '0;
    end else if (run) begin
      mem_ctrl <= ex_ctrl;
      mem_st   <= ex_fb;
      wb_ctrl  <= mem_ctrl;
      wb_data  <= mem_ctrl.mem_rd ? mem_rdata : acc;
    end
  end

  assign retired = run && wb_ctrl.valid;

  // a data access never overlaps a fetch: the pipeline must not advance PC during one
  a_port_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    (run && data_access) |=> $stable(pc_q));
endmodule
