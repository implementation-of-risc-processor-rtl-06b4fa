// Top level: the carry-save flexible DSP accelerator and the 32-bit RISC processor.
//
// The two designs stand side by side, each with its own ports: the accelerator (flex_accel,
// ports prefixed acc_) runs mapped DSP kernels out of its control store on carry-save data;
// the processor (risc_processor, ports prefixed cpu_) runs a straight-line program from its
// shared memory. They share only the clock; each has its own synchronous active-low reset
// so that one can be restarted while the other runs. No connection between them is
// defined, so none is made here.
module dsp_risc_top
  import accel_pkg::*;
  import risc_pkg::*;
(
  input  logic       clk,
  input  logic       acc_rst_n,
  input  logic       cpu_rst_n,
  // accelerator
  input  logic       acc_prog_we,
  input  caddr_t     acc_prog_addr,
  input  ctrl_word_t acc_prog_data,
  input  logic       acc_host_we,
  input  daddr_t     acc_host_addr,
  input  word_t      acc_host_wdata,
  output word_t      acc_host_rdata,
  input  logic       acc_start,
  output logic       acc_busy,
  output logic       acc_done,
  // processor
  input  logic       cpu_run,
  input  logic       cpu_host_we,
  input  maddr_t     cpu_host_addr,
  input  xword_t     cpu_host_wdata,
  output xword_t     cpu_host_rdata,
  output logic       cpu_retired
);
  flex_accel u_accel (
    .clk, .rst_n(acc_rst_n),
    .prog_we(acc_prog_we), .prog_addr(acc_prog_addr), .prog_data(acc_prog_data),
    .host_we(acc_host_we), .host_addr(acc_host_addr), .host_wdata(acc_host_wdata),
    .host_rdata(acc_host_rdata),
    .start(acc_start), .busy(acc_busy), .done(acc_done)
  );

  risc_processor u_cpu (
    .clk, .rst_n(cpu_rst_n), .run(cpu_run),
    .host_we(cpu_host_we), .host_addr(cpu_host_addr), .host_wdata(cpu_host_wdata),
    .host_rdata(cpu_host_rdata), .retired(cpu_retired)
  );
endmodule
