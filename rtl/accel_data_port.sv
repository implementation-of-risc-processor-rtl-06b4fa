// Data port of the flexible accelerator: local data storage with LD/ST access.
//
// DMEM_DEPTH words of two's complement data. Towards the datapath it offers one load per
// cycle (combinational read at ld_addr, written into the register bank at the clock edge by
// the control step) and one store per cycle (st_data written at st_addr on the rising edge).
// A host port reads (combinationally) and writes the same storage so that kernel inputs can be
// placed and results collected; a datapath store wins over a host write to the same cycle.
// The storage is not reset. Depth, port set and priority are this design's choices; the
// document only shows a data port and an LD/ST unit next to the register bank.
module accel_data_port
  import accel_pkg::*;
#(
  parameter int unsigned DEPTH = DMEM_DEPTH
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  output word_t                    ld_data,
  input  logic                     st_en,
  input  logic [$clog2(DEPTH)-1:0] st_addr,
  input  word_t                    st_data,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  word_t                    host_wdata,
  output word_t                    host_rdata
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (st_en)        mem[st_addr]   <= st_data;
    else if (host_we) mem[host_addr] <= host_wdata;
  end

  assign ld_data    = mem[ld_addr];
  assign host_rdata = mem[host_addr];
endmodule
