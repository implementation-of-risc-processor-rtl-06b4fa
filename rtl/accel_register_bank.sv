// Register bank of the flexible accelerator.
//
// NUM_REGS scratch registers, each holding one carry-save value {c, s}. They keep intermediate
// results between control steps and share operands among the FCUs. All registers are read in
// parallel (the interconnect multiplexers see every one of them). There are NUM_FCU + 2 write
// ports, all synchronous to the rising edge: one per FCU, one for the CStoBin result (written
// with a zero carry word, i.e. in binary form) and one for words loaded through the data port.
// When several ports write the same register in one cycle the highest port wins: the load
// port over CStoBin over FCU NUM_FCU-1 ... over FCU 0. Reset (active low, synchronous)
// clears every register. The number of registers, the port set, the priority and the reset
// are this design's choices.
module accel_register_bank
  import accel_pkg::*;
#(
  parameter int unsigned NREG = NUM_REGS,
  parameter int unsigned NWP  = NUM_FCU + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NWP-1:0]          we,
  input  logic [NWP-1:0][$clog2(NREG)-1:0] waddr,
  input  cs_t  [NWP-1:0]          wdata,
  output cs_t                     rdata [NREG]
);
  cs_t regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NWP; p++) begin
        if (we[p]) regs[waddr[p]] <= wdata[p];
      end
    end
  end

  always_comb begin
    for (int r = 0; r < NREG; r++) rdata[r] = regs[r];
  end
endmodule
