// Shared program and data memory of the RISC processor.
//
// One memory for instructions and data with a single address bus and a single data bus
// (the von Neumann organisation of the processor): in any cycle it serves either one read
// (combinational, at addr) or one write (on the rising edge when we is high), never an
// instruction fetch and a data access together. The contents are not reset.
// The single shared port follows the document; the size and the asynchronous read are this
// design's choices.
module risc_memory
  import risc_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     we,
  input  xword_t                   wdata,
  output xword_t                   rdata
);
  xword_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
