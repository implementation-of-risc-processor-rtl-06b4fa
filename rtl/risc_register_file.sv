// General purpose register file of the RISC processor.
//
// NUM_GPR registers of 32 bits with two combinational read ports (Read Data 1 and 2) and
// one write port written on the rising clock edge. r0 always reads as zero. A read of the
// register being written in the same cycle returns the new value (write-through), so an
// instruction in decode sees the result of the instruction in write-back. Reset, synchronous
// and active low, clears all registers. The register count, r0 and the write-through are
// this design's choices; the document shows a register block with two read data outputs.
module risc_register_file
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  gpr_t   raddr1,
  output xword_t rdata1,
  input  gpr_t   raddr2,
  output xword_t rdata2,
  input  logic   we,
  input  gpr_t   waddr,
  input  xword_t wdata
);
  xword_t regs [NUM_GPR];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_GPR; r++) regs[r] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic xword_t read_port(gpr_t ra);
    if (ra == '0)                return '0;
    else if (we && waddr == ra)  return wdata;
    else                         return regs[ra];
  endfunction

  assign rdata1 = read_port(raddr1);
  assign rdata2 = read_port(raddr2);
endmodule
