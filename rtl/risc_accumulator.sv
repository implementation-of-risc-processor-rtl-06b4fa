// Accumulator of the RISC processor.
//
// The register at the end of the execute stage that collects the result of the unit the
// instruction used: the ALU, the barrel shifter or the Booth multiplier (low 32 bits of the
// product). It loads on every rising edge where `en` is high and holds otherwise; reset
// (synchronous, active low) clears it. Its output feeds the memory stage (as the load/store
// address or the value to write back) and the forwarding path. That it is the EX/MEM result
// register is this design's reading of the block diagram, where the three units feed it.
module risc_accumulator
  import risc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  res_sel_e sel,
  input  xword_t   alu_y,
  input  xword_t   shift_y,
  input  xword_t   mul_y,
  output xword_t   acc
);
  xword_t d;

  always_comb begin
    unique case (sel)
      RES_SHIFT: d = shift_y;
      RES_MUL:   d = mul_y;
      default:   d = alu_y;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= d;
  end
endmodule
