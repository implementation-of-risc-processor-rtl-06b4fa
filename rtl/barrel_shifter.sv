// Barrel shifter / rotator of the RISC processor.
//
// Shifts a 32-bit word left or right (logical, zero fill) or rotates it left or right by
// 0..31 positions in five stages of 2:1 multiplexers, stage k moving the word by 2^k when
// bit k of the amount is set. Combinational. Shift and rotate follow the document; the
// logarithmic stage structure is the usual barrel-shifter organisation, chosen here.
module barrel_shifter
  import risc_pkg::*;
(
  input  shift_op_e                 op,
  input  xword_t                    a,
  input  logic [$clog2(XLEN)-1:0]   amt,
  output xword_t                    y
);
  localparam int unsigned NS = $clog2(XLEN);

  xword_t st [NS+1];

  assign st[0] = a;
  for (genvar k = 0; k < NS; k++) begin : g_stage
    localparam int unsigned D = 1 << k;
    xword_t moved;
    always_comb begin
      unique case (op)
        SH_SHL:  moved = {st[k][XLEN-1-D:0], {D{1'b0}}};
        SH_SHR:  moved = {{D{1'b0}}, st[k][XLEN-1:D]};
        SH_ROL:  moved = {st[k][XLEN-1-D:0], st[k][XLEN-1 -: D]};
        default: moved = {st[k][D-1:0], st[k][XLEN-1:D]};
      endcase
    end
    assign st[k+1] = amt[k] ? moved : st[k];
  end
  assign y = st[NS];
endmodule
