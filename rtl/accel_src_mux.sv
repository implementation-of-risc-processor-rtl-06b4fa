// One multiplexer of the data interconnection network.
//
// Selects one carry-save operand out of NSRC sources by index: the register bank entries
// followed by the FCU outputs that may feed this input directly (inter-FCU chaining). A
// source index at or beyond NSRC selects zero. The flexible datapath places one such
// multiplexer in front of every FCU operand and of CStoBin; the control word of the current
// step drives the select. Combinational.
module accel_src_mux
  import accel_pkg::*;
#(
  parameter int unsigned NSRC = NUM_SRC,
  parameter int unsigned SW   = SRC_W
) (
  input  cs_t            src [NSRC],
  input  logic [SW-1:0]  sel,
  output cs_t            y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < NSRC; i++) begin
      if (sel == SW'(i)) y = src[i];
    end
  end
endmodule
