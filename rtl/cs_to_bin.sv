// CS-to-binary converter (CStoBin).
//
// A ripple-carry adder that adds the carry and sum words of a carry-save operand and returns
// the two's complement value modulo 2^W. It is the only carry-propagate adder in the
// accelerator and sits beside the FCUs, so it converts one result while the FCUs work on
// the next. Written as an explicit chain of full-adder cells. Combinational.
module cs_to_bin
  import accel_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic [W-1:0] c,
  input  logic [W-1:0] s,
  output logic [W-1:0] y
);
  logic [W-1:0] cy;   // carry into each bit

  assign cy[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign y[i]    = c[i] ^ s[i] ^ cy[i];
    if (i < W - 1) begin : g_cy
      assign cy[i+1] = (c[i] & s[i]) | (cy[i] & (c[i] ^ s[i]));
    end
  end
endmodule
