// Two's complement 4:2 carry-save adder of the FCU.
//
// Adds two carry-save operands, X* = {xc, xs} and Y* = {yc, ys}, and returns N* = X* + Y* in
// carry-save form, using two rows of 3:2 full-adder cells (no carry propagation). The two
// shifted carry rows each have a free least significant position; the input carry `cin` is
// injected into both, so that with the Y* words 1's-complemented by the caller the result is
// X* - Y* (-Y* = ~yc + 1 + ~ys + 1). All arithmetic is modulo 2^WIDTH. Purely combinational.
// The word-level two-row structure and the double carry injection are this design's choices.
module csa42
  import accel_pkg::*;
(
  input  cs_t  x,
  input  cs_t  y,
  input  logic cin,
  output cs_t  n
);
  word_t s1, c1, s2, c2;

  always_comb begin
    // first row: xc + xs + yc
    s1 = x.c ^ x.s ^ y.c;
    c1 = {(x.c[WIDTH-2:0] & x.s[WIDTH-2:0]) | (x.c[WIDTH-2:0] & y.c[WIDTH-2:0]) |
          (x.s[WIDTH-2:0] & y.c[WIDTH-2:0]), cin};
    // second row: s1 + c1 + ys
    s2 = s1 ^ c1 ^ y.s;
    c2 = {(s1[WIDTH-2:0] & c1[WIDTH-2:0]) | (s1[WIDTH-2:0] & y.s[WIDTH-2:0]) |
          (c1[WIDTH-2:0] & y.s[WIDTH-2:0]), cin};
    n.s = s2;
    n.c = c2;
  end
endmodule
