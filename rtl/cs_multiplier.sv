// Carry-save multiplier of the FCU: W* = A x P* + Q*, all modulo 2^WIDTH.
//
// A is a two's complement word, P* and Q* are carry-save operands. P* is recoded directly
// into Modified Booth digits (cs_to_mb), each digit selects 0, +-A or +-2A as a partial
// product (PP generation), and one carry-save adder tree sums the WIDTH/2 partial products,
// both words of the addend Q* and a correction word. The correction word carries the +1 of
// every negative partial product (bit 2j) and, when `q_cin2` is set, +2 (bit 1), which
// completes the 1's complement of Q* into a subtraction. The result stays in carry-save form.
// Combinational.
// Departure: the product is kept modulo 2^WIDTH (integer arithmetic) instead of the document's
// wider product truncated to its most significant bits with error compensation.
module cs_multiplier
  import accel_pkg::*;
(
  input  word_t a,
  input  cs_t   p,
  input  cs_t   q,
  input  logic  q_cin2,
  output cs_t   w
);
  localparam int unsigned ND = WIDTH / 2;
  localparam int unsigned NT = ND + 3;

  mb_digit_t [ND-1:0]          digit;
  logic [NT-1:0][WIDTH-1:0]    ops;
  word_t                       corr;

  cs_to_mb #(.W(WIDTH)) u_recode (.pc(p.c), .ps(p.s), .digit(digit));

  always_comb begin
    corr = '0;
    corr[1] = q_cin2;
    for (int j = 0; j < ND; j++) begin
      word_t mag;
      mag = digit[j].two ? (a << 1) : (digit[j].one ? a : '0);
      if (digit[j].neg) mag = ~mag;
      ops[j] = mag << (2 * j);
      corr[2*j] = corr[2*j] | digit[j].neg;
    end
    ops[ND]   = q.c;
    ops[ND+1] = q.s;
    ops[ND+2] = corr;
  end

  cs_adder_tree #(.N(NT), .W(WIDTH)) u_tree (.in(ops), .sum(w.s), .carry(w.c));
endmodule
