// Booth multiplier of the RISC processor.
//
// Signed 32 x 32 -> 64-bit multiplication with radix-4 (modified) Booth recoding: the
// multiplier b is scanned in overlapping 3-bit groups, each group giving a digit in
// {-2..+2}; the digit selects 0, +-a or +-2a, sign-extended to 64 bits and shifted by two
// bits per digit. The 16 partial products and a word holding the +1 of every negative
// partial product are reduced by a carry-save adder tree and one final addition.
// Combinational. The processor writes the low 32 bits to the destination register.
// The document names a Booth multiplier; radix 4 and the adder tree are this design's choice.
module booth_multiplier
  import risc_pkg::*;
(
  input  xword_t             a,
  input  xword_t             b,
  output logic [2*XLEN-1:0]  p
);
  localparam int unsigned ND = XLEN / 2;
  localparam int unsigned PW = 2 * XLEN;

  logic [ND:0][PW-1:0] ops;
  logic [PW-1:0]       t_sum, t_carry;
  logic [XLEN:0]       bx;

  always_comb begin
    logic [PW-1:0] a_ext, mag, corr;
    bx = {b, 1'b0};
    a_ext = {{XLEN{a[XLEN-1]}}, a};
    corr = '0;
    for (int j = 0; j < ND; j++) begin
      unique case (bx[2*j +: 3])
        3'b001, 3'b010: mag = a_ext;
        3'b011:         mag = a_ext << 1;
        3'b100:         mag = ~(a_ext << 1);
        3'b101, 3'b110: mag = ~a_ext;
        default:        mag = (bx[2*j+2]) ? '1 : '0;   // 000: +0, 111: -0 = ~0 + 1
      endcase
      ops[j] = mag << (2 * j);
      corr[2*j] = bx[2*j+2];
    end
    ops[ND] = corr;
  end

  cs_adder_tree #(.N(ND + 1), .W(PW)) u_tree (.in(ops), .sum(t_sum), .carry(t_carry));

  assign p = t_sum + t_carry;
endmodule
