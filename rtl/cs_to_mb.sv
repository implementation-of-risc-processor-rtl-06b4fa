// Carry-save to Modified Booth recoder (CS-MB conversion followed by MB encoding).
//
// Turns a carry-save multiplier operand P* = {c, s} straight into WIDTH/2 radix-4 Modified
// Booth digits in {-2..+2}, so that a multiplication can follow a carry-save addition without
// a carry-propagate adder in between. Each 2-bit slice j of the two words is summed to
// u_j = C_j + S_j in [0,6]. Two constant-depth transfer levels then bring the digit set down:
//   level 1: u_j = 4*a_j + v_j,  v_j in [-2,1],  w_j = v_j + a_(j-1)      in [-2,3]
//   level 2: w_j = 4*b_j + d_j,  d_j in [-2,1],  e_j = d_j + b_(j-1)      in [-2,2]
// A transfer never travels more than one slice, so the delay does not grow with WIDTH.
// Transfers out of the top slice have weight 2^WIDTH and are dropped (modulo arithmetic).
// Each digit e_j is encoded as {neg, one, two}; a zero digit is all-zero.
// Combinational. The recoding rule is this design's own; the document names the unit only.
module cs_to_mb
  import accel_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic [W-1:0]               pc,
  input  logic [W-1:0]               ps,
  output mb_digit_t [W/2-1:0]        digit
);
  localparam int unsigned ND = W / 2;

  logic signed [3:0] v [ND];
  logic        [1:0] a [ND];
  logic signed [3:0] w [ND];
  logic signed [3:0] d [ND];
  logic              b [ND];
  logic signed [3:0] e [ND];
  logic        [2:0] u;

  always_comb begin
    for (int j = 0; j < ND; j++) begin
      u = {1'b0, pc[2*j +: 2]} + {1'b0, ps[2*j +: 2]};
      unique case (u)
        3'd0:    begin a[j] = 2'd0; v[j] =  4'sd0; end
        3'd1:    begin a[j] = 2'd0; v[j] =  4'sd1; end
        3'd2:    begin a[j] = 2'd1; v[j] = -4'sd2; end
        3'd3:    begin a[j] = 2'd1; v[j] = -4'sd1; end
        3'd4:    begin a[j] = 2'd1; v[j] =  4'sd0; end
        3'd5:    begin a[j] = 2'd1; v[j] =  4'sd1; end
        default: begin a[j] = 2'd2; v[j] = -4'sd2; end
      endcase
    end
    for (int j = 0; j < ND; j++) begin
      w[j] = v[j] + ((j == 0) ? 4'sd0 : $signed({2'b00, a[(j == 0) ? 0 : j-1]}));
      if (w[j] >= 4'sd2) begin
        b[j] = 1'b1;
        d[j] = w[j] - 4'sd4;
      end else begin
        b[j] = 1'b0;
        d[j] = w[j];
      end
    end
    for (int j = 0; j < ND; j++) begin
      e[j] = d[j] + ((j == 0) ? 4'sd0 : $signed({3'b000, b[(j == 0) ? 0 : j-1]}));
      digit[j].neg = e[j] < 0;
      digit[j].one = (e[j] == 4'sd1) || (e[j] == -4'sd1);
      digit[j].two = (e[j] == 4'sd2) || (e[j] == -4'sd2);
    end
  end
endmodule
