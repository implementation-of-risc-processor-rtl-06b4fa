// Carry-save adder tree (Wallace-style reduction).
//
// Reduces N words to one carry-save pair {carry, sum} whose sum equals the sum of all inputs
// modulo 2^W. Each level groups the words of the previous level in threes and replaces every
// group by a 3:2 full-adder row (a sum word and a left-shifted carry word); leftover words
// pass through. Levels repeat until two words remain, about log1.5(N/2) full-adder delays,
// with no carry propagation. Combinational.
// The reduction order is this design's choice; the document only names a CS adder tree.
module cs_adder_tree #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0] in,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);
  // number of words left after l levels
  function automatic int unsigned words_at(int unsigned l);
    int unsigned n = N;
    for (int unsigned i = 0; i < l; i++) n = (n <= 2) ? n : 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (words_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned L = num_levels();

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [W-1:0] o [N];   // the words after l levels
    if (l == 0) begin : g_in
      for (genvar i = 0; i < N; i++) begin : g_w
        assign o[i] = in[i];
      end
    end else begin : g_red
      localparam int unsigned NI = words_at(l - 1);
      localparam int unsigned G  = NI / 3;
      localparam int unsigned R  = NI % 3;
      for (genvar g = 0; g < G; g++) begin : g_row
        logic [W-1:0] x0, x1, x2;
        assign x0 = g_lvl[l-1].o[3*g];
        assign x1 = g_lvl[l-1].o[3*g+1];
        assign x2 = g_lvl[l-1].o[3*g+2];
        assign o[2*g]   = x0 ^ x1 ^ x2;
        assign o[2*g+1] = {(x0[W-2:0] & x1[W-2:0]) | (x0[W-2:0] & x2[W-2:0]) |
                           (x1[W-2:0] & x2[W-2:0]), 1'b0};
      end
      for (genvar r = 0; r < R; r++) begin : g_pass
        assign o[2*G+r] = g_lvl[l-1].o[3*G+r];
      end
      for (genvar z = 2 * G + R; z < N; z++) begin : g_unused
        assign o[z] = '0;
      end
    end
  end

  assign sum   = g_lvl[L].o[0];
  assign carry = (words_at(L) > 1) ? g_lvl[L].o[1] : '0;
endmodule
