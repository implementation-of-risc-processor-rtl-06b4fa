// Flexible Computational Unit (FCU).
//
// Evaluates, in one combinational pass and entirely in carry-save form, either
//   Eq. (1)  W* = A x (X* +- Y*) +- K*      or      Eq. (2)  W* = A x K* +- (X* +- Y*)
// or any part of them, which covers the template library T1..T5:
//   T1  A x (X* +- Y*) +- K*     cl1=0 cl2=0
//   T2  A x K* +- (X* +- Y*)     cl1=1 cl2=1
//   T3  (X* +- Y*) +- K*         cl1=0 cl2=0 unit_mul=1
//   T4  A x (X* +- Y*)           cl1=0 zero_add=1
//   T5  A x K*                   cl1=1 zero_add=1
// Datapath, as in the FCU structure: MUX0 passes Y* or its 1's complement (cl0), the 4:2 CS
// adder forms N* = X* +- Y* (input carry cl0), MUX1 picks the multiplier operand (N* or K*),
// MUX2 picks the addend (K* or N*), MUX3 passes the addend or its 1's complement (cl3) and the
// carry-save multiplier adds it to A x P*, with the +2 of the subtraction fed into its tree.
// A is a two's complement word. The configuration word comes from the accelerator control
// unit, which holds it in its control-step register for the whole cycle. The select
// polarities of cl1/cl2 and the bits zero_add/unit_mul are this design's choices.
// All arithmetic is modulo 2^WIDTH.
module fcu
  import accel_pkg::*;
(
  input  fcu_cfg_t cfg,
  input  cs_t      x,
  input  cs_t      y,
  input  cs_t      k,
  input  word_t    a,
  output cs_t      w
);
  cs_t   y_m0, n, p_m1, q_m2, q_m3;
  word_t a_eff;

  always_comb begin
    y_m0 = cfg.cl0 ? cs_t'{c: ~y.c, s: ~y.s} : y;                  // MUX0
    p_m1 = cfg.cl1 ? k : n;                                         // MUX1
    q_m2 = cfg.zero_add ? '0 : (cfg.cl2 ? n : k);                   // MUX2
    q_m3 = cfg.cl3 ? cs_t'{c: ~q_m2.c, s: ~q_m2.s} : q_m2;         // MUX3
    a_eff = cfg.unit_mul ? word_t'(1) : a;
  end

  csa42 u_add (.x(x), .y(y_m0), .cin(cfg.cl0), .n(n));

  cs_multiplier u_mul (.a(a_eff), .p(p_m1), .q(q_m3), .q_cin2(cfg.cl3), .w(w));
endmodule
