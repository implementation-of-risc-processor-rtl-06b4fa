// Workload testbench: the 8-point one-dimensional DCT (UDCT), the 8x8 two-dimensional DCT of
// JPEG (JPEGDCT) and the 8x8 two-dimensional inverse DCT of MPEG (MPEG_IDCT) on the flexible
// accelerator.
//
// y[k] = sum_n C[k][n] x[n], C[k][n] = round(256 cos((2n+1) k pi / 16)). One 8-point pass uses
// the even/odd symmetry of the DCT matrix, C[k][7-n] = (-1)^k C[k][n], so each output is four
// T1 operations chained through K*:
//   FCU i:  W_i* = C[k][i] x (x[i] +/- x[7-i]) + W_(i-1)*   (W_-1* = 0, '-' for odd k)
// and CStoBin converts FCU3's result and stores it in the same cycle. A pass loads its eight
// inputs into r1..r8, then for each output four coefficients into r9..r12 and computes:
// 8 + 8 x 5 = 48 control steps. UDCT is one pass. JPEGDCT is eight row passes into a
// transposition area followed by eight column passes, 16 x 48 = 768 steps, all in one run.
//
// The inverse pass x[n] = sum_k C[k][n] X[k] has its symmetry on the output side:
// x[n] = E + O and x[7-n] = E - O, with E the even-k and O the odd-k half of the sum. For each
// n < 4 it loads four even-k coefficients and forms E with four chained T2 operations
// (W_i* = C x X[k] + W_(i-1)*) into r13, does the same for O into r14, and then converts E + O
// and E - O, each a T3 operation, through CStoBin: 12 steps per output pair, 8 + 4 x 12 = 56
// per pass and 16 x 56 = 896 for MPEG_IDCT.
//
// Every result is compared with the direct matrix product in integers and with the
// real-valued DCT scaled by 256 (256^2 in two dimensions), within the bound that the rounding
// of the coefficients allows. Each run must take exactly one busy cycle per step.
module tb_dct_kernels;
  import accel_pkg::*;

  localparam int C_AT = 0, X_AT = 32, T_AT = 96, Y_AT = 160;
  localparam real PI = 3.14159265358979323846;
  localparam real Q  = 256.0;

  logic clk = 0, rst_n = 0, prog_we = 0, host_we = 0, start = 0, busy, done;
  caddr_t prog_addr = '0;
  ctrl_word_t prog_data = '0;
  daddr_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  ctrl_word_t prog [CTRL_DEPTH];
  int coef [8][4];
  int x [8][8];

  flex_accel dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .host_we, .host_addr,
                  .host_wdata, .host_rdata, .start, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int round_real(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic real cosv(int k, int n);
    return $cos(real'((2 * n + 1) * k) * PI / 16.0);
  endfunction

  function automatic int full_coef(int k, int n);
    if (n < 4) return coef[k][n];
    return (k % 2 == 1) ? -coef[k][7-n] : coef[k][7-n];
  endfunction

  // one 8-point pass starting at step s: inputs at ib + n*is, outputs at ob + k*os
  function automatic int add_pass(int s, int ib, int is, int ob, int os);
    for (int n = 0; n < 8; n++) begin
      prog[s] = '0;
      prog[s].ld_en = 1; prog[s].ld_addr = daddr_t'(ib + n * is); prog[s].ld_wd = reg_t'(1 + n);
      s++;
    end
    for (int k = 0; k < 8; k++) begin
      for (int n = 0; n < 4; n++) begin
        prog[s] = '0;
        prog[s].ld_en = 1; prog[s].ld_addr = daddr_t'(C_AT + 4 * k + n);
        prog[s].ld_wd = reg_t'(9 + n);
        s++;
      end
      prog[s] = '0;
      for (int i = 0; i < NUM_FCU; i++) begin
        prog[s].fcu[i].cfg.cl0 = (k % 2 == 1);   // T1: A x (X* -/+ Y*) + K*
        prog[s].fcu[i].a = reg_t'(9 + i);
        prog[s].fcu[i].x = src_t'(1 + i);
        prog[s].fcu[i].y = src_t'(8 - i);
        prog[s].fcu[i].k = (i == 0) ? src_t'(0) : src_t'(NUM_REGS + i - 1);
      end
      prog[s].cb_src  = src_t'(NUM_REGS + NUM_FCU - 1);
      prog[s].st_en   = 1;
      prog[s].st_addr = daddr_t'(ob + k * os);
      s++;
    end
    return s;
  endfunction

  // one 8-point inverse pass starting at step s: inputs at ib + k*is, outputs at ob + n*os
  function automatic int add_ipass(int s, int ib, int is, int ob, int os);
    for (int k = 0; k < 8; k++) begin
      prog[s] = '0;
      prog[s].ld_en = 1; prog[s].ld_addr = daddr_t'(ib + k * is); prog[s].ld_wd = reg_t'(1 + k);
      s++;
    end
    for (int n = 0; n < 4; n++) begin
      for (int odd = 0; odd < 2; odd++) begin
        for (int i = 0; i < 4; i++) begin
          prog[s] = '0;
          prog[s].ld_en = 1; prog[s].ld_addr = daddr_t'(C_AT + 4 * (2 * i + odd) + n);
          prog[s].ld_wd = reg_t'(9 + i);
          s++;
        end
        prog[s] = '0;
        for (int i = 0; i < NUM_FCU; i++) begin
          prog[s].fcu[i].cfg.cl1 = 1;             // T2: A x K* + (X* + Y*)
          prog[s].fcu[i].cfg.cl2 = 1;
          prog[s].fcu[i].a = reg_t'(9 + i);
          prog[s].fcu[i].k = src_t'(1 + 2 * i + odd);
          prog[s].fcu[i].x = (i == 0) ? src_t'(0) : src_t'(NUM_REGS + i - 1);
        end
        prog[s].fcu[NUM_FCU-1].we = 1;
        prog[s].fcu[NUM_FCU-1].wd = reg_t'(13 + odd);
        s++;
      end
      for (int sub = 0; sub < 2; sub++) begin
        prog[s] = '0;
        prog[s].fcu[0].cfg.unit_mul = 1;          // T3: (X* +/- Y*) + K*, K* = 0
        prog[s].fcu[0].cfg.cl0 = sub[0];
        prog[s].fcu[0].x = src_t'(13);
        prog[s].fcu[0].y = src_t'(14);
        prog[s].cb_src  = src_t'(NUM_REGS);
        prog[s].st_en   = 1;
        prog[s].st_addr = daddr_t'(ob + ((sub == 1) ? 7 - n : n) * os);
        s++;
      end
    end
    return s;
  endfunction

  task automatic write_data(int a, word_t v);
    host_we = 1; host_addr = daddr_t'(a); host_wdata = v;
    @(posedge clk); #1;
    host_we = 0;
  endtask

  task automatic load_and_run(int len);
    int cyc;
    for (int s = 0; s < len; s++) begin
      prog_we = 1; prog_addr = caddr_t'(s); prog_data = prog[s];
      @(posedge clk); #1;
    end
    prog_we = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(posedge clk); #1;
    end
    checks++;
    if (cyc != len) begin
      failures++;
      $display("kernel of %0d steps ran %0d cycles", len, cyc);
    end
  endtask


  task automatic check(string what, int a, longint want, real ideal, real tol);
    host_addr = daddr_t'(a);
    #1;
    checks += 2;
    if (longint'($signed(host_rdata)) != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, $signed(host_rdata), want);
    end
    if (real'($signed(host_rdata)) - ideal > tol || ideal - real'($signed(host_rdata)) > tol) begin
      failures++;
      $display("%s: got %0d, ideal %f", what, $signed(host_rdata), ideal);
    end
  endtask

  initial begin
    int len;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 4; n++) coef[k][n] = round_real(Q * cosv(k, n));

    @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 4; n++) write_data(C_AT + 4 * k + n, word_t'(coef[k][n]));

    // ---------- UDCT: one 8-point pass, 10 input vectors ----------
    len = add_pass(0, X_AT, 1, Y_AT, 1);
    prog[len-1].last = 1;
    for (int blk = 0; blk < 10; blk++) begin
      for (int n = 0; n < 8; n++) begin
        x[0][n] = (blk == 0) ? 127 - 255 * (n % 2) : $urandom_range(0, 255) - 128;
        write_data(X_AT + n, word_t'(x[0][n]));
      end
      load_and_run(len);
      for (int k = 0; k < 8; k++) begin
        longint want;
        real ideal;
        want = 0; ideal = 0.0;
        for (int n = 0; n < 8; n++) begin
          want  += longint'(full_coef(k, n)) * x[0][n];
          ideal += Q * cosv(k, n) * real'(x[0][n]);
        end
        // each coefficient is within 0.5 of Q cos() and |x| <= 128
        check($sformatf("UDCT block %0d y[%0d]", blk, k), Y_AT + k, want, ideal, 8.0 * 0.5 * 128.0);
      end
    end
    $display("UDCT: 10 vectors of 8 samples, %0d steps each", len);

    // ---------- JPEGDCT: 8 row passes, then 8 column passes ----------
    len = 0;
    for (int r = 0; r < 8; r++) len = add_pass(len, X_AT + 8 * r, 1, T_AT + 8 * r, 1);
    for (int c = 0; c < 8; c++) len = add_pass(len, T_AT + c, 8, Y_AT + c, 8);
    prog[len-1].last = 1;
    for (int blk = 0; blk < 3; blk++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          x[r][c] = (blk == 0) ? ((r + c) % 2 == 0 ? 127 : -128) : $urandom_range(0, 255) - 128;
          write_data(X_AT + 8 * r + c, word_t'(x[r][c]));
        end
      load_and_run(len);
      for (int k1 = 0; k1 < 8; k1++)
        for (int k2 = 0; k2 < 8; k2++) begin
          longint want;
          real ideal;
          want = 0; ideal = 0.0;
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              want  += longint'(full_coef(k1, r)) * full_coef(k2, c) * x[r][c];
              ideal += Q * Q * cosv(k1, r) * cosv(k2, c) * real'(x[r][c]);
            end
          // |row result| <= 8 Q 128 with error <= 8 x 0.5 x 128 against Q cos(); the column
          // pass adds 8 x (0.5 |row result| + Q x row error)
          check($sformatf("JPEGDCT block %0d Y[%0d][%0d]", blk, k1, k2), Y_AT + 8 * k1 + k2, want, ideal,
                8.0 * (0.5 * 8.0 * Q * 128.0 + Q * 8.0 * 0.5 * 128.0));
        end
    end
    $display("JPEGDCT: 3 blocks of 8x8 samples, %0d steps each", len);

    // ---------- MPEG_IDCT: 8 inverse row passes, then 8 inverse column passes ----------
    len = 0;
    for (int r = 0; r < 8; r++) len = add_ipass(len, X_AT + 8 * r, 1, T_AT + 8 * r, 1);
    for (int c = 0; c < 8; c++) len = add_ipass(len, T_AT + c, 8, Y_AT + c, 8);
    prog[len-1].last = 1;
    for (int blk = 0; blk < 2; blk++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          x[r][c] = (blk == 0) ? ((r == 0 && c == 0) ? 127 : -128 + 16 * r + c) : $urandom_range(0, 255) - 128;
          write_data(X_AT + 8 * r + c, word_t'(x[r][c]));
        end
      load_and_run(len);
      for (int n1 = 0; n1 < 8; n1++)
        for (int n2 = 0; n2 < 8; n2++) begin
          longint want;
          real ideal;
          want = 0; ideal = 0.0;
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              want  += longint'(full_coef(r, n1)) * full_coef(c, n2) * x[r][c];
              ideal += Q * Q * cosv(r, n1) * cosv(c, n2) * real'(x[r][c]);
            end
          check($sformatf("MPEG_IDCT block %0d x[%0d][%0d]", blk, n1, n2), Y_AT + 8 * n1 + n2, want, ideal,
                8.0 * (0.5 * 8.0 * Q * 128.0 + Q * 8.0 * 0.5 * 128.0));
        end
    end
    $display("MPEG_IDCT: 2 blocks of 8x8 coefficients, %0d steps each", len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
