// Testbench helpers for the flexible accelerator: a value-level reference model of one
// control step, a random control-word generator that keeps the A operand on registers that
// hold binary values, and the FIR16 kernel mapped onto four chained FCUs.
package accel_tb_pkg;
  import accel_pkg::*;

  typedef struct {
    word_t val [NUM_REGS];   // register values (c + s)
    bit    bin [NUM_REGS];   // register holds a binary value (carry word zero)
    word_t mem [DMEM_DEPTH];
  } model_t;

  // how often each mechanism was used by the words fed to step()
  int n_tmpl [5];
  int n_sub, n_chain, n_cb_wb, n_store, n_load, n_collide;

  function automatic word_t fcu_value(fcu_cfg_t c, word_t x, word_t y, word_t k, word_t a);
    word_t n, p, q, am;
    n  = c.cl0 ? x - y : x + y;
    p  = c.cl1 ? k : n;
    q  = c.zero_add ? '0 : (c.cl2 ? n : k);
    am = c.unit_mul ? word_t'(1) : a;
    return am * p + (c.cl3 ? -q : q);
  endfunction

  function automatic int template_of(fcu_cfg_t c);
    if (c.unit_mul && !c.zero_add)  return 2;             // T3
    if (c.zero_add)                  return c.cl1 ? 4 : 3; // T5 / T4
    return c.cl1 ? 1 : 0;                                  // T2 / T1
  endfunction

  // Applies one control step to the model.
  function automatic void step(ref model_t m, input ctrl_word_t w);
    word_t fv [NUM_FCU];
    word_t cbv;
    bit    wrote [NUM_REGS];
    word_t nval [NUM_REGS];
    bit    nbin [NUM_REGS];
    for (int r = 0; r < NUM_REGS; r++) begin
      nval[r] = m.val[r]; nbin[r] = m.bin[r]; wrote[r] = 0;
    end
    for (int i = 0; i < NUM_FCU; i++) begin
      word_t x, y, k;
      x = src_value(m, fv, i, w.fcu[i].x);
      y = src_value(m, fv, i, w.fcu[i].y);
      k = src_value(m, fv, i, w.fcu[i].k);
      fv[i] = fcu_value(w.fcu[i].cfg, x, y, k, m.val[w.fcu[i].a]);
      if (w.fcu[i].we) begin
        if (wrote[w.fcu[i].wd]) n_collide++;
        nval[w.fcu[i].wd] = fv[i]; nbin[w.fcu[i].wd] = 0; wrote[w.fcu[i].wd] = 1;
        n_tmpl[template_of(w.fcu[i].cfg)]++;
        if (w.fcu[i].cfg.cl0 || w.fcu[i].cfg.cl3) n_sub++;
        if (w.fcu[i].x >= NUM_REGS && w.fcu[i].x < NUM_REGS + i) n_chain++;
      end
    end
    cbv = src_value(m, fv, NUM_FCU, w.cb_src);
    if (w.cb_we) begin
      if (wrote[w.cb_wd]) n_collide++;
      nval[w.cb_wd] = cbv; nbin[w.cb_wd] = 1; wrote[w.cb_wd] = 1; n_cb_wb++;
    end
    if (w.ld_en) begin
      if (wrote[w.ld_wd]) n_collide++;
      nval[w.ld_wd] = m.mem[w.ld_addr]; nbin[w.ld_wd] = 1; n_load++;
    end
    if (w.st_en) begin
      m.mem[w.st_addr] = cbv; n_store++;
    end
    for (int r = 0; r < NUM_REGS; r++) begin
      m.val[r] = nval[r]; m.bin[r] = nbin[r];
    end
  endfunction

  // Operand seen by FCU `i` (i == NUM_FCU: CStoBin, which sees every FCU) for select s.
  function automatic word_t src_value(ref model_t m, ref word_t fv [NUM_FCU], input int i,
                                      input src_t s);
    if (s < NUM_REGS) return m.val[s];
    if (s < NUM_REGS + NUM_FCU && int'(s) - NUM_REGS < i) return fv[s - NUM_REGS];
    return '0;
  endfunction

  function automatic reg_t pick_binary(ref model_t m);
    for (int tries = 0; tries < 20; tries++) begin
      reg_t r = reg_t'($urandom);
      if (m.bin[r]) return r;
    end
    return '0;   // register 0 is never written by the generated kernels' FCUs
  endfunction

  // Random control word; FCU i sources include chained FCU outputs and invalid indices.
  function automatic ctrl_word_t rand_word(ref model_t m);
    ctrl_word_t w = '0;
    for (int i = 0; i < NUM_FCU; i++) begin
      w.fcu[i].cfg = fcu_cfg_t'($urandom);
      w.fcu[i].x   = ($urandom_range(0, 1)) ? src_t'($urandom_range(NUM_REGS, NUM_REGS + NUM_FCU - 1)) : src_t'($urandom);
      w.fcu[i].y   = src_t'($urandom);
      w.fcu[i].k   = src_t'($urandom);
      w.fcu[i].a   = pick_binary(m);
      w.fcu[i].we  = ($urandom_range(0, 2)) != 0;
      w.fcu[i].wd  = reg_t'($urandom_range(1, NUM_REGS - 1));
    end
    w.cb_src  = src_t'($urandom);
    w.cb_we   = ($urandom_range(0, 2)) == 0;
    w.cb_wd   = reg_t'($urandom_range(1, NUM_REGS - 1));
    w.st_en   = ($urandom_range(0, 1));
    w.st_addr = daddr_t'($urandom_range(128, 255));
    w.ld_en   = ($urandom_range(0, 1));
    w.ld_addr = daddr_t'($urandom_range(0, 127));
    w.ld_wd   = reg_t'($urandom_range(1, NUM_REGS - 1));
    return w;
  endfunction

  // CStoBin + store of register r to address a.
  function automatic ctrl_word_t store_reg(int r, int a);
    ctrl_word_t w = '0;
    w.cb_src = src_t'(r); w.st_en = 1; w.st_addr = daddr_t'(a);
    return w;
  endfunction

  // FIR16 kernel: y[n] = sum_{k=0..15} h[k] * x[n+k] for n = 0..NOUT-1, with h at
  // addresses H_BASE.., x at X_BASE.., y stored at Y_BASE... Each output takes four rounds;
  // a round loads four coefficient/sample pairs into r1..r8 (eight cycles) and then chains
  // four T2 operations (W* = A x K* + X* + Y*) through FCU0..FCU3 in one cycle, the partial
  // sum staying in carry-save form in r9. In the last round CStoBin converts FCU3's output
  // in the same cycle and the data port stores it. Returns the number of steps.
  localparam int H_BASE = 0, X_BASE = 16, Y_BASE = 64;
  function automatic int fir16_kernel(output ctrl_word_t prog [CTRL_DEPTH], input int nout);
    int s = 0;
    for (int i = 0; i < CTRL_DEPTH; i++) prog[i] = '0;
    for (int n = 0; n < nout; n++) begin
      for (int rnd = 0; rnd < 4; rnd++) begin
        for (int t = 0; t < 4; t++) begin
          prog[s].ld_en = 1; prog[s].ld_addr = daddr_t'(H_BASE + 4 * rnd + t);
          prog[s].ld_wd = reg_t'(1 + 2 * t); s++;
          prog[s].ld_en = 1; prog[s].ld_addr = daddr_t'(X_BASE + n + 4 * rnd + t);
          prog[s].ld_wd = reg_t'(2 + 2 * t); s++;
        end
        for (int i = 0; i < NUM_FCU; i++) begin
          prog[s].fcu[i].cfg.cl1 = 1;    // T2: A x K* + (X* + Y*)
          prog[s].fcu[i].cfg.cl2 = 1;
          prog[s].fcu[i].a = reg_t'(1 + 2 * i);
          prog[s].fcu[i].k = src_t'(2 + 2 * i);
          prog[s].fcu[i].x = (i == 0) ? src_t'((rnd == 0) ? 0 : 9) : src_t'(NUM_REGS + i - 1);
          prog[s].fcu[i].y = src_t'(0);
        end
        prog[s].fcu[NUM_FCU-1].we = 1;
        prog[s].fcu[NUM_FCU-1].wd = reg_t'(9);
        if (rnd == 3) begin
          prog[s].cb_src  = src_t'(NUM_REGS + NUM_FCU - 1);
          prog[s].st_en   = 1;
          prog[s].st_addr = daddr_t'(Y_BASE + n);
        end
        s++;
      end
    end
    prog[s-1].last = 1;
    return s;
  endfunction
endpackage
