// Shared types and constants of the flexible carry-save DSP accelerator.
//
// Every intermediate value in the accelerator travels in carry-save (CS) form: a pair of
// WIDTH-bit words whose sum (mod 2^WIDTH) is the value. Binary (two's complement) values are
// CS pairs whose carry word is zero. WIDTH follows the 32-bit operation width of the design;
// the FCU configuration fields CL0..CL3 follow the FCU structure, while the two extra bits
// (zero addend, unit multiplicand) are this design's way of reaching templates T3-T5.
package accel_pkg;

  parameter int unsigned WIDTH      = 32;   // operand width of the FCUs and CStoBin
  parameter int unsigned NUM_FCU    = 4;    // FCUs in the datapath
  parameter int unsigned NUM_REGS   = 16;   // scratch registers in the register bank
  parameter int unsigned DMEM_DEPTH = 256;  // words of local data storage behind the data port
  parameter int unsigned CTRL_DEPTH = 1024;  // control steps the control unit can hold

  // Operand sources of the interconnect: registers 0..NUM_REGS-1, then FCU outputs.
  parameter int unsigned NUM_SRC    = NUM_REGS + NUM_FCU;
  parameter int unsigned SRC_W      = $clog2(NUM_SRC);
  parameter int unsigned REG_W      = $clog2(NUM_REGS);
  parameter int unsigned DADDR_W    = $clog2(DMEM_DEPTH);
  parameter int unsigned CADDR_W    = $clog2(CTRL_DEPTH);

  typedef logic [WIDTH-1:0] word_t;

  // A carry-save operand: value = c + s (mod 2^WIDTH).
  typedef struct packed {
    word_t c;
    word_t s;
  } cs_t;

  // Configuration word of one FCU.
  typedef struct packed {
    logic cl0;       // 4:2 adder: 0 -> N* = X* + Y*, 1 -> N* = X* - Y*
    logic cl1;       // MUX1: 0 -> multiply N* (Eq. 1), 1 -> multiply K* (Eq. 2)
    logic cl2;       // MUX2: 0 -> add K* (Eq. 1), 1 -> add N* (Eq. 2)
    logic cl3;       // MUX3: 0 -> add the MUX2 output, 1 -> subtract it
    logic zero_add;  // force the addend to zero (templates T4, T5)
    logic unit_mul;  // force the multiplicand A to 1 (template T3)
  } fcu_cfg_t;


  typedef logic [SRC_W-1:0]   src_t;
  typedef logic [REG_W-1:0]   reg_t;
  typedef logic [DADDR_W-1:0] daddr_t;
  typedef logic [CADDR_W-1:0] caddr_t;

  // Per-FCU part of a control word.
  typedef struct packed {
    fcu_cfg_t cfg;   // template configuration
    src_t     x;     // source of X*
    src_t     y;     // source of Y*
    src_t     k;     // source of K*
    reg_t     a;     // register holding the two's complement operand A
    logic     we;    // write W* into the register bank
    reg_t     wd;    // destination register
  } fcu_ctl_t;

  // One control step: everything the control unit drives in one clock cycle.
  typedef struct packed {
    fcu_ctl_t [NUM_FCU-1:0] fcu;
    src_t   cb_src;   // operand of CStoBin
    logic   cb_we;    // write the CStoBin result into the register bank (binary form)
    reg_t   cb_wd;
    logic   st_en;    // store the CStoBin result through the data port
    daddr_t st_addr;
    logic   ld_en;    // load a word from the data port into the register bank
    daddr_t ld_addr;
    reg_t   ld_wd;
    logic   last;     // last step of the kernel
  } ctrl_word_t;

  // Modified Booth digit, value in {-2,-1,0,+1,+2}.
  typedef struct packed {
    logic neg;       // digit is negative
    logic one;       // |digit| == 1
    logic two;       // |digit| == 2
  } mb_digit_t;

endpackage
