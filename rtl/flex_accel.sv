// Flexible DSP accelerator datapath exploiting carry-save arithmetic.
//
// NUM_FCU flexible computational units and one CStoBin converter work on carry-save data
// held in a scratch register bank. In every clock cycle the control unit applies one control
// step: each FCU receives its template configuration and its operands X*, Y*, K* through the
// data interconnection network (from any register, or directly from the output of any
// lower-numbered FCU, which chains FCU operations inside one cycle) and A from a register;
// CStoBin converts any register or FCU output to two's complement; FCU results, the CStoBin
// result and a word loaded through the data port may be written back to the register bank
// at the clock edge, and the CStoBin result may be stored through the data port.
// Host interface: program the control store (prog_*), read/write the local data storage
// (host_*) while idle, pulse start, wait for done. Kernel inputs are two's complement words
// in the data storage; results are stored back there.
// Following the document: four FCUs, one CStoBin, a register bank, a multiplexer network and
// a control unit driving them per cycle. Storage sizes, the control store and the host
// interface are this design's choices.
module flex_accel
  import accel_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // control store programming
  input  logic        prog_we,
  input  caddr_t      prog_addr,
  input  ctrl_word_t  prog_data,
  // local data storage access
  input  logic        host_we,
  input  daddr_t      host_addr,
  input  word_t       host_wdata,
  output word_t       host_rdata,
  // kernel execution
  input  logic        start,
  output logic        busy,
  output logic        done
);
  ctrl_word_t ctrl;
  cs_t        regs [NUM_REGS];
  word_t      ld_data, cb_y;
  cs_t        cb_in;

  localparam int unsigned NWP = NUM_FCU + 2;
  logic [NWP-1:0]            rb_we;
  logic [NWP-1:0][REG_W-1:0] rb_waddr;
  cs_t  [NWP-1:0]            rb_wdata;

  accel_control_unit u_ctrl (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .start, .busy, .done, .ctrl
  );

  accel_register_bank u_regs (
    .clk, .rst_n, .we(rb_we), .waddr(rb_waddr), .wdata(rb_wdata), .rdata(regs)
  );

  // FCU i sees the registers and the outputs of FCUs 0..i-1.
  for (genvar i = 0; i < NUM_FCU; i++) begin : g_fcu
    cs_t   src [NUM_SRC];
    cs_t   x, y, k, w;
    word_t a;

    for (genvar r = 0; r < NUM_REGS; r++) begin : g_reg_src
      assign src[r] = regs[r];
    end
    for (genvar j = 0; j < NUM_FCU; j++) begin : g_chain_src
      if (j < i) begin : g_on
        assign src[NUM_REGS+j] = g_fcu[j].w;
      end else begin : g_off
        assign src[NUM_REGS+j] = '0;
      end
    end

    accel_src_mux u_mx (.src(src), .sel(ctrl.fcu[i].x), .y(x));
    accel_src_mux u_my (.src(src), .sel(ctrl.fcu[i].y), .y(y));
    accel_src_mux u_mk (.src(src), .sel(ctrl.fcu[i].k), .y(k));
    assign a = regs[ctrl.fcu[i].a].s;

    fcu u_fcu (.cfg(ctrl.fcu[i].cfg), .x(x), .y(y), .k(k), .a(a), .w(w));

    assign rb_we[i]    = ctrl.fcu[i].we;
    assign rb_waddr[i] = ctrl.fcu[i].wd;
    assign rb_wdata[i] = w;
  end

  // CStoBin sees the registers and every FCU output.
  cs_t cb_src [NUM_SRC];
  for (genvar r = 0; r < NUM_REGS; r++) begin : g_cb_reg
    assign cb_src[r] = regs[r];
  end
  for (genvar j = 0; j < NUM_FCU; j++) begin : g_cb_fcu
    assign cb_src[NUM_REGS+j] = g_fcu[j].w;
  end

  accel_src_mux u_mcb (.src(cb_src), .sel(ctrl.cb_src), .y(cb_in));
  cs_to_bin u_cb (.c(cb_in.c), .s(cb_in.s), .y(cb_y));

  assign rb_we[NUM_FCU]    = ctrl.cb_we;
  assign rb_waddr[NUM_FCU] = ctrl.cb_wd;
  assign rb_wdata[NUM_FCU] = '{c: '0, s: cb_y};

  assign rb_we[NUM_FCU+1]    = ctrl.ld_en;
  assign rb_waddr[NUM_FCU+1] = ctrl.ld_wd;
  assign rb_wdata[NUM_FCU+1] = '{c: '0, s: ld_data};

  accel_data_port u_dport (
    .clk,
    .ld_addr(ctrl.ld_addr), .ld_data(ld_data),
    .st_en(ctrl.st_en), .st_addr(ctrl.st_addr), .st_data(cb_y),
    .host_we(host_we && !busy), .host_addr, .host_wdata, .host_rdata
  );
endmodule
