// Control unit of the flexible accelerator.
//
// Drives the whole datapath one control step per clock cycle: the FCU configuration words,
// the interconnect selects, the register bank writes and the data port loads and stores.
// A kernel is a sequence of control words (ctrl_word_t) held in a control store of
// CTRL_DEPTH entries that the host writes through prog_we/prog_addr/prog_data; this stands
// in for the kernel-specific FSM that the mapping flow generates and lets one datapath run
// any mapped kernel.
// Timing: a start pulse while idle fetches step 0 into the control-step register; from the
// next cycle on the step is applied (ctrl is valid, busy is high) for one cycle each, the
// step marked `last` included, so a kernel of N steps occupies N cycles after the start
// cycle. done pulses for one cycle right after the last step. ctrl is all-zero (no writes)
// whenever the unit is idle. Reset is synchronous, active low.
// The control store, the start/done handshake and the step register are this design's
// choices; the document states only what the control unit drives in each cycle.
module accel_control_unit
  import accel_pkg::*;
#(
  parameter int unsigned DEPTH = CTRL_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  ctrl_word_t               prog_data,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output ctrl_word_t               ctrl
);
  typedef enum logic {S_IDLE, S_RUN} state_e;

  ctrl_word_t                store [DEPTH];
  ctrl_word_t                step_q;
  logic [$clog2(DEPTH)-1:0]  pc_q;
  state_e                    state_q;

  always_ff @(posedge clk) begin
    if (prog_we && state_q == S_IDLE) store[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
      step_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          step_q  <= store[0];
          pc_q    <= 1;
          state_q <= S_RUN;
        end
        S_RUN: if (step_q.last) begin
          step_q  <= '0;
          state_q <= S_IDLE;
          done    <= 1'b1;
        end else begin
          step_q <= store[pc_q];
          pc_q   <= pc_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q == S_RUN);
  assign ctrl = busy ? step_q : '0;

  // the host must not reprogram or restart a running kernel
  a_no_prog_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(busy && prog_we));
endmodule
