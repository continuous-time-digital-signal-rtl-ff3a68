// onoff_controller - CT-DSP on/off controller: one switching action per
// load transient, timed by capacitor charge balance.
//
// Sequence (source design, Sec. on the dual-mode controller):
//   phase 1  On `trigger` the switch is turned on if the output dipped
//            (positive error) or off if it overshot, and the min/max
//            detector is armed. This holds until the detector reports the
//            valley/peak, where the inductor current equals the load current.
//   phase 2  The charge-balance unit turns the measured deviation into t_on
//            and t_off. For a dip the switch stays on for t_on counted from
//            the valley, then is off for t_off; for an overshoot it stays off
//            for t_off from the peak, then is on for t_on. The detector's
//            `lag` (time already elapsed since the extreme) is credited to
//            the first interval. At the end `done` hands control back.
// `active` is high from trigger to done and selects this block's `gate` in
// the output mux. A phase-1 time-out of PHASE1_MAX cycles, which ends the
// action if no extreme is ever found, is this implementation's addition.
module onoff_controller
  import ctdsp_pkg::*;
#(
  parameter int unsigned PHASE1_MAX = 4095
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            trigger,     // from mode selection
  input  err_t            e_now,
  // min/max detection
  output logic            mm_arm,
  input  logic            mm_found,
  input  tcyc_t           mm_lag,
  // charge-balance unit
  output logic            cb_start,
  input  logic            cb_valid,
  input  tcyc_t           cb_t_on,
  input  tcyc_t           cb_t_off,
  // switch command and hand-back
  output logic            gate,
  output logic            active,
  output logic            done
);

  typedef enum logic [2:0] {S_IDLE, S_SEEK, S_CALC, S_SEG1, S_SEG2} state_e;
  state_e state;
  pol_e   pol;
  tcyc_t  cnt;        // cycles since the extreme, or into segment 2
  tcyc_t  seg1, seg2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pol      <= POL_DIP;
      cnt      <= '0;
      seg1     <= '0;
      seg2     <= '0;
      gate     <= 1'b0;
      active   <= 1'b0;
      done     <= 1'b0;
      mm_arm   <= 1'b0;
      cb_start <= 1'b0;
    end else begin
      done     <= 1'b0;
      mm_arm   <= 1'b0;
      cb_start <= 1'b0;
      if (cnt != '1) cnt <= cnt + 1'b1;
      unique case (state)
        S_IDLE: if (trigger) begin
          pol    <= (e_now > 0) ? POL_DIP : POL_OVERSHOOT;
          gate   <= (e_now > 0);            // on for a dip, off otherwise
          active <= 1'b1;
          mm_arm <= 1'b1;
          cnt    <= '0;
          state  <= S_SEEK;
        end
        S_SEEK: begin
          if (mm_found) begin
            cnt      <= mm_lag + 1'b1;      // time since the extreme
            cb_start <= 1'b1;
            state    <= S_CALC;
          end else if (cnt >= tcyc_t'(PHASE1_MAX)) begin
            gate   <= 1'b0;
            active <= 1'b0;
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        S_CALC: if (cb_valid) begin
          seg1  <= (pol == POL_DIP) ? cb_t_on  : cb_t_off;
          seg2  <= (pol == POL_DIP) ? cb_t_off : cb_t_on;
          state <= S_SEG1;
        end
        S_SEG1: if (cnt >= seg1) begin
          gate  <= ~gate;
          cnt   <= 1;
          state <= S_SEG2;
        end
        S_SEG2: if (cnt >= seg2) begin
          active <= 1'b0;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules: done only at the end of an action, and the detector is
  // armed and the calculation started only while the action is running
  // (checked out of reset)
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin
    end else begin
      a_done_releases:   assert (!done || !active);
      a_arm_in_action:   assert (!mm_arm || active);
      a_start_in_action: assert (!cb_start || active);
    end

endmodule
