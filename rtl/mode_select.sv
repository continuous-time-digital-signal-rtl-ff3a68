// mode_select - control mode selection of the dual-mode controller.
//
// The PID compensator is in charge while the error stays within
// +-PID_BAND (3 LSB in the source design). The error is watched on every
// clock; the first cycle it leaves the band in PID mode, `trigger` pulses
// and the controller enters CT-DSP mode, where it stays until the on/off
// controller reports `done`. The hand-back cycle pulses `pid_init`, which
// resets the PID states (e[n-1] = e[n-2] = 0, d = Vout/Vg) and restarts the
// DPWM period. Watching the error every clock rather than once per
// switching period is this implementation's reading of the source design's
// "instantaneous" transient detection. ENABLE = 0 keeps the controller in
// PID mode for good (the conventional PID controller used as a baseline).
module mode_select
  import ctdsp_pkg::*;
#(
  parameter int unsigned BAND   = PID_BAND,
  parameter bit          ENABLE = 1'b1    // 0: never leave PID mode
) (
  input  logic clk,
  input  logic rst_n,
  input  err_t e_now,
  input  logic done,          // on/off action finished
  output logic mode_ctdsp,    // 0: PID, 1: on/off controller
  output logic trigger,       // one-cycle pulse on entering CT-DSP mode
  output logic pid_init       // one-cycle pulse on returning to PID mode
);

  logic out_of_band;
  assign out_of_band = ENABLE && ((e_now > $signed(E_W'(BAND))) ||
                                  (e_now < -$signed(E_W'(BAND))));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_ctdsp <= 1'b0;
      trigger    <= 1'b0;
      pid_init   <= 1'b0;
    end else begin
      trigger  <= 1'b0;
      pid_init <= 1'b0;
      if (!mode_ctdsp) begin
        if (out_of_band) begin
          mode_ctdsp <= 1'b1;
          trigger    <= 1'b1;
        end
      end else if (done) begin
        mode_ctdsp <= 1'b0;
        pid_init   <= 1'b1;
      end
    end
  end

  // a hand-back and a new trigger are never issued in the same cycle, and
  // trigger comes only with the mode set (checked out of reset)
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin
    end else begin
      a_one_event:      assert (!(trigger && pid_init));
      a_trigger_enters: assert (!trigger || mode_ctdsp);
    end

endmodule
