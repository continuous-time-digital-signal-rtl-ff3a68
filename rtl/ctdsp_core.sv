// ctdsp_core - synthesizable digital part of the dual-mode buck controller:
// everything between the flash ADC's comparator outputs and the two gate
// drive signals.
//
// Data flow: the delay-line block synchronises and encodes the comparator
// word into the error e(t) and a delayed copy e(t-T). Mode selection watches
// e(t): within +-3 LSB the PID compensator (updated once per 400 kHz period)
// sets the DPWM duty; outside it, the on/off controller takes the switch,
// using the min/max detector to find the valley/peak and the charge-balance
// unit (square-root table) for t_on/t_off, then hands back with the PID
// reset to d = d_init and the DPWM restarted centred on the ripple. The mux
// picks the DPWM or the on/off command and the dead-time generator drives
// the high-side (SW1) and low-side (SW2) switches. The block structure
// follows the source design; the mux select taken from the on/off
// controller's `active`, the clock rate and all widths are this
// implementation's choices. k_on, r_off and d_init carry the results of the
// power-stage identification (L*C, Vg), which is outside this design.
// Latency: a comparator change reaches e(t) after 3 clocks; the switch
// reacts to a transient 2 clocks later (mode register, on/off register),
// plus the mux register and the dead time.
// CTDSP_EN = 0 keeps mode selection in PID mode and lets the PID act on
// every error: a conventional PID controller, used as the reference.
// The min/max detector's polarity output is left open: the on/off
// controller takes the polarity from the sign of the error at the trigger.
module ctdsp_core
  import ctdsp_pkg::*;
#(
  parameter int unsigned DL_DEPTH = 64,
  parameter bit          CTDSP_EN = 1'b1, // 0: conventional PID only
  parameter int          PID_A    = 3200, // PID coefficients, 1/256 count
  parameter int          PID_B    = -4800,
  parameter int          PID_C    = 1800
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_CMP-1:0]            therm,      // flash ADC comparators
  input  tcyc_t                       k_on,       // cycles per sqrt(step)
  input  tcyc_t                       r_off,      // (Vg-Vout)/Vout, Q4.8
  input  logic [DUTY_W-1:0]           d_init,     // Vout/Vg, DPWM counts
  input  logic [$clog2(DL_DEPTH)-1:0] tap_t,      // delay cell T - 1
  output logic                        gate_hs,    // SW1
  output logic                        gate_ls,    // SW2
  output logic                        mode_ctdsp,
  output err_t                        err
);

  err_t              e_now, e_del;
  logic              trigger, pid_init, done;
  logic              mm_arm, mm_found;
  logic [DV_W-1:0]   mm_dv;
  tcyc_t             mm_lag;
  logic              cb_start, cb_valid;
  tcyc_t             t_on, t_off;
  logic              onoff_gate, onoff_active;
  logic [DUTY_W-1:0] duty;
  logic              pwm, sample, c;

  ct_delay_line #(.DEPTH(DL_DEPTH)) u_dl (
    .clk, .rst_n,
    .therm (therm),
    .tap_t (tap_t),
    .e_now (e_now),
    .e_del (e_del)
  );

  mode_select #(.ENABLE(CTDSP_EN)) u_mode (
    .clk, .rst_n,
    .e_now      (e_now),
    .done       (done),
    .mode_ctdsp (mode_ctdsp),
    .trigger    (trigger),
    .pid_init   (pid_init)
  );

  minmax_detect u_mm (
    .clk, .rst_n,
    .arm   (mm_arm),
    .e_now (e_now),
    .e_del (e_del),
    .found (mm_found),
    .pol   (),
    .dv    (mm_dv),
    .lag   (mm_lag)
  );

  charge_balance u_cb (
    .clk, .rst_n,
    .start (cb_start),
    .dv    (mm_dv),
    .k_on  (k_on),
    .r_off (r_off),
    .valid (cb_valid),
    .t_on  (t_on),
    .t_off (t_off)
  );

  onoff_controller u_onoff (
    .clk, .rst_n,
    .trigger  (trigger),
    .e_now    (e_now),
    .mm_arm   (mm_arm),
    .mm_found (mm_found),
    .mm_lag   (mm_lag),
    .cb_start (cb_start),
    .cb_valid (cb_valid),
    .cb_t_on  (t_on),
    .cb_t_off (t_off),
    .gate     (onoff_gate),
    .active   (onoff_active),
    .done     (done)
  );

  pid_comp #(
    .COEF_A(PID_A), .COEF_B(PID_B), .COEF_C(PID_C),
    .BAND(CTDSP_EN ? PID_BAND : E_MAX)
  ) u_pid (
    .clk, .rst_n,
    .sample (sample),
    .enable (~mode_ctdsp),
    .init   (pid_init),
    .d_init (d_init),
    .e      (e_now),
    .duty   (duty)
  );

  dpwm u_dpwm (
    .clk, .rst_n,
    .duty    (duty),
    .restart (pid_init),
    .restart_on (onoff_gate),
    .pwm     (pwm),
    .sample  (sample)
  );

  gate_mux u_mux (
    .clk, .rst_n,
    .sel   (onoff_active),
    .pwm   (pwm),
    .onoff (onoff_gate),
    .c     (c)
  );

  dead_time u_dt (
    .clk, .rst_n,
    .c       (c),
    .gate_hs (gate_hs),
    .gate_ls (gate_ls)
  );

  assign err = e_now;

endmodule
