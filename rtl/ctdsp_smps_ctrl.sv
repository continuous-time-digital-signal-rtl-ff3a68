// ctdsp_smps_ctrl - dual-mode digital controller for a high-frequency buck
// converter: slow PID + DPWM in steady state, continuous-time DSP on/off
// control during load transients.
//
// The sensed output voltage H1*vout(t) enters the asynchronous flash ADC
// (a behavioural model of the comparator array, with a real-valued input);
// its comparator word drives the synthesizable controller ctdsp_core, which
// returns the two gate signals. See ctdsp_core for the data flow and
// timing. Vref[n] is a digital word in ADC steps (10 mV); the configuration
// inputs k_on (cycles per sqrt(step)), r_off ((Vg-Vout)/Vout in Q4.8) and
// d_init (hand-back duty Vout/Vg in DPWM counts) come from an
// identification of the power stage, and tap_t sets the delay cell
// T = tap_t+1 clock cycles. Clock 200 MHz; 400 kHz switching.
// CTDSP_EN = 0 turns the controller into a conventional PID + DPWM
// controller (the PID acts on the full +-31 LSB error and the on/off path
// is never entered), the baseline the dual-mode scheme is compared with.
module ctdsp_smps_ctrl
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
  input  real                         vsense,     // H1 * vout(t)
  input  logic [VREF_W-1:0]           vref_code,  // Vref[n], ADC steps
  input  tcyc_t                       k_on,       // cycles per sqrt(step)
  input  tcyc_t                       r_off,      // (Vg-Vout)/Vout, Q4.8
  input  logic [DUTY_W-1:0]           d_init,     // Vout/Vg, DPWM counts
  input  logic [$clog2(DL_DEPTH)-1:0] tap_t,      // delay cell T - 1
  output logic                        gate_hs,    // SW1
  output logic                        gate_ls,    // SW2
  output logic                        mode_ctdsp,
  output err_t                        err
);

  logic [N_CMP-1:0] therm;

  flash_adc u_adc (
    .vsense    (vsense),
    .vref_code (vref_code),
    .therm     (therm)
  );

  ctdsp_core #(
    .DL_DEPTH(DL_DEPTH), .CTDSP_EN(CTDSP_EN),
    .PID_A(PID_A), .PID_B(PID_B), .PID_C(PID_C)
  ) u_core (
    .clk, .rst_n,
    .therm      (therm),
    .k_on       (k_on),
    .r_off      (r_off),
    .d_init     (d_init),
    .tap_t      (tap_t),
    .gate_hs    (gate_hs),
    .gate_ls    (gate_ls),
    .mode_ctdsp (mode_ctdsp),
    .err        (err)
  );

endmodule
