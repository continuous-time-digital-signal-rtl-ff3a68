// pid_comp - incremental PID compensator of the steady-state loop.
//
//   d[n] = d[n-1] + A*e[n] + B*e[n-1] + C*e[n-2]
// is evaluated once per switching period on the `sample` strobe, and only
// while |e[n]| <= BAND (PID_BAND = 3 LSB by default); outside the band the
// on/off controller is in charge and the states hold. With BAND = E_MAX
// the compensator acts on every error (PID-only operation). `init` (hand-back from the on/off controller)
// clears e[n-1] and e[n-2] and loads d with d_init = Vout/Vg, as the source
// design prescribes. d is kept with FRAC fraction bits and saturated to
// 0 .. DPWM_PERIOD-1 counts; `duty` is its integer part, valid the cycle
// after `sample`. The coefficient values are not given by the source
// design: the defaults (in 1/2^FRAC DPWM count per ADC step) were chosen for
// a stable loop with the 10 uH / 20 uF, 5 V -> 2 V power stage.
module pid_comp
  import ctdsp_pkg::*;
#(
  parameter int          COEF_A = 3200,
  parameter int          COEF_B = -4800,
  parameter int          COEF_C = 1800,
  parameter int unsigned FRAC   = 8,
  parameter int unsigned BAND   = PID_BAND  // E_MAX: act on every error
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample,   // once per switching period
  input  logic              enable,   // PID mode
  input  logic              init,     // reset states on hand-back
  input  logic [DUTY_W-1:0] d_init,   // Vout/Vg in DPWM counts
  input  err_t              e,
  output logic [DUTY_W-1:0] duty
);

  localparam int unsigned ACC_W = DUTY_W + FRAC + 8;
  localparam logic signed [ACC_W-1:0] ACC_MAX =
    ACC_W'(longint'(DPWM_PERIOD) - 64'sd1) <<< FRAC;

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t acc, acc_next;
  err_t e1, e2;
  logic in_band;

  assign in_band = (e <= $signed(E_W'(BAND))) &&
                   (e >= -$signed(E_W'(BAND)));

  always_comb begin
    acc_next = acc + acc_t'(COEF_A) * acc_t'(e)
                   + acc_t'(COEF_B) * acc_t'(e1)
                   + acc_t'(COEF_C) * acc_t'(e2);
    if (acc_next < 0)        acc_next = '0;
    if (acc_next > ACC_MAX)  acc_next = ACC_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= acc_t'(d_init) <<< FRAC;
      e1  <= '0;
      e2  <= '0;
    end else if (init) begin
      acc <= acc_t'(d_init) <<< FRAC;
      e1  <= '0;
      e2  <= '0;
    end else if (sample && enable && in_band) begin
      acc <= acc_next;
      e1  <= e;
      e2  <= e1;
    end
  end

  assign duty = DUTY_W'(acc >>> FRAC);

endmodule
