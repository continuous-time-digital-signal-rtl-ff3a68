// ctdsp_pkg - constants and types shared by the dual-mode buck controller.
//
// The controller regulates a 5 V -> 2 V, 400 kHz buck converter. In steady
// state an incremental PID drives a counter DPWM; on a load transient a
// continuous-time DSP path (asynchronous flash ADC, delay lines, min/max
// detection, charge-balance timing) takes the switch over for one on-off
// action. The switching frequency, the +-3 LSB PID band, L = 10 uH,
// C = 20 uF, Vg = 5 V and Vout = 2 V follow the source design. The 200 MHz
// controller clock, the 10 mV ADC step, the +-31 LSB ADC span and all word
// widths are choices of this implementation.
package ctdsp_pkg;

  // Clocking and switching
  localparam int unsigned CLK_HZ      = 200_000_000;
  localparam int unsigned FSW_HZ      = 400_000;
  localparam int unsigned DPWM_PERIOD = CLK_HZ / FSW_HZ;   // 500 counts
  localparam int unsigned DUTY_W      = $clog2(DPWM_PERIOD); // 9 bits

  // Error quantiser: e = Vref - vout in ADC steps, limited to +-E_MAX
  localparam int unsigned E_MAX = 31;
  localparam int unsigned N_CMP = 2 * E_MAX;                 // comparators
  localparam int unsigned E_W   = $clog2(E_MAX + 1) + 1;     // signed width
  localparam int unsigned DV_W  = E_W - 1;                   // |e| width
  typedef logic signed [E_W-1:0] err_t;

  // PID band: the PID runs while |e| <= PID_BAND
  localparam int unsigned PID_BAND = 3;

  // Timing words of the on/off controller, in clock cycles
  localparam int unsigned T_W = 12;
  typedef logic [T_W-1:0] tcyc_t;

  // Vref[n] word, in ADC steps
  localparam int unsigned VREF_W = 10;

  // Square-root table fraction bits and charge-balance factors.
  // K_ON = sqrt(2*L*C*LSB*Vout / (Vg*(Vg-Vout))) * CLK_HZ
  //      = sqrt(2*10u*20u*10m*2 / (5*3)) * 200 MHz = 146 cycles
  // R_OFF = (Vg - Vout)/Vout = 1.5 -> 384 in Q4.8
  localparam int unsigned LUT_FRAC  = 8;
  localparam int unsigned K_ON_DEF  = 146;
  localparam int unsigned R_OFF_DEF = 384;
  // Initial duty on hand-back: Vout/Vg = 0.4 of the period
  localparam int unsigned D_INIT_DEF = DPWM_PERIOD * 2 / 5;

  // Which on/off sequence a transient needs
  typedef enum logic {
    POL_OVERSHOOT = 1'b0,   // vout above Vref: off first, then on
    POL_DIP       = 1'b1    // vout below Vref: on first, then off
  } pol_e;

  // Integer square root of n scaled by 2^(2*frac): round(sqrt(n) * 2^frac)
  function automatic int unsigned sqrt_fixed(int unsigned n, int unsigned frac);
    longint unsigned x, r, b;
    x = longint'(n) << (2 * frac);
    r = 0;
    for (int i = 31; i >= 0; i--) begin
      b = r | (64'd1 << i);
      if (b * b <= x) r = b;
    end
    // round to nearest: compare x with (r + 0.5)^2 = r^2 + r + 0.25
    if (x > r * r + r) r = r + 1;
    return int'(r);
  endfunction

endpackage
