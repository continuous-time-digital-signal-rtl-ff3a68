// charge_balance - optimal on/off times of the single switching action.
//
// Capacitor charge balance for a small deviation dV gives
//   t_on  = sqrt(2*L*C*dV*Vout / (Vg*(Vg - Vout)))
//   t_off = t_on * (Vg - Vout) / Vout
// With dV = n ADC steps, t_on = K_on * sqrt(n), where K_on depends only on
// L*C, Vg and Vout and is loaded at run time (k_on, in clock cycles per
// sqrt(step)); r_off = (Vg - Vout)/Vout in Q4.8. As in the source design the
// radical comes from a look-up table: SQRT[n] = round(sqrt(n) * 2^LUT_FRAC),
// n = 0 .. E_MAX, computed at elaboration. Two pipeline stages: t_on is
// registered one cycle after `start`, t_off and `valid` two cycles after.
// Results saturate at the T_W-bit maximum.
module charge_balance
  import ctdsp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [DV_W-1:0] dv,      // deviation in ADC steps
  input  tcyc_t           k_on,    // cycles per sqrt(step)
  input  tcyc_t           r_off,   // (Vg-Vout)/Vout, Q4.8
  output logic            valid,
  output tcyc_t           t_on,
  output tcyc_t           t_off
);

  localparam int unsigned LUT_W = $clog2(E_MAX + 1) / 2 + 1 + LUT_FRAC + 1;
  localparam int unsigned NLUT  = 2 ** DV_W;

  typedef logic [LUT_W-1:0] lut_t;

  function automatic lut_t sqrt_entry(int unsigned n);
    return lut_t'(sqrt_fixed(n, LUT_FRAC));
  endfunction

  lut_t sqrt_lut [NLUT];
  for (genvar n = 0; n < NLUT; n++) begin : g_lut
    assign sqrt_lut[n] = sqrt_entry(n);
  end

  logic                    stage1;
  logic [T_W+LUT_W-1:0]    prod_on;
  logic [2*T_W-1:0]        prod_off;

  assign prod_on  = k_on * sqrt_lut[dv];
  assign prod_off = t_on * r_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= 1'b0;
      valid  <= 1'b0;
      t_on   <= '0;
      t_off  <= '0;
    end else begin
      stage1 <= start;
      valid  <= stage1;
      if (start)
        t_on <= (prod_on >> LUT_FRAC) > (T_W+LUT_W)'({T_W{1'b1}})
              ? '1 : T_W'(prod_on >> LUT_FRAC);
      if (stage1)
        t_off <= (prod_off >> LUT_FRAC) > (2*T_W)'({T_W{1'b1}})
               ? '1 : T_W'(prod_off >> LUT_FRAC);
    end
  end

endmodule
