// flash_adc - behavioural model of the asynchronous flash ADC (comparator
// array). Not synthesizable logic: the comparators are analog parts.
//
// Each of the 2*E_MAX comparators compares the sensed output voltage with a
// threshold placed half an LSB off a level of the reference grid:
//   therm[k] = vsense > Vref + (k - E_MAX + 0.5) * LSB_V,  k = 0 .. 2*E_MAX-1
// so the number of ones is E_MAX when vsense is within half an LSB of Vref.
// There is no clock: an output changes as soon as vsense crosses its
// threshold, which is the continuous-time quantisation of the source design.
// Vref[n] arrives as a digital word in LSB units through an ideal reference
// DAC. The comparator count and the 10 mV step are choices of this model.
module flash_adc
  import ctdsp_pkg::*;
#(
  parameter int unsigned EMAX  = E_MAX,
  parameter real         LSB_V = 0.01
) (
  input  real                   vsense,     // H1 * vout(t), volts
  input  logic [VREF_W-1:0]     vref_code,  // Vref[n], LSB units
  output logic [2*EMAX-1:0]     therm       // comparator outputs
);

  real vref_v;
  assign vref_v = real'(vref_code) * LSB_V;

  for (genvar k = 0; k < 2 * EMAX; k++) begin : g_cmp
    real thr;
    assign thr      = vref_v + (real'(k) - real'(EMAX) + 0.5) * LSB_V;
    assign therm[k] = (vsense > thr);
  end

endmodule
