// dpwm - counter-based digital pulse-width modulator.
//
// A free-running counter of PERIOD clock cycles sets the switching
// frequency (500 cycles of 200 MHz = 400 kHz). `duty` is latched when the
// counter is at 0 and the output is high for counts 0 .. duty-1 (trailing-
// edge modulation). `sample` pulses at count PERIOD-2 so that a compensator
// registering on it has its new duty ready for the next period.
// `restart` (hand-back from the on/off controller) latches the duty at once
// and jumps into the period half-way through the interval the switch is
// already in: to count duty/2 if it was off (`restart_on` = 0), to
// duty + (PERIOD-duty)/2 if it was on. The on/off action ends with the
// inductor current equal to the load current, so this keeps the ripple
// centred on the load current instead of adding half a ripple to it, which
// would ring the LC filter. The counter structure, the sampling instant and
// the restart phase are this implementation's choices; the source design
// names only a DPWM.
module dpwm
  import ctdsp_pkg::*;
#(
  parameter int unsigned PERIOD = DPWM_PERIOD
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(PERIOD)-1:0] duty,
  input  logic                      restart,
  input  logic                      restart_on,  // switch level at restart
  output logic                      pwm,
  output logic                      sample
);

  localparam int unsigned CW = $clog2(PERIOD);
  logic [CW-1:0] cnt, duty_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      duty_q <= '0;
    end else if (restart) begin
      cnt    <= restart_on ? CW'((32'(duty) + PERIOD) >> 1) : (duty >> 1);
      duty_q <= duty;
    end else if (cnt == CW'(PERIOD - 1)) begin
      cnt    <= '0;
      duty_q <= duty;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    pwm    = (cnt < duty_q);
    sample = (cnt == CW'(PERIOD - 2));
  end

endmodule
