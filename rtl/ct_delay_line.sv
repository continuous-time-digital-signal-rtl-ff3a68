// ct_delay_line - comparator synchroniser, error encoder and programmable
// delay cell of the CT-DSP front end.
//
// The thermometer word of the flash ADC passes a two-flop synchroniser; its
// ones are counted (a bubble-tolerant encoding) and turned into the signed
// error e(t) = E_MAX - ones, i.e. Vref - vout in ADC steps, positive when the
// output is low. The source design emulates its programmable delay cells in
// the FPGA fabric; here that is a DEPTH-deep shift register of e(t) with a
// run-time tap, so e_del = e(t - T) with T = tap_t clock cycles (1..DEPTH).
// Delaying the encoded error rather than each comparator bit is equivalent
// for a thermometer code and is this implementation's choice.
// Timing: e_now follows a comparator change after 3 clock edges
// (2 synchroniser flops + encoder register); e_del follows e_now by T edges.
module ct_delay_line
  import ctdsp_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_CMP-1:0]         therm,
  input  logic [$clog2(DEPTH)-1:0] tap_t,   // T-1: 0 selects one cycle
  output err_t                     e_now,
  output err_t                     e_del
);

  logic [N_CMP-1:0] sync1, sync2;
  err_t             line [DEPTH];

  // count of comparators that are high
  function automatic err_t encode(logic [N_CMP-1:0] t);
    int unsigned ones;
    ones = 0;
    for (int i = 0; i < N_CMP; i++) ones += int'(t[i]);
    return err_t'(int'(E_MAX) - int'(ones));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= N_CMP'({E_MAX{1'b1}});  // mid-scale: e = 0
      sync2 <= N_CMP'({E_MAX{1'b1}});
      e_now <= '0;
    end else begin
      sync1 <= therm;
      sync2 <= sync1;
      e_now <= encode(sync2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) line[i] <= '0;
    end else begin
      line[0] <= e_now;
      for (int i = 1; i < DEPTH; i++) line[i] <= line[i-1];
    end
  end

  assign e_del = line[tap_t];

endmodule
