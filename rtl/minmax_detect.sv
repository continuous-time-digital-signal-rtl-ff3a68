// minmax_detect - finds the valley (or peak) of the output voltage after a
// load transient, from the quantised error and its delayed copy.
//
// On `arm` the polarity is taken from the sign of e(t): a positive error
// (output below Vref) means a valley is sought, a negative one a peak. The
// error is then followed as a magnitude m = +-e in the direction of the
// excursion. Whenever m reaches a new extreme level, a counter restarts (the
// entry time t1 into that level). The extreme is declared when m has left
// the extreme level and is also smaller than its value one delay cell
// earlier, m(t) < m(t-T): the slope of the reconstructed waveform has
// changed sign. As in the source design the extreme instant is the middle of
// the time spent at the deepest level, so `lag` = (t2 - t1)/2 is the time
// that has already passed since the extreme when `found` pulses at t2.
// The dwell counter saturates at 2^T_W - 1 cycles (about 20 us).
// `dv` is the deepest level in ADC steps. The tracking rule is the source
// design's description; the counter and the exact slope test are this
// implementation's choices. One `found` pulse per `arm`; the search is
// idle until the next `arm`.
module minmax_detect
  import ctdsp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            arm,       // start a new search
  input  err_t            e_now,     // e(t)
  input  err_t            e_del,     // e(t - T)
  output logic            found,     // one-cycle pulse at the extreme
  output pol_e            pol,       // valley (POL_DIP) or peak
  output logic [DV_W-1:0] dv,        // |e| at the extreme
  output tcyc_t           lag        // cycles elapsed since the extreme
);

  typedef enum logic [1:0] {S_IDLE, S_TRACK} state_e;
  state_e state;

  logic signed [E_W:0] m_now, m_del, ext;
  tcyc_t               cnt;

  // magnitude in the direction of the excursion
  always_comb begin
    if (pol == POL_DIP) begin
      m_now = (E_W+1)'(e_now);
      m_del = (E_W+1)'(e_del);
    end else begin
      m_now = -(E_W+1)'(e_now);
      m_del = -(E_W+1)'(e_del);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pol   <= POL_DIP;
      ext   <= '0;
      cnt   <= '0;
      found <= 1'b0;
      dv    <= '0;
      lag   <= '0;
    end else begin
      found <= 1'b0;
      if (arm) begin
        state <= S_TRACK;
        pol   <= (e_now > 0) ? POL_DIP : POL_OVERSHOOT;
        ext   <= (e_now > 0) ? (E_W+1)'(e_now) : -(E_W+1)'(e_now);
        cnt   <= '0;
      end else if (state == S_TRACK) begin
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (m_now > ext) begin
          ext <= m_now;          // deeper level reached: new t1
          cnt <= '0;
        end else if (m_now < ext && m_now < m_del) begin
          state <= S_IDLE;       // slope reversed: extreme passed
          found <= 1'b1;
          dv    <= DV_W'(ext);
          lag   <= tcyc_t'(({1'b0, cnt} + 1'b1) >> 1);
        end
      end
    end
  end

endmodule
