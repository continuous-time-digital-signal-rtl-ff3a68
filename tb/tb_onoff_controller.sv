// tb_onoff_controller - runs the on/off controller against scripted min/max
// and charge-balance responders. For a dip it checks: gate on from the
// trigger, on for t_on counted from the extreme (lag credited), then off for
// t_off, then `done`; for an overshoot the mirrored off-on sequence; and the
// phase-1 time-out when no extreme is reported.
module tb_onoff_controller;
  import ctdsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic trigger = 0;
  err_t e_now = '0;
  logic mm_arm, mm_found = 0;
  tcyc_t mm_lag = '0;
  logic cb_start, cb_valid = 0;
  tcyc_t cb_t_on = '0, cb_t_off = '0;
  logic gate, active, done;
  int checks = 0, failures = 0;
  int cyc = 0;

  onoff_controller #(.PHASE1_MAX(300)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // charge-balance responder: valid two cycles after start
  always @(posedge clk) begin
    cb_valid <= 1'b0;
    if (cb_start) fork
      begin @(posedge clk); cb_valid <= 1'b1; end
    join_none
  end

  task automatic action(int err, int seek, int lag, int ton, int toff);
    int t_found, t_edge1 = -1, t_done = -1;
    int first, second;
    logic g0, armed = 0;
    cb_t_on = tcyc_t'(ton); cb_t_off = tcyc_t'(toff);
    @(negedge clk);
    e_now = err_t'(err);
    trigger = 1;
    @(negedge clk);
    trigger = 0;
    // one clock after the trigger the first state is on the gate
    check("armed", mm_arm == 1);
    check("active", active == 1);
    check("first gate level", gate == (err > 0));
    g0 = gate;
    repeat (seek) begin
      @(negedge clk);
      check("gate holds in phase 1", gate == g0);
    end
    mm_lag = tcyc_t'(lag); mm_found = 1;
    t_found = cyc;
    @(negedge clk);
    mm_found = 0;
    while (t_done < 0 && cyc < t_found + 20000) begin
      @(negedge clk);
      if (t_edge1 < 0 && gate != g0) t_edge1 = cyc;
      if (done) t_done = cyc;
    end
    first  = (err > 0) ? ton : toff;
    second = (err > 0) ? toff : ton;
    // gate toggles `first` cycles after the extreme (= t_found - lag)
    if (lag + 4 < first)
      check("first interval", (t_edge1 - (t_found - lag)) >= first &&
                              (t_edge1 - (t_found - lag)) <= first + 2);
    else  // the extreme was found too late: end the first interval at once
      check("first interval cut short", t_edge1 - t_found <= 5);
    check("second interval", (t_done - t_edge1) >= second &&
                             (t_done - t_edge1) <= second + 2);
    @(negedge clk);
    check("released", active == 0);
  endtask

  initial begin
    int t0, tdone;
    repeat (3) @(posedge clk);
    rst_n = 1;
    action(+6, 50, 20, 300, 450);     // dip: on - off
    action(-5, 80, 35, 250, 375);     // overshoot: off - on
    action(+9, 10, 4, 438, 657);
    action(+4, 30, 200, 100, 150);    // lag longer than t_on: turns off at once
    // time-out: no extreme is reported
    @(negedge clk);
    e_now = 7; trigger = 1;
    @(negedge clk);
    trigger = 0;
    t0 = cyc; tdone = -1;
    while (tdone < 0 && cyc < t0 + 1000) begin
      @(negedge clk);
      if (done) tdone = cyc;
    end
    check("phase-1 time-out", tdone > t0 + 290 && tdone < t0 + 310);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
