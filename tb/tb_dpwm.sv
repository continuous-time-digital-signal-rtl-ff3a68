// tb_dpwm - checks the 500-cycle (400 kHz at 200 MHz) period, a high time
// equal to the duty latched at the period start (duty also changed in
// mid-period), the sample strobe two cycles before the period end, and the
// restart input with its two entry phases (half-way into the on-time or
// into the off-time).
module tb_dpwm;
  import ctdsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [DUTY_W-1:0] duty = '0;
  logic restart = 0, restart_on = 0;
  logic pwm, sample;
  int checks = 0, failures = 0;

  dpwm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // monitor: at each falling edge look at the outputs of the current count
  int k = -1, high = 0, latched = -1, last_sample = -1, cyc = 0, periods = 0;
  logic monitor_on = 1;
  always @(negedge clk) if (rst_n && monitor_on) begin
    cyc++;
    if (sample) begin
      if (last_sample >= 0)
        check("period = 500 cycles", cyc - last_sample == int'(DPWM_PERIOD));
      last_sample = cyc;
      high += int'(pwm);                  // count 498
      k = 0;
    end else if (k >= 0) begin
      k++;
      high += int'(pwm);
      if (k == 1) begin                   // count 499: period complete
        if (latched >= 0) begin
          check("high time = latched duty", high == latched);
          periods++;
        end
        latched = int'(duty);             // latched at the coming edge
        high = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // duty changes at random instants, also mid-period
    repeat (40) begin
      repeat ($urandom_range(900) + 1) @(posedge clk);
      #2 duty = ($urandom_range(4) == 0) ? (($urandom_range(1) == 0) ? 9'd0 : 9'd499)
                                         : DUTY_W'($urandom_range(499));
    end
    check("periods measured", periods > 30);
    monitor_on = 0;
    // restart while off (restart_on = 0): enter at count duty/2, so duty/2
    // cycles of on-time remain; restart while on: enter at
    // (duty + PERIOD)/2, in the off-time. Sample comes at count 498.
    for (int r = 0; r < 2; r++) begin
      int h, n_to_sample;
      h = 0; n_to_sample = -1;
      @(posedge clk); #2;
      duty = 9'd200; restart = 1; restart_on = (r == 1);
      @(posedge clk); #2;
      restart = 0;
      for (int n = 0; n < 600; n++) begin
        if (n_to_sample < 0 && sample) n_to_sample = n;
        if (n_to_sample < 0) h += int'(pwm);
        @(posedge clk); #2;
      end
      check("restart phase", n_to_sample == ((r == 0) ? 398 : 148));
      check("remaining on-time after restart", h == ((r == 0) ? 100 : 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
