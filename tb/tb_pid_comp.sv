// tb_pid_comp - random in-band and out-of-band errors on random sample
// strobes, against an integer reference of
//   d[n] = d[n-1] + A e[n] + B e[n-1] + C e[n-2]
// with saturation to 0 .. PERIOD-1 counts, the +-3 band gate, the enable
// gate and the hand-back initialisation. A second instance with
// BAND = E_MAX (PID-only operation) is checked against the same reference
// without the band gate.
module tb_pid_comp;
  import ctdsp_pkg::*;

  localparam int A = 3200, B = -4800, C = 1800, FR = 8;
  logic clk = 0, rst_n = 0;
  logic sample = 0, enable = 1, init = 0;
  logic [DUTY_W-1:0] d_init = 9'd200;
  err_t e = '0;
  logic [DUTY_W-1:0] duty;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  pid_comp dut (.*);

  logic [DUTY_W-1:0] duty_all;
  pid_comp #(.BAND(E_MAX)) dut_all (
    .clk, .rst_n, .sample, .enable, .init, .d_init, .e, .duty (duty_all)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, nxt, acc_a;
    int e1, e2, ei, a1, a2, n_wide = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    acc = 200 << FR; e1 = 0; e2 = 0;
    acc_a = 200 << FR; a1 = 0; a2 = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      sample = ($urandom_range(3) == 0);
      enable = ($urandom_range(7) != 0);
      init   = ($urandom_range(199) == 0);
      if (init) d_init = DUTY_W'($urandom_range(499));
      ei = ($urandom_range(15) == 0) ? int'($urandom_range(2 * E_MAX)) - int'(E_MAX)
         : ((t / 2000) % 2 == 0) ? int'($urandom_range(2))       // drift up
                                 : -int'($urandom_range(2));     // drift down
      e = err_t'(ei);
      @(posedge clk); #1;
      if (init) begin
        acc = longint'(d_init) << FR; e1 = 0; e2 = 0;
      end else if (sample && enable && ei <= 3 && ei >= -3) begin
        nxt = acc + A * ei + B * e1 + C * e2;
        if (nxt < 0) begin nxt = 0; n_sat_lo++; end
        if (nxt > (499 << FR)) begin nxt = 499 << FR; n_sat_hi++; end
        acc = nxt; e2 = e1; e1 = ei;
      end
      if (init) begin
        acc_a = longint'(d_init) << FR; a1 = 0; a2 = 0;
      end else if (sample && enable) begin
        if (ei > 3 || ei < -3) n_wide++;
        nxt = acc_a + A * ei + B * a1 + C * a2;
        if (nxt < 0) nxt = 0;
        if (nxt > (499 << FR)) nxt = 499 << FR;
        acc_a = nxt; a2 = a1; a1 = ei;
      end
      checks++;
      if (int'(duty_all) != int'(acc_a >> FR)) begin
        failures++;
        $display("FAIL t=%0d duty_all=%0d exp %0d", t, duty_all, acc_a >> FR);
      end
      checks++;
      if (int'(duty) != int'(acc >> FR)) begin
        failures++;
        $display("FAIL t=%0d duty=%0d exp %0d", t, duty, acc >> FR);
      end
    end
    checks++;
    if (n_wide < 50) begin
      failures++; $display("FAIL out-of-band updates not exercised %0d", n_wide);
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++; $display("FAIL saturation not exercised %0d %0d", n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
