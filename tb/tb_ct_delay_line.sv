// tb_ct_delay_line - drives thermometer codes of a random error sequence and
// checks e_now (3 clocks after the code) and e_del (T further clocks) for
// several tap settings.
module tb_ct_delay_line;
  import ctdsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [N_CMP-1:0] therm;
  logic [5:0] tap_t;
  err_t e_now, e_del;
  int checks = 0, failures = 0;
  int hist [0:4095];
  int cyc = 0;

  ct_delay_line #(.DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_CMP-1:0] code(int e);
    int ones = int'(E_MAX) - e;
    return N_CMP'((64'd1 << ones) - 1);
  endfunction

  initial begin
    int e;
    therm = code(0);
    tap_t = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    e = 0;
    for (int t = 0; t < 4000; t++) begin
      if (t % 1000 == 0) tap_t = 6'(t / 1000 * 21);   // T = 1, 22, 43, 64
      // random walk of the error
      e += int'($urandom_range(2)) - 1;
      if (e > int'(E_MAX)) e = E_MAX;
      if (e < -int'(E_MAX)) e = -int'(E_MAX);
      @(negedge clk);
      therm = code(e);
      hist[t] = e;
      @(posedge clk); #1;
      // therm applied at edge t is seen on e_now after edge t+2
      if (t >= 3) begin
        checks++;
        if (e_now !== err_t'(hist[t-2])) begin
          failures++;
          $display("FAIL t=%0d e_now=%0d exp %0d", t, e_now, hist[t-2]);
        end
        if ((t % 1000) > 70 && t > int'(tap_t) + 4) begin
          checks++;
          if (e_del !== err_t'(hist[t-2-int'(tap_t)-1])) begin
            failures++;
            $display("FAIL t=%0d T=%0d e_del=%0d exp %0d", t, tap_t + 1, e_del, hist[t-3-int'(tap_t)]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
