// tb_mode_select - random error sequence with random `done` pulses, checked
// against a reference of the mode rule: leave PID mode (with a trigger
// pulse) the cycle after |e| > 3, return (with a pid_init pulse) the cycle
// after done. A second instance with ENABLE = 0 must stay in PID mode.
module tb_mode_select;
  import ctdsp_pkg::*;

  logic clk = 0, rst_n = 0;
  err_t e_now = '0;
  logic done = 0;
  logic mode_ctdsp, trigger, pid_init;
  int checks = 0, failures = 0;
  int n_trig = 0, n_init = 0;

  mode_select dut (.*);

  logic mode_off, trig_off, init_off;
  mode_select #(.ENABLE(1'b0)) dut_off (
    .clk, .rst_n, .e_now, .done,
    .mode_ctdsp (mode_off), .trigger (trig_off), .pid_init (init_off)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m_mode, m_trig, m_init;
    int e;
    m_mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      e = ($urandom_range(9) == 0) ? int'($urandom_range(2 * E_MAX)) - int'(E_MAX)
                                   : int'($urandom_range(6)) - 3;
      e_now = err_t'(e);
      done  = ($urandom_range(15) == 0);
      // reference for the next clock edge
      m_trig = 0; m_init = 0;
      if (!m_mode && (e > 3 || e < -3)) begin m_mode = 1; m_trig = 1; end
      else if (m_mode && done) begin m_mode = 0; m_init = 1; end
      @(posedge clk); #1;
      checks++;
      if (mode_ctdsp != m_mode || trigger != m_trig || pid_init != m_init) begin
        failures++;
        $display("FAIL t=%0d e=%0d mode=%b/%b trig=%b/%b init=%b/%b", t, e,
                 mode_ctdsp, m_mode, trigger, m_trig, pid_init, m_init);
      end
      checks++;
      if (mode_off || trig_off || init_off) begin
        failures++; $display("FAIL t=%0d disabled instance left PID mode", t);
      end
      n_trig += int'(trigger); n_init += int'(pid_init);
    end
    checks++;
    if (n_trig < 10 || n_init < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
