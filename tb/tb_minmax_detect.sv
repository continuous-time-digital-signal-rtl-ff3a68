// tb_minmax_detect - feeds staircase valley and peak waveforms of the error
// (rise in steps, a dwell of D cycles at the deepest level, fall in steps)
// and checks that exactly one `found` pulse comes one clock after the level
// is left, with dv = deepest level, lag = D/2 and the right polarity.
// Depths up to the full comparator span and a dwell longer than the
// 12-bit dwell counter (lag then saturates at 2048) are included.
module tb_minmax_detect;
  import ctdsp_pkg::*;

  localparam int T = 5;        // delay cell used for e_del
  logic clk = 0, rst_n = 0;
  logic arm = 0;
  err_t e_now = '0, e_del;
  logic found;
  pol_e pol;
  logic [DV_W-1:0] dv;
  tcyc_t lag;
  int checks = 0, failures = 0;
  int cyc = 0;
  err_t line [T];

  minmax_detect dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    line[0] <= e_now;
    for (int i = 1; i < T; i++) line[i] <= line[i-1];
  end
  assign e_del = line[T-1];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // sgn = +1 valley (error positive), -1 peak
  task automatic excursion(int sgn, int depth, int dwell, int step);
    int nfound = 0, t_leave = 0, t_found = 0;
    logic [DV_W-1:0] dv_seen = '0;
    tcyc_t lag_seen = '0;
    pol_e pol_seen = POL_DIP;
    @(negedge clk);
    e_now = err_t'(sgn * 4);
    arm = 1;
    @(negedge clk);
    arm = 0;
    fork
      begin
        for (int l = 5; l <= depth; l++) begin
          repeat (step - 1) @(negedge clk);
          e_now = err_t'(sgn * l);
          @(negedge clk);
        end
        repeat (dwell - 1) @(negedge clk);
        e_now = err_t'(sgn * (depth - 1));
        t_leave = cyc;
        for (int l = depth - 2; l >= 0; l--) begin
          repeat (step) @(negedge clk);
          e_now = err_t'(sgn * l);
        end
        repeat (20) @(negedge clk);
      end
      begin
        forever begin
          @(posedge clk); #1;
          if (found) begin
            nfound++;
            t_found = cyc;
            dv_seen = dv; lag_seen = lag; pol_seen = pol;
          end
        end
      end
    join_any
    disable fork;
    check("one found pulse", nfound == 1);
    check("found one clock after leaving the extreme", t_found == t_leave + 1);
    check("dv", int'(dv_seen) == depth);
    // the dwell counter saturates at 2^T_W - 1 cycles
    check("lag = dwell/2", int'(lag_seen) == ((dwell > (1 << T_W)) ? (1 << T_W) : dwell) / 2);
    check("polarity", pol_seen == ((sgn > 0) ? POL_DIP : POL_OVERSHOOT));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    excursion(+1, 10, 40, 20);
    excursion(-1, 7, 64, 15);
    excursion(+1, 15, 13, 30);
    excursion(-1, 12, 100, 8);
    excursion(+1, int'(E_MAX), 30, 12);  // full depth of the comparator span
    excursion(-1, int'(E_MAX), 7, 25);
    excursion(+1, 6, 5000, 10);          // dwell beyond the 12-bit counter
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
