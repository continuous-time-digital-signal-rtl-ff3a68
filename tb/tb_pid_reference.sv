// tb_pid_reference - the dual-mode controller against a conventional PID
// controller on the same load steps.
//
// Two copies of the top run side by side, each closed around its own
// behavioural 5 V -> 2 V buck (10 uH, 20 uF, 50 mOhm) with the same load
// current: the dual-mode controller at its defaults, and a copy built with
// CTDSP_EN = 0, in which mode selection never leaves PID mode and the PID
// acts on every error. The PID-only copy gets coefficients of its own
// (A = 4000, B = -7200, C = 3300), tuned for settling without the on/off
// path. The load steps 0.2 A -> 1.2 A -> 0.2 A. For each step the PID-only
// peak deviation |vout - 2 V| and its settling time (last cycle outside the
// +-3 LSB band) are measured. Checked: the reference settles, the
// dual-mode controller beats it in peak deviation and in recovery time, the
// reference never leaves PID mode, and the dual-mode checks of the
// end-to-end test.
`timescale 1ns / 1ps
module tb_pid_reference;
  import ctdsp_pkg::*;

  logic clk = 0, rst_n = 0;
  real  vout, il, iload = 0.2;
  logic gate_hs, gate_ls, mode_ctdsp;
  err_t err;
  int checks = 0, failures = 0;

  ctdsp_smps_ctrl dut (
    .clk, .rst_n,
    .vsense    (vout),
    .vref_code (10'd200),                 // 2.00 V
    .k_on      (tcyc_t'(K_ON_DEF)),
    .r_off     (tcyc_t'(R_OFF_DEF)),
    .d_init    (9'd206),                 // Vout/Vg_eff, see above,
    .tap_t     (6'd15),                   // T = 16 cycles = 80 ns
    .gate_hs, .gate_ls, .mode_ctdsp, .err
  );

  buck_model #(.RL(0.05), .V0(2.0), .I0(0.2)) plant (
    .clk, .gate_hs, .gate_ls, .iload, .vout, .il
  );

  // reference: the same controller with the CT-DSP path disabled (a
  // conventional PID controller) on an identical power stage and load. Its
  // PID acts on the whole error range, so it gets coefficients of its own,
  // tuned for settling without the on/off path (about 250 mV / 50 us).
  real  vout_p, il_p;
  logic hs_p, ls_p, mode_p;
  err_t err_p;

  ctdsp_smps_ctrl #(
    .CTDSP_EN(1'b0), .PID_A(4000), .PID_B(-7200), .PID_C(3300)
  ) dut_pid (
    .clk, .rst_n,
    .vsense    (vout_p),
    .vref_code (10'd200),
    .k_on      (tcyc_t'(K_ON_DEF)),
    .r_off     (tcyc_t'(R_OFF_DEF)),
    .d_init    (9'd206),
    .tap_t     (6'd15),
    .gate_hs   (hs_p), .gate_ls (ls_p), .mode_ctdsp (mode_p), .err (err_p)
  );

  buck_model #(.RL(0.05), .V0(2.0), .I0(0.2)) plant_pid (
    .clk, .gate_hs (hs_p), .gate_ls (ls_p), .iload, .vout (vout_p), .il (il_p)
  );

  always #2.5 clk = ~clk;

  // watchdog: 1 ms of simulated time
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int n_pid_upd = 0, n_trigger = 0, n_handback = 0, n_valley = 0, n_peak = 0;
  int n_cb = 0, n_dead = 0, n_shoot = 0, n_gate_edges_ct = 0;
  logic c_q = 0, hs_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.sample && !dut.u_core.mode_ctdsp && err <= 3 && err >= -3) n_pid_upd++;
    if (dut.u_core.trigger)  n_trigger++;
    if (dut.u_core.pid_init) n_handback++;
    if (dut.u_core.mm_found && dut.u_core.u_mm.pol == POL_DIP) n_valley++;
    if (dut.u_core.mm_found && dut.u_core.u_mm.pol == POL_OVERSHOOT) n_peak++;
    if (dut.u_core.cb_valid) n_cb++;
    if (!gate_hs && !gate_ls) n_dead++;
    if (gate_hs && gate_ls) n_shoot++;
    if (dut.u_core.onoff_active && gate_hs != hs_q && gate_hs) n_gate_edges_ct++;
    hs_q <= gate_hs;
  end

  // watch a window: peak deviation, and time to settle back in PID mode
  // PID-only reference: peak deviation |vout_p - 2 V| and the last cycle
  // its error was outside the +-3 LSB band, both since pid_reset()
  real pid_dev = 0.0;
  int  pid_settle = 0, cyc = 0, step_cyc = 0;
  function automatic void pid_reset();
    pid_dev = 0.0; pid_settle = cyc; step_cyc = cyc;
  endfunction
  task automatic window(int cycles, output real vmin, output real vmax,
                        output int t_back, output int max_abs_e);
    int hb_start = n_handback;
    vmin = 10.0; vmax = -10.0; t_back = -1; max_abs_e = 0;
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk); #0.1;
      cyc++;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
      if (vout_p - 2.0 > pid_dev) pid_dev = vout_p - 2.0;
      if (2.0 - vout_p > pid_dev) pid_dev = 2.0 - vout_p;
      if (err_p > 3 || err_p < -3) pid_settle = cyc;
      if (t_back < 0 && n_handback > hb_start) t_back = i;
      if ((err > 0 ? int'(err) : -int'(err)) > max_abs_e) max_abs_e = err > 0 ? int'(err) : -int'(err);
    end
  endtask

  initial begin
    real vmin, vmax, dev_ct;
    int tb1, mae, trig0, hb0, edges0, t_ct;
    repeat (10) @(posedge clk);
    rst_n = 1;

    // 1. settle at 0.2 A
    window(40000, vmin, vmax, tb1, mae);          // 200 us
    window(20000, vmin, vmax, tb1, mae);          // 100 us
    $display("steady 0.2 A: vout %.4f .. %.4f, max |e| %0d", vmin, vmax, mae);
    check("steady state at 0.2 A within the PID band", mae <= 3);

    // 2. light-to-heavy step 0.2 A -> 1.2 A
    trig0 = n_trigger; hb0 = n_handback; edges0 = n_gate_edges_ct;
    iload = 1.2;
    pid_reset();
    window(4000, vmin, vmax, tb1, mae);           // 20 us
    $display("step up: vmin %.4f, back to PID after %0d cycles (%.2f us), valley=%0d",
             vmin, tb1, tb1 * 0.005, n_valley);
    check("step up handled by the on/off controller", n_trigger - trig0 >= 1);
    check("dip below 150 mV", vmin > 1.85);
    dev_ct = 2.0 - vmin; t_ct = tb1;
    check("recovery (hand-back to PID) within 12 us of the step", tb1 > 0 && tb1 <= 2400);
    window(56000, vmin, vmax, tb1, mae);          // 280 us
    $display("steady 1.2 A: vout %.4f .. %.4f, max |e| %0d, triggers %0d", vmin, vmax, mae, n_trigger - trig0);
    check("single on-off action for the step up", n_trigger - trig0 == 1);
    check("steady state at 1.2 A within the PID band", mae <= 3);
    $display("PID only, step up: peak deviation %.4f V, settled in %.2f us",
             pid_dev, (pid_settle - step_cyc) * 0.005);
    check("PID-only reference settles after the step up", pid_settle - step_cyc < 30000);
    check("smaller dip than the PID-only reference", dev_ct < pid_dev);
    check("faster recovery than the PID-only reference", t_ct < pid_settle - step_cyc);

    // 3. heavy-to-light step 1.2 A -> 0.2 A
    trig0 = n_trigger;
    iload = 0.2;
    pid_reset();
    window(4000, vmin, vmax, tb1, mae);
    $display("step down: vmax %.4f, back to PID after %0d cycles (%.2f us), peak=%0d",
             vmax, tb1, tb1 * 0.005, n_peak);
    check("step down handled by the on/off controller", n_trigger - trig0 >= 1);
    check("recovery (hand-back to PID) within 12 us of the step", tb1 > 0 && tb1 <= 2400);
    check("overshoot below 200 mV", vmax < 2.20);
    dev_ct = vmax - 2.0; t_ct = tb1;
    window(56000, vmin, vmax, tb1, mae);
    $display("steady 0.2 A: vout %.4f .. %.4f, max |e| %0d, triggers %0d", vmin, vmax, mae, n_trigger - trig0);
    check("single off-on action for the step down", n_trigger - trig0 == 1);
    check("steady state at 0.2 A within the PID band", mae <= 3);
    $display("PID only, step down: peak deviation %.4f V, settled in %.2f us",
             pid_dev, (pid_settle - step_cyc) * 0.005);
    check("PID-only reference settles after the step down", pid_settle - step_cyc < 30000);
    check("smaller overshoot than the PID-only reference", dev_ct < pid_dev);
    check("faster recovery than the PID-only reference", t_ct < pid_settle - step_cyc);
    check("PID-only reference never left PID mode", !mode_p);

    // mechanisms
    $display("mechanisms: pid updates %0d, triggers %0d, hand-backs %0d, valleys %0d, peaks %0d, t_on/t_off %0d, dead-time cycles %0d",
             n_pid_upd, n_trigger, n_handback, n_valley, n_peak, n_cb, n_dead);
    check("PID updates", n_pid_upd > 100);
    check("mode switch to CT-DSP", n_trigger >= 2);
    check("hand-back to PID", n_handback >= 2);
    check("valley detected", n_valley >= 1);
    check("peak detected", n_peak >= 1);
    check("charge-balance calculation", n_cb >= 2);
    check("dead time inserted", n_dead > 100);
    check("no shoot-through", n_shoot == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
