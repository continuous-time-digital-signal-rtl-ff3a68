// tb_charge_balance - checks t_on = floor(k_on * round(256*sqrt(dv)) / 256)
// and t_off = floor(t_on * r_off / 256) against a real-number reference for
// every dv and several k_on / r_off settings, plus the 2-cycle latency and
// saturation.
module tb_charge_balance;
  import ctdsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [DV_W-1:0] dv = '0;
  tcyc_t k_on = '0, r_off = '0;
  logic valid;
  tcyc_t t_on, t_off;
  int checks = 0, failures = 0;

  charge_balance dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int n, int k, int r);
    int lut, exp_on, exp_off, lat;
    lut = int'($floor($sqrt(real'(n)) * 256.0 + 0.5));
    exp_on = (k * lut) / 256;
    if (exp_on > 4095) exp_on = 4095;
    exp_off = (exp_on * r) / 256;
    if (exp_off > 4095) exp_off = 4095;
    @(negedge clk);
    dv = DV_W'(n); k_on = tcyc_t'(k); r_off = tcyc_t'(r); start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!valid && lat < 10) begin @(negedge clk); lat++; end
    checks += 3;
    if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
    if (int'(t_on) != exp_on) begin failures++; $display("FAIL t_on n=%0d k=%0d: %0d exp %0d", n, k, t_on, exp_on); end
    if (int'(t_off) != exp_off) begin failures++; $display("FAIL t_off n=%0d r=%0d: %0d exp %0d", n, r, t_off, exp_off); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n <= int'(E_MAX); n++) begin
      one(n, K_ON_DEF, R_OFF_DEF);
      one(n, 100, 256);
      one(n, 1000, 1000);
      one(n, int'($urandom_range(4095)), int'($urandom_range(4095)));
    end
    // paper operating point: dV = 100 mV -> t_on = 2.31 us, t_off = 3.46 us
    one(10, K_ON_DEF, R_OFF_DEF);
    checks++;
    if (t_on < 455 || t_on > 470 || t_off < 685 || t_off > 700) begin
      failures++; $display("FAIL operating point t_on=%0d t_off=%0d", t_on, t_off);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
