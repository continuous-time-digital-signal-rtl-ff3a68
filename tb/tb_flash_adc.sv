// tb_flash_adc - checks the comparator array model: for a sweep of sensed
// voltages around Vref = 2.00 V, the thermometer word must be a contiguous
// run of ones whose length equals E_MAX - round((Vref - v)/LSB), limited to
// the 0 .. 2*E_MAX range.
module tb_flash_adc;
  import ctdsp_pkg::*;

  real              vsense;
  logic [VREF_W-1:0] vref_code;
  logic [N_CMP-1:0] therm;
  int checks = 0, failures = 0;

  flash_adc dut (.vsense(vsense), .vref_code(vref_code), .therm(therm));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, exp_ones, e;
    real vref;
    for (int r = 0; r < 2; r++) begin
      vref_code = (r == 0) ? 10'd200 : 10'd120;
      vref = real'(vref_code) * 0.01;
      for (int i = -250; i <= 250; i++) begin
        vsense = vref + real'(i) * 0.001 + 0.0003;
        #1;
        e = int'($floor((vref - vsense) / 0.01 + 0.5));
        if (e > int'(E_MAX)) e = E_MAX;
        if (e < -int'(E_MAX)) e = -int'(E_MAX);
        exp_ones = int'(E_MAX) - e;
        ones = $countones(therm);
        checks++;
        if (ones != exp_ones || therm != N_CMP'((64'd1 << ones) - 1)) begin
          failures++;
          $display("FAIL v=%f therm=%b exp ones=%0d", vsense, therm, exp_ones);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
