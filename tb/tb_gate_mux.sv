// tb_gate_mux - random select and inputs; c must equal the selected input
// of the previous clock.
module tb_gate_mux;
  logic clk = 0, rst_n = 0;
  logic sel = 0, pwm = 0, onoff = 0;
  logic c;
  int checks = 0, failures = 0;

  gate_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sel = 1'($urandom_range(1)); pwm = 1'($urandom_range(1)); onoff = 1'($urandom_range(1));
      exp_c = sel ? onoff : pwm;
      @(posedge clk); #1;
      checks++;
      if (c != exp_c) begin failures++; $display("FAIL t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
