// tb_dead_time - random switch command with pulses from 1 to 40 cycles.
// Checks: the two gates are never on together; after each change of c both
// stay off for at least DT cycles; a level of c held long enough reaches its
// gate DT+1 cycles after the change; pulses shorter than DT are absorbed.
module tb_dead_time;
  localparam int DT = 4;
  logic clk = 0, rst_n = 0;
  logic c = 0;
  logic gate_hs, gate_ls;
  int checks = 0, failures = 0;
  int n_dead = 0;

  dead_time #(.DT(DT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: cycles since the last change of c
  int since = 100;
  logic c_prev = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (gate_hs && gate_ls) begin failures++; $display("FAIL shoot-through"); end
    if (since <= DT) begin
      checks++;
      if (gate_hs || gate_ls) begin failures++; $display("FAIL dead time violated, since=%0d", since); end
      if (since == DT) n_dead++;
    end else begin
      checks++;
      if (gate_hs != c_prev || gate_ls != !c_prev) begin
        failures++; $display("FAIL gate level, since=%0d c=%b hs=%b ls=%b", since, c_prev, gate_hs, gate_ls);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    since = 1;
    for (int t = 0; t < 400; t++) begin
      repeat ($urandom_range(40) + 1) begin
        @(negedge clk);
        since = (since < 1000) ? since + 1 : since;
      end
      c = ~c;
      c_prev = c;
      since = 0;
    end
    checks++;
    if (n_dead < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
