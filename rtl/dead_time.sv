// dead_time - complementary gate drive with dead time.
//
// From the switch command c(t) it derives the gate of the high-side switch
// SW1 (on when c = 1) and of the synchronous low-side switch SW2 (on when
// c = 0). After every edge of c both gates are held off for DT clock cycles
// before the newly selected switch is turned on, so the two never conduct
// together. A pulse of c shorter than DT is absorbed. The dead-time length
// (4 cycles, 20 ns) is this implementation's choice.
module dead_time #(
  parameter int unsigned DT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic c,
  output logic gate_hs,
  output logic gate_ls
);

  localparam int unsigned CW = $clog2(DT + 1);
  logic          c_q;
  logic [CW-1:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q      <= 1'b0;
      wait_cnt <= CW'(DT);
      gate_hs  <= 1'b0;
      gate_ls  <= 1'b0;
    end else begin
      c_q <= c;
      if (c != c_q) begin
        wait_cnt <= CW'(DT);
        gate_hs  <= 1'b0;
        gate_ls  <= 1'b0;
      end else if (wait_cnt != '0) begin
        wait_cnt <= wait_cnt - 1'b1;
        gate_hs  <= 1'b0;
        gate_ls  <= 1'b0;
      end else begin
        gate_hs  <= c_q;
        gate_ls  <= ~c_q;
      end
    end
  end

  // the two switches must never be driven on together (checked out of reset)
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin
    end else begin
      a_no_shoot_through: assert (!(gate_hs && gate_ls));
    end

endmodule
