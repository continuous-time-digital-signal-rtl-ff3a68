// gate_mux - selects the switch command c(t).
//
// In PID mode the DPWM output drives the power switch; while the on/off
// controller is active (`sel` = 1) its gate command does. The selected
// command is registered so that a change of selection cannot leave a
// glitch on c(t); this one-cycle register is this implementation's choice,
// the source design names only a mux.
module gate_mux (
  input  logic clk,
  input  logic rst_n,
  input  logic sel,       // 1: on/off controller
  input  logic pwm,       // from the DPWM
  input  logic onoff,     // from the on/off controller
  output logic c          // c(t) to the dead-time generator
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= 1'b0;
    else        c <= sel ? onoff : pwm;
  end

endmodule
