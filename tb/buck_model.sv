// buck_model - behavioural model of the synchronous buck power stage
// (SW1, SW2, L, C, load, unity-gain voltage sensor) for the end-to-end
// testbench. Not synthesizable.
//
// On every rising clock edge the state advances by one clock period DT_S
// with a semi-implicit Euler step:
//   L di/dt = v_sw - RL*i - vout,   C dv/dt = i - iload
// v_sw is VG when the high-side gate is on, 0 when the low-side gate is on,
// and during dead time the body diode voltage (-0.7 V for positive current,
// VG + 0.7 V for negative current). RL stands for the inductor and switch
// resistance and gives the LC resonance a finite damping. The load is an
// ideal current sink driven by the testbench.
module buck_model #(
  parameter real L    = 10e-6,
  parameter real C    = 20e-6,
  parameter real VG   = 5.0,
  parameter real RL   = 0.1,
  parameter real DT_S = 5e-9,
  parameter real V0   = 2.0,
  parameter real I0   = 0.2
) (
  input  logic clk,
  input  logic gate_hs,
  input  logic gate_ls,
  input  real  iload,
  output real  vout,
  output real  il
);

  initial begin
    vout = V0;
    il   = I0;
  end

  always @(posedge clk) begin
    real vsw;
    if (gate_hs)       vsw = VG;
    else if (gate_ls)  vsw = 0.0;
    else if (il > 0.0) vsw = -0.7;
    else               vsw = VG + 0.7;
    il   = il + (vsw - RL * il - vout) / L * DT_S;
    vout = vout + (il - iload) / C * DT_S;
  end

endmodule
