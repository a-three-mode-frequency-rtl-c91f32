// process_model - behavioural model of the controlled process.
//
// Not synthesizable. Stands for the analog-computer simulations of a process
// control valve that the controller was evaluated on: a first-order lag
// G/(1+T s) (ORDER = 1) or a second-order lag wn^2/(s^2 + 2 zeta wn s + wn^2)
// (ORDER = 2), integrated with a forward Euler step of one clock period.
// The input is the control voltage plus a disturbance, the output c(t) in
// volts. The second-order damping and natural frequency are this model's own
// values, the original does not state them.
module process_model #(
  parameter int  ORDER        = 1,
  parameter real CLK_PERIOD_S = 1.0e-5,
  parameter real GAIN         = 1.0,
  parameter real TAU          = 10.0,  // first order: time constant in s
  parameter real ZETA         = 0.7,   // second order: damping
  parameter real WN           = 0.2,   // second order: natural frequency, rad/s
  parameter real INIT         = 5.0    // initial, settled output in V
) (
  input  logic clk,
  input  real  u,
  output real  c
);

  real y = INIT, dy = 0.0;

  always @(posedge clk) begin
    if (ORDER == 1) begin
      y = y + (GAIN * u - y) * CLK_PERIOD_S / TAU;
    end else begin
      dy = dy + (WN * WN * (GAIN * u - y) - 2.0 * ZETA * WN * dy) * CLK_PERIOD_S;
      y  = y + dy * CLK_PERIOD_S;
    end
  end

  assign c = y;

endmodule
