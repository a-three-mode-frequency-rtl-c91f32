// stepper_pot_model - behavioural model of the output stepper motor.
//
// Not synthesizable: the real part is a 1.8 degree per step motor turning a
// one-turn potentiometer across 0 to 10 V, so one step is 0.05 V and the
// shaft has 200 positions. Each step pulse moves one position, clockwise
// (up) when cw is high; the potentiometer stops at its ends.
module stepper_pot_model #(
  parameter int INIT_POS = 100
) (
  input  logic clk,
  input  logic step,
  input  logic cw,
  output real  volts,
  output int   position
);

  initial position = INIT_POS;

  always @(posedge clk) begin
    if (step) begin
      if (cw  && position < 200) position <= position + 1;
      if (!cw && position > 0)   position <= position - 1;
    end
  end

  assign volts = 0.05 * real'(position);

endmodule
