// vco_model - behavioural model of the voltage controlled oscillator.
//
// Not synthesizable: the real part is an analog VCO. It turns a control
// voltage of 0 to 10 V into a square wave of 10 Hz to 10 kHz, linear in the
// voltage (f = 10 Hz + 999 Hz/V * v, clamped to the range). The phase is
// advanced once per clock of period CLK_PERIOD_S seconds, so the output
// edges fall on clock edges of the simulation.
module vco_model #(
  parameter real CLK_PERIOD_S = 1.0e-5
) (
  input  logic clk,
  input  real  volts,
  output logic out
);

  real phase = 0.0;
  real v, f;

  always @(posedge clk) begin
    v = volts;
    if (v < 0.0)  v = 0.0;
    if (v > 10.0) v = 10.0;
    f = 10.0 + 999.0 * v;
    phase = phase + f * CLK_PERIOD_S;
    if (phase >= 1.0) phase = phase - 1.0;
    out <= (phase < 0.5);
  end

endmodule
