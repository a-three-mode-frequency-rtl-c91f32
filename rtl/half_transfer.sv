// half_transfer - proportional term and the B/2 correction of counter A.
//
// After the third aperture counter B holds c(s-1) - c(s), the proportional
// term, and counter A holds c(mid) - c(s). The deflection of the feedback
// curve from its chord is A - B/2, whose sign equals that of the change of
// slope (the derivative term of the velocity algorithm). This block empties
// counter B serially: every oscillator tick counts B one step toward zero and
// the accumulator one step in B's direction (so B is added to it), and every
// second tick counts A one step against B's direction (so B/2, truncated
// toward zero, is taken from A). Doing both in one pass keeps B for the
// proportional term; how the original hardware ordered the two is not known
// and the single pass is this design's choice.
//
// Interface and timing as serial_multiplier: start resets the half-rate
// toggle, enable gates the oscillator, the pulses are combinational in the
// cycle of osc_tick and a zero B ends the transfer.
module half_transfer (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic enable,
  input  logic osc_tick,
  input  logic b_pos,
  input  logic b_zero,
  output logic b_pulse,
  output logic b_up,
  output logic acc_pulse,
  output logic acc_up,
  output logic a_pulse,
  output logic a_up,
  output logic busy
);

  logic half;   // set after an odd number of B pulses
  logic run_tick;

  assign busy      = enable & ~b_zero;
  assign run_tick  = osc_tick & busy & ~start;
  assign b_pulse   = run_tick;
  assign b_up      = ~b_pos;
  assign acc_pulse = run_tick;
  assign acc_up    = b_pos;
  assign a_pulse   = run_tick & half;
  assign a_up      = ~b_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        half <= 1'b0;
    else if (start)    half <= 1'b0;
    else if (run_tick) half <= ~half;
  end

endmodule
