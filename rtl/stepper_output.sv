// stepper_output - counter C and the stepper drive: the digital-to-analog half.
//
// At the end of every sample period the composite correction in the
// accumulator is strobed in parallel into counter C. While the next sample is
// evaluated, C is counted to zero by the serial multiplier arrangement: C is
// counted at f_osc/n and the stepper is stepped at f_osc/10, so the motor
// turns n/10 times the correction, n being the proportional gain setting
// (ten times K*). The sign of C sets the rotation, positive clockwise; a
// negative correction, held as 1000-x, is counted up to zero. A stepper
// coupled to a potentiometer then integrates the steps into the control
// voltage, which turns the velocity algorithm into the PID output.
//
// If a new correction arrives before C has reached zero the remainder is
// dropped and cut_short pulses (the original simply presets C again).
//
// Interface: load is a one-cycle strobe. step is a registered one-cycle
// pulse per motor step, cw (registered with it) its direction. osc_tick is
// the f_osc enable; the document's 50 steps/s is f_osc/10 here.
module stepper_output
  import ffc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  sbcd_t load_val,
  input  logic  osc_tick,
  input  bcd_t  k_sw,        // gain switch setting n, gain = n/10
  output logic  step,
  output logic  cw,
  output logic  busy,
  output logic  cut_short,
  output sbcd_t c_q,
  output logic  ovf
);

  logic c_zero, c_toward_up;
  logic src_pulse, src_up, dst_pulse, dst_up;

  bcd_updown_counter u_counter_c (
    .clk, .rst_n,
    .clear    (1'b0),
    .load     (load),
    .load_val (load_val),
    .cnt_en   (src_pulse),
    .up       (src_up),
    .q        (c_q),
    .zero     (c_zero),
    .toward_up(c_toward_up),
    .ovf      (ovf)
  );

  serial_multiplier u_scale (
    .clk, .rst_n,
    .start    (load),
    .enable   (1'b1),
    .osc_tick (osc_tick),
    .n        (k_sw),
    .src_pos  (c_q.pos),
    .src_zero (c_zero),
    .src_pulse(src_pulse),
    .src_up   (src_up),
    .dst_pulse(dst_pulse),
    .dst_up   (dst_up),
    .busy     (busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step      <= 1'b0;
      cw        <= 1'b1;
      cut_short <= 1'b0;
    end else begin
      step      <= dst_pulse;
      if (dst_pulse) cw <= dst_up;
      cut_short <= load & busy;
    end
  end

  a_toward_zero: assert property (@(posedge clk) disable iff (!rst_n)
    src_pulse |-> (src_up == c_toward_up));

endmodule
