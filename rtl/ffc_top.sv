// ffc_top - three mode (PID) frequency feedback controller.
//
// A single-loop digital PID controller that needs neither an A/D nor a D/A
// converter. The feedback voltage c(t) drives a voltage controlled oscillator
// whose pulses are counted over a fixed aperture, and the output is a
// stepper motor turning a potentiometer, so the motor integrates the pulses
// it is given. The controller therefore computes the velocity form of PID:
// each sample period it produces one correction
//
//   theta(s) - theta(s-1) = K [ (c(s-1) - c(s))                  proportional
//                             + Gi (r - c(s-1))                  integral
//                             + beta (c(mid) - (c(s-1)+c(s))/2) ]  derivative
//
// where the derivative term is the deflection of the feedback curve at mid
// period from the chord through its two end samples, which has the sign and
// (for constant curvature) a magnitude proportional to the change of slope.
//
// One sample period is run by the nine-state sequencer:
//   AP1   A preset to the setpoint counts the VCO down (A = r - c(s-1));
//         B, cleared, counts it up (B = c(s-1)).
//   INT   A x Gi is added to the accumulator; A ends at zero.
//   WAIT1 rest of the delay alpha.
//   AP2   A, cleared, counts the VCO up (A = c(mid)).
//   WAIT2 delay alpha.
//   AP3   A and B count the VCO down (A = c(mid)-c(s), B = c(s-1)-c(s)).
//   HALF  B is added to the accumulator and B/2 taken from A.
//   DER   A x beta is added to the accumulator.
//   OUT   the accumulator is strobed into counter C, which drives the
//         stepper by K while the next sample is evaluated; the
//         accumulator is cleared when AP1 starts again.
// All multiplications are serial (serial_multiplier): a gain switch setting
// n gives a gain of n/10, so the switches are set to 10K*, 10Gi and 10beta.
// All counters are three-decade signed BCD (bcd_updown_counter).
//
// The counter configuration, the three measurements, the serial multiplier,
// the stepper output and the sign convention follow the original design. The
// clock rate (100 kHz), the 10 ms timebase, the state durations, the
// single-pass B/2 transfer, the VCO synchroniser and the power-of-two sample
// rate steps are this design's own choices.
//
// Interface: vco_in is the VCO square wave (asynchronous, at most clk/4).
// setpoint is three BCD digits in VCO counts per aperture (80 counts per volt
// with a 10 Hz-10 kHz, 0-10 V VCO and a 0.08 s aperture). step/cw drive the
// stepper. correction holds the last value strobed into C; sample_strobe
// pulses when that happens. overrun pulses when a serial transfer was still
// running at the end of its state, ovf when a counter saturated.
module ffc_top
  import ffc_pkg::*;
#(
  parameter int unsigned BASE_DIV     = 1000,  // clock cycles per 10 ms tick
  parameter int unsigned STEP_OSC_DIV = 200,   // clock cycles per stepper f_osc tick
  parameter int unsigned MUL_OSC_DIV  = 1,     // clock cycles per multiplier f_osc tick
  parameter int unsigned END_COUNT [NSTATES] = '{8, 48, 90, 98, 180, 188, 197, 206, 215}
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               vco_in,
  input  bcd_t               setpoint,
  input  bcd_t               k_sw,      // 10 K*
  input  bcd_t               gi_sw,     // 10 Gi
  input  bcd_t               beta_sw,   // 10 beta
  input  logic [1:0]         rate_sel,  // sample time x1, x2, x4, x8
  output logic               step,
  output logic               cw,
  output logic               step_busy,
  output logic               step_cut_short,
  output logic [NSTATES-1:0] state,
  output logic               sample_strobe,
  output sbcd_t              correction,
  output sbcd_t              c_value,   // counter C, still to be stepped out
  output logic               overrun,
  output logic               ovf
);

  // ---------------------------------------------------------------- timing
  logic tb_tick, vco_p;
  logic mul_tick, step_tick;
  logic [NSTATES-1:0] entered;
  seq_state_e state_id;

  sample_rate #(.BASE_DIV(BASE_DIV)) u_rate (
    .clk, .rst_n, .rate_sel, .vco_in, .tick(tb_tick), .vco_pulse(vco_p)
  );

  sequence_generator #(.END_COUNT(END_COUNT)) u_seq (
    .clk, .rst_n, .tick(tb_tick), .state, .entered, .state_id, .count()
  );

  osc_divider #(.DIV(MUL_OSC_DIV))  u_mul_osc  (.clk, .rst_n, .tick(mul_tick));
  osc_divider #(.DIV(STEP_OSC_DIV)) u_step_osc (.clk, .rst_n, .tick(step_tick));

  // -------------------------------------------------------------- counters
  sbcd_t a_q, b_q, acc_q;
  logic  a_zero, b_zero;
  logic  a_cnt, a_up, b_cnt, b_up, acc_cnt, acc_up;
  logic  a_ovf, b_ovf, acc_ovf, c_ovf;

  // serial transfer units
  logic mi_src, mi_src_up, mi_dst, mi_dst_up;
  logic md_src, md_src_up, md_dst, md_dst_up;
  logic h_b, h_b_up, h_acc, h_acc_up, h_a, h_a_up;

  serial_multiplier u_mul_int (
    .clk, .rst_n, .start(entered[ST_INT]), .enable(state[ST_INT]), .osc_tick(mul_tick),
    .n(gi_sw), .src_pos(a_q.pos), .src_zero(a_zero),
    .src_pulse(mi_src), .src_up(mi_src_up), .dst_pulse(mi_dst), .dst_up(mi_dst_up),
    .busy()
  );

  half_transfer u_half (
    .clk, .rst_n, .start(entered[ST_HALF]), .enable(state[ST_HALF]), .osc_tick(mul_tick),
    .b_pos(b_q.pos), .b_zero(b_zero),
    .b_pulse(h_b), .b_up(h_b_up), .acc_pulse(h_acc), .acc_up(h_acc_up),
    .a_pulse(h_a), .a_up(h_a_up), .busy()
  );

  serial_multiplier u_mul_der (
    .clk, .rst_n, .start(entered[ST_DER]), .enable(state[ST_DER]), .osc_tick(mul_tick),
    .n(beta_sw), .src_pos(a_q.pos), .src_zero(a_zero),
    .src_pulse(md_src), .src_up(md_src_up), .dst_pulse(md_dst), .dst_up(md_dst_up),
    .busy()
  );

  // Routing of count pulses to the counters, by sequencer state.
  always_comb begin
    a_cnt = 1'b0;  a_up = 1'b0;
    b_cnt = 1'b0;  b_up = 1'b0;
    acc_cnt = 1'b0; acc_up = 1'b0;
    unique case (state_id)
      ST_AP1: begin
        a_cnt = vco_p; a_up = 1'b0;
        b_cnt = vco_p; b_up = 1'b1;
      end
      ST_INT: begin
        a_cnt = mi_src;   a_up = mi_src_up;
        acc_cnt = mi_dst; acc_up = mi_dst_up;
      end
      ST_AP2: begin
        a_cnt = vco_p; a_up = 1'b1;
      end
      ST_AP3: begin
        a_cnt = vco_p; a_up = 1'b0;
        b_cnt = vco_p; b_up = 1'b0;
      end
      ST_HALF: begin
        a_cnt = h_a;     a_up = h_a_up;
        b_cnt = h_b;     b_up = h_b_up;
        acc_cnt = h_acc; acc_up = h_acc_up;
      end
      ST_DER: begin
        a_cnt = md_src;   a_up = md_src_up;
        acc_cnt = md_dst; acc_up = md_dst_up;
      end
      default: ;
    endcase
  end

  bcd_updown_counter u_counter_a (
    .clk, .rst_n,
    .clear(entered[ST_AP2]), .load(entered[ST_AP1]),
    .load_val('{pos: 1'b1, mag: setpoint}),
    .cnt_en(a_cnt), .up(a_up), .q(a_q), .zero(a_zero), .toward_up(), .ovf(a_ovf)
  );

  bcd_updown_counter u_counter_b (
    .clk, .rst_n,
    .clear(entered[ST_AP1]), .load(1'b0), .load_val('0),
    .cnt_en(b_cnt), .up(b_up), .q(b_q), .zero(b_zero), .toward_up(), .ovf(b_ovf)
  );

  bcd_updown_counter u_accumulator (
    .clk, .rst_n,
    .clear(entered[ST_AP1]), .load(1'b0), .load_val('0),
    .cnt_en(acc_cnt), .up(acc_up), .q(acc_q), .zero(), .toward_up(),
    .ovf(acc_ovf)
  );

  // ------------------------------------------------------------ output side
  stepper_output u_out (
    .clk, .rst_n,
    .load(entered[ST_OUT]), .load_val(acc_q), .osc_tick(step_tick), .k_sw,
    .step, .cw, .busy(step_busy), .cut_short(step_cut_short), .c_q(c_value), .ovf(c_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      correction    <= '{pos: 1'b1, mag: '0};
      sample_strobe <= 1'b0;
      overrun       <= 1'b0;
      ovf           <= 1'b0;
    end else begin
      sample_strobe <= entered[ST_OUT];
      if (entered[ST_OUT]) correction <= acc_q;
      // A transfer still running when its state ended: the source counter
      // was not emptied in time. A zero gain setting leaves its source
      // untouched on purpose.
      overrun <= (entered[ST_WAIT1] & ~a_zero & (gi_sw != '0)) |
                 (entered[ST_DER]   & ~b_zero) |
                 (entered[ST_OUT]   & ~a_zero & (beta_sw != '0));
      ovf     <= a_ovf | b_ovf | acc_ovf | c_ovf;
    end
  end

endmodule
