// tb_ffc_top - closed-loop test of the whole controller.
//
// The controller runs at its default parameters (100 kHz clock, 10 ms
// timebase, 2.15 s sample period) against behavioural models of the VCO, the
// stepper-driven potentiometer and a first-order lag process (gain 1, time
// constant 10 s, the test system of the original evaluation). The process
// input is the potentiometer voltage plus a disturbance.
//
// Every sample period is checked twice over:
//  - the arithmetic: the counter contents after each aperture are read and
//    the composite correction worked out from them (integral Gi*(r - c),
//    proportional c(s-1) - c(s), derivative beta*(A - B/2), each gain n/10
//    with truncation), and compared with what is strobed into counter C;
//  - the output: the steps given for a correction must be floor(|C|*n/10)
//    in the direction of its sign.
// The sample period is checked in clock cycles, the aperture counts against
// the VCO's analog value, and after each disturbance the loop must settle
// within 0.1 V of the setpoint.
//
// Phases: a +1 V step disturbance (PI, as in the comparison tests), a
// setpoint change, a ramped (modified step) disturbance with derivative gain
// on, and a disturbance at twice the sample time. Each mechanism - the three
// terms, negative corrections, both directions of rotation and the doubled
// sample time - is counted and must occur.
module tb_ffc_top;
  import ffc_pkg::*;

  localparam real CLK_S   = 1.0e-5;      // 100 kHz
  localparam int  BASE    = 1000;        // default timebase divisor
  localparam int  PERIOD  = 215 * BASE;  // sample period in clock cycles

  logic clk = 1'b0, rst_n = 1'b0;
  logic vco_in;
  bcd_t setpoint, k_sw, gi_sw, beta_sw;
  logic [1:0] rate_sel;
  logic step, cw, step_busy, step_cut_short, sample_strobe, overrun, ovf;
  logic [NSTATES-1:0] state;
  sbcd_t correction, c_value;

  ffc_top dut (.*);

  // ------------------------------------------------------------ the plant
  real c_volts, u_volts, pot_volts, disturb;
  int  pot_pos;

  vco_model #(.CLK_PERIOD_S(CLK_S)) u_vco (.clk, .volts(c_volts), .out(vco_in));
  stepper_pot_model #(.INIT_POS(100)) u_pot (.clk, .step, .cw, .volts(pot_volts), .position(pot_pos));

  real tau = 10.0;
  always @(posedge clk) begin
    u_volts = pot_volts + disturb;
    c_volts = c_volts + (u_volts - c_volts) * CLK_S / tau;
  end

  always #5000 clk = ~clk;

  // --------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  int n_int = 0, n_prop = 0, n_der = 0, n_neg = 0, n_cw = 0, n_ccw = 0, n_slow = 0;
  int n_samples = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int gain(int v, bcd_t n);
    int m = (v < 0 ? -v : v) * bcd2int(n) / 10;
    return v < 0 ? -m : m;
  endfunction

  function automatic int trunc_half(int v);
    return v < 0 ? -((-v) / 2) : v / 2;
  endfunction

  // Counts read out of the counters as each state begins.
  int a1, b1, c2, a3, b3, expected_corr;
  int term_i, term_p, term_d;
  real c_at_ap1;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.entered[ST_INT]) begin
        a1 = sbcd2int(dut.a_q);
        b1 = sbcd2int(dut.b_q);
        check(a1 == bcd2int(setpoint) - b1, "A = r - c after the first aperture");
        // 0.08 s aperture of a 10 Hz + 999 Hz/V oscillator, +-2 counts
        check(real'(b1) > 0.8 + 79.92 * c_volts - 3.0 && real'(b1) < 0.8 + 79.92 * c_volts + 3.0,
              "aperture count matches the feedback voltage");
      end
      if (dut.entered[ST_WAIT2]) c2 = sbcd2int(dut.a_q);
      if (dut.entered[ST_HALF]) begin
        a3 = sbcd2int(dut.a_q);
        b3 = sbcd2int(dut.b_q);
        // B = c(s-1) - c(s): the third aperture count c(s) = b1 - b3 must
        // match the feedback voltage
        check(real'(b1 - b3) > 0.8 + 79.92 * c_volts - 3.0 &&
              real'(b1 - b3) < 0.8 + 79.92 * c_volts + 3.0, "B holds c(s-1) - c(s)");
        check(a3 == c2 - (b1 - b3), "A holds c(mid) - c(s)");
        term_i = gain(a1, gi_sw);
        term_p = b3;
        term_d = gain(a3 - trunc_half(b3), beta_sw);
        expected_corr = term_i + term_p + term_d;
        if (expected_corr > 999)  expected_corr = 999;
        if (expected_corr < -999) expected_corr = -999;
      end
    end
  end

  // Steps given since the last strobe, checked at the next one.
  int steps_cw = 0, steps_ccw = 0, last_corr = 0, cut = 0;
  int last_strobe_cycle = -1, cycle = 0;
  int expected_period = PERIOD;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && step) begin
      if (cw) steps_cw <= steps_cw + 1; else steps_ccw <= steps_ccw + 1;
    end
    if (rst_n && step_cut_short) cut <= cut + 1;
    if (rst_n && sample_strobe) begin
      int corr;
      int expect_steps;
      corr = sbcd2int(correction);
      n_samples++;
      check(corr == expected_corr, $sformatf("correction %0d, expected %0d (I %0d P %0d D %0d)",
            corr, expected_corr, term_i, term_p, term_d));
      if (term_i != 0) n_int++;
      if (term_p != 0) n_prop++;
      if (term_d != 0) n_der++;
      if (corr < 0) n_neg++;
      // the previous correction must have been stepped out in full
      expect_steps = (last_corr < 0 ? -last_corr : last_corr) * bcd2int(k_sw) / 10;
      if (cut == 0 && pot_pos > 0 && pot_pos < 200)
        check(last_corr >= 0 ? (steps_cw == expect_steps && steps_ccw == 0)
                             : (steps_ccw == expect_steps && steps_cw == 0),
              $sformatf("steps cw %0d ccw %0d for correction %0d", steps_cw, steps_ccw, last_corr));
      if (steps_cw > 0) n_cw++;
      if (steps_ccw > 0) n_ccw++;
      steps_cw <= 0; steps_ccw <= 0; cut <= 0;
      last_corr = corr;
      // sample period
      if (last_strobe_cycle >= 0) begin
        check(cycle - last_strobe_cycle == expected_period,
              $sformatf("sample period %0d cycles, expected %0d", cycle - last_strobe_cycle, expected_period));
        if (cycle - last_strobe_cycle == 2 * PERIOD) n_slow++;
      end
      last_strobe_cycle = cycle;
      check(!overrun && !ovf, "no transfer overrun or counter overflow");
    end
  end

  task automatic samples(int n);
    repeat (n) @(posedge sample_strobe);
  endtask

  function automatic real sp_volts();
    return (real'(bcd2int(setpoint)) - 0.8) / 79.92;
  endfunction

  task automatic settled(string what);
    real err = c_volts - sp_volts();
    $display("INFO %s: c = %0.3f V, setpoint %0.3f V", what, c_volts, sp_volts());
    check(err < 0.1 && err > -0.1, {what, ": settled within 0.1 V"});
  endtask

  initial begin : watchdog
    repeat (200 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // settled plant at about 5 V
    setpoint = int2bcd(400);
    k_sw     = int2bcd(9);    // K*  = 0.9
    gi_sw    = int2bcd(3);    // Gi  = 0.3
    beta_sw  = int2bcd(0);    // beta = 0
    rate_sel = 2'd0;
    disturb     = 0.0;
    c_volts  = 5.0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    samples(4);

    // 1: unit step disturbance at the process input, PI control
    disturb = 1.0;
    samples(40);
    settled("step disturbance");

    // 2: setpoint change, about +1 V
    setpoint = int2bcd(480);
    samples(40);
    settled("setpoint change");

    // 3: derivative gain on, disturbance ramped over one sample period
    beta_sw = int2bcd(30);    // beta = 3.0
    @(posedge sample_strobe);
    for (int i = 1; i <= 215; i++) begin
      repeat (BASE) @(posedge clk);
      disturb = 1.0 - real'(i) / 215.0;
    end
    samples(30);
    settled("ramped disturbance with derivative");

    // 4: twice the sample time (4.30 s)
    beta_sw  = int2bcd(0);
    rate_sel = 2'd1;
    @(posedge sample_strobe);
    expected_period = 2 * PERIOD;
    disturb = 0.5;
    samples(20);
    settled("disturbance at 4.30 s sample time");

    check(n_int  > 0, "integral term seen");
    check(n_prop > 0, "proportional term seen");
    check(n_der  > 0, "derivative term seen");
    check(n_neg  > 0, "negative correction seen");
    check(n_cw   > 0, "clockwise steps seen");
    check(n_ccw  > 0, "counterclockwise steps seen");
    check(n_slow > 0, "doubled sample period seen");
    $display("INFO samples %0d: integral %0d proportional %0d derivative %0d negative %0d cw %0d ccw %0d slow %0d",
             n_samples, n_int, n_prop, n_der, n_neg, n_cw, n_ccw, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
