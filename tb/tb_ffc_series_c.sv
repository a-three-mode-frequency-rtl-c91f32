// tb_ffc_series_c - sample-time workload.
//
// The controller at its default parameters controls a first-order lag (gain
// 1, time constant 10 s) with the PI settings of the comparison tests
// (K* = 0.9, Gi = 0.3, beta = 0). A 1 V step disturbance is applied just
// after a correction has been strobed, once at each sample time 2.15 s,
// 4.30 s and 8.60 s (rate_sel 0, 1, 2). For every run the test measures the
// delay from the disturbance to the first corrective step and the peak
// deviation, checks every strobed correction against the counter contents
// and the sample period in clock cycles. At 2.15 s and 4.30 s the loop must
// settle within 0.1 V; 8.60 s is sampling too slowly for a 10 s process and
// is only required to respond. A longer sample time must give a longer
// response delay and a larger deviation.
module tb_ffc_series_c;
  import ffc_pkg::*;

  localparam real CLK_S  = 1.0e-5;
  localparam int  BASE   = 1000;
  localparam int  PERIOD = 215 * BASE;

  logic clk = 1'b0, rst_n = 1'b0;
  logic vco_in;
  bcd_t setpoint, k_sw, gi_sw, beta_sw;
  logic [1:0] rate_sel;
  logic step, cw, step_busy, step_cut_short, sample_strobe, overrun, ovf;
  logic [NSTATES-1:0] state;
  sbcd_t correction, c_value;

  ffc_top dut (.*);

  real c_volts, pot_volts, disturb;
  int  pot_pos;
  vco_model #(.CLK_PERIOD_S(CLK_S)) u_vco (.clk, .volts(c_volts), .out(vco_in));
  stepper_pot_model #(.INIT_POS(100)) u_pot (.clk, .step, .cw, .volts(pot_volts), .position(pot_pos));
  process_model #(.ORDER(1), .CLK_PERIOD_S(CLK_S), .TAU(10.0), .INIT(5.0)) u_proc (
    .clk, .u(pot_volts + disturb), .c(c_volts));

  always #5000 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int gain(int v, bcd_t n);
    int m = (v < 0 ? -v : v) * bcd2int(n) / 10;
    return v < 0 ? -m : m;
  endfunction

  int a1, a3, b3, expected_corr;
  int cycle = 0, last_strobe = -1, expected_period = PERIOD;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (dut.entered[ST_INT]) a1 = sbcd2int(dut.a_q);
      if (dut.entered[ST_HALF]) begin
        a3 = sbcd2int(dut.a_q); b3 = sbcd2int(dut.b_q);
        expected_corr = gain(a1, gi_sw) + b3 +
                        gain(a3 - (b3 < 0 ? -((-b3) / 2) : b3 / 2), beta_sw);
      end
      if (sample_strobe) begin
        check(sbcd2int(correction) == expected_corr, "correction matches the counter contents");
        check(!overrun && !ovf, "no overrun or overflow");
        if (last_strobe >= 0)
          check(cycle - last_strobe == expected_period,
                $sformatf("sample period %0d cycles, expected %0d", cycle - last_strobe, expected_period));
        last_strobe = cycle;
      end
    end
  end

  real sp;
  // Response monitor, armed by run().
  bit  monitoring = 0, stepped = 0, armed = 0;
  int  t0 = 0;
  real mon_peak = 0.0, mon_delay = 0.0;
  always @(posedge clk) if (monitoring) begin
    if (c_volts - sp > mon_peak) mon_peak = c_volts - sp;
    if (sample_strobe && cycle > t0 + 1) armed = 1;   // first correction after the disturbance
    if (armed && !stepped && step) begin
      stepped = 1;
      mon_delay = real'(cycle - t0) * CLK_S;
    end
  end

  task automatic run(int rs, int n_samples, output real delay_s, output real peak, output real final_err);
    rate_sel = 2'(rs);
    disturb  = 0.0;
    // let the new rate take over and the loop settle
    @(posedge sample_strobe);
    last_strobe = -1;
    expected_period = PERIOD << rs;
    repeat (12) @(posedge sample_strobe);
    disturb = 1.0;
    t0 = cycle;
    stepped = 0;
    armed = 0;
    mon_peak = 0.0;
    mon_delay = 0.0;
    monitoring = 1;
    repeat (n_samples) @(posedge sample_strobe);
    monitoring = 0;
    delay_s = mon_delay;
    peak = mon_peak;
    final_err = c_volts - sp;
  endtask

  initial begin : watchdog
    repeat (400 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d[3], p[3], f[3];
    setpoint = int2bcd(400);
    sp       = (400.0 - 0.8) / 79.92;
    k_sw     = int2bcd(9);
    gi_sw    = int2bcd(3);
    beta_sw  = int2bcd(0);
    rate_sel = 2'd0;
    disturb  = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    run(0, 40, d[0], p[0], f[0]);
    run(1, 25, d[1], p[1], f[1]);
    run(2, 20, d[2], p[2], f[2]);
    for (int i = 0; i < 3; i++) begin
      $display("INFO sample time %0.2f s: first step after %0.2f s, peak %0.3f V, final error %0.3f V",
               2.15 * (1 << i), d[i], p[i], f[i]);
      if (i < 2) check(f[i] < 0.1 && f[i] > -0.1, $sformatf("settled within 0.1 V at rate %0d", i));
      check(d[i] > 0.0, $sformatf("a corrective step was given at rate %0d", i));
    end
    check(d[1] > d[0] && d[2] > d[1], "longer sample time, longer response delay");
    check(p[1] > p[0] && p[2] > p[1], "longer sample time, larger deviation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
