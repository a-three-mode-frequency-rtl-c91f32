// tb_ffc_series_b - derivative-term workload on a second-order process.
//
// The controller at its default parameters controls a second-order lag
// (damping 0.7, natural frequency 0.2 rad/s, this test's own choice). As in
// the derivative evaluation of the original design, the disturbance is a
// "modified step": a 1 V rise spread linearly over one sample period, so that
// the feedback stays monotonic within each period. The run is made twice,
// with beta = 0 and with beta = 3.0 (switch 30), starting each time from the
// settled loop. For every sample the strobed correction is compared with the
// one rebuilt from the counter contents; the loop must settle within 0.1 V of
// the setpoint, and with beta = 3.0 the derivative term must contribute. Peak
// deviation and settling are reported for both runs.
module tb_ffc_series_b;
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
  process_model #(.ORDER(2), .CLK_PERIOD_S(CLK_S), .INIT(5.0)) u_proc (
    .clk, .u(pot_volts + disturb), .c(c_volts));

  always #5000 clk = ~clk;

  int checks = 0, failures = 0, n_der = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int gain(int v, bcd_t n);
    int m = (v < 0 ? -v : v) * bcd2int(n) / 10;
    return v < 0 ? -m : m;
  endfunction

  // Rebuild each correction from the counters.
  int a1, b1, a3, b3, expected_corr, term_d;
  always @(posedge clk) if (rst_n) begin
    if (dut.entered[ST_INT]) begin a1 = sbcd2int(dut.a_q); b1 = sbcd2int(dut.b_q); end
    if (dut.entered[ST_HALF]) begin
      a3 = sbcd2int(dut.a_q); b3 = sbcd2int(dut.b_q);
      term_d = gain(a3 - (b3 < 0 ? -((-b3) / 2) : b3 / 2), beta_sw);
      expected_corr = gain(a1, gi_sw) + b3 + term_d;
    end
    if (sample_strobe) begin
      check(sbcd2int(correction) == expected_corr, "correction matches the counter contents");
      check(!overrun && !ovf, "no overrun or overflow");
      if (term_d != 0) n_der++;
    end
  end

  real sp;
  task automatic run(int beta_setting, output real peak, output real final_err);
    real err;
    beta_sw = int2bcd(beta_setting);
    // start from the settled loop: remove the disturbance and wait
    disturb = 0.0;
    repeat (30) @(posedge sample_strobe);
    @(posedge sample_strobe);
    peak = 0.0;
    for (int i = 1; i <= 215; i++) begin
      repeat (BASE) @(posedge clk);
      disturb = real'(i) / 215.0;
    end
    repeat (40 * 215) begin
      repeat (BASE) @(posedge clk);
      err = c_volts - sp;
      if (err > peak) peak = err;
    end
    final_err = c_volts - sp;
  endtask

  initial begin : watchdog
    repeat (180 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real peak0, fin0, peak3, fin3;
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

    run(0, peak0, fin0);
    $display("INFO beta = 0.0: peak deviation %0.3f V, final error %0.3f V", peak0, fin0);
    check(fin0 < 0.1 && fin0 > -0.1, "beta = 0: settled within 0.1 V");
    n_der = 0;
    run(30, peak3, fin3);
    $display("INFO beta = 3.0: peak deviation %0.3f V, final error %0.3f V", peak3, fin3);
    check(fin3 < 0.1 && fin3 > -0.1, "beta = 3.0: settled within 0.1 V");
    check(n_der > 0, "derivative term contributed");
    $display("INFO derivative contributions with beta = 3.0: %0d", n_der);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
