// tb_stepper_output - self-checking test of counter C and the stepper drive.
//
// Loads corrections into counter C and counts the step pulses and their
// direction: a correction v with gain setting n must give floor(|v|*n/10)
// steps, clockwise for positive v, at one step per ten oscillator ticks.
// Includes the two worked examples of the sign convention (+20 and -20 at
// gain 1) and a reload while busy, which must pulse cut_short.
module tb_stepper_output;
  import ffc_pkg::*;

  localparam int OSC_DIV = 3;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  load, osc_tick;
  sbcd_t load_val, c_q;
  bcd_t  k_sw;
  logic  step, cw, busy, cut_short, ovf;
  int    checks = 0, failures = 0;
  int    steps_cw, steps_ccw, cut_seen;
  int    osc_cnt;
  int    last_step_osc, bad_spacing;
  int    osc_ticks;

  stepper_output dut (.*);

  always #5 clk = ~clk;

  assign osc_tick = (osc_cnt == OSC_DIV - 1);
  always @(posedge clk) begin
    osc_cnt <= (osc_cnt == OSC_DIV - 1) ? 0 : osc_cnt + 1;
    if (osc_tick) osc_ticks <= osc_ticks + 1;
    if (step) begin
      if (cw) steps_cw <= steps_cw + 1; else steps_ccw <= steps_ccw + 1;
      // steps are 10 oscillator ticks apart
      if (last_step_osc >= 0 && osc_ticks - last_step_osc != 10) bad_spacing <= bad_spacing + 1;
      last_step_osc <= osc_ticks;
    end
    if (cut_short && rst_n) cut_seen <= cut_seen + 1;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int v, int nv);
    int expected = ((v < 0 ? -v : v) * nv) / 10;
    @(negedge clk);
    k_sw = int2bcd(nv); load_val = int2sbcd(v); load = 1;
    steps_cw = 0; steps_ccw = 0; last_step_osc = -1; bad_spacing = 0;
    @(negedge clk);
    load = 0;
    repeat (5) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 3;
    if ((v >= 0 ? steps_cw : steps_ccw) != expected || (v >= 0 ? steps_ccw : steps_cw) != 0) begin
      failures++;
      $display("FAIL v=%0d n=%0d: cw %0d ccw %0d, expected %0d", v, nv, steps_cw, steps_ccw, expected);
    end
    if (c_q.mag != '0) begin failures++; $display("FAIL C not emptied"); end
    if (bad_spacing != 0) begin failures++; $display("FAIL step spacing (%0d)", bad_spacing); end
  endtask

  initial begin
    osc_cnt = 0; osc_ticks = 0; cut_seen = 0; last_step_osc = -1; bad_spacing = 0;
    load = 0; load_val = '0; k_sw = BCD_TEN;
    steps_cw = 0; steps_ccw = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // sign convention, case 1 and case 2: 20 steps each way at a gain of 1
    run(20, 10);
    run(-20, 10);
    run(35, 9);        // K* = 0.9
    run(-117, 25);
    repeat (10) run(int'($urandom_range(0, 400)) - 200, int'($urandom_range(1, 40)));
    // a new correction arrives before the old one is out
    @(negedge clk);
    k_sw = BCD_TEN; load_val = int2sbcd(50); load = 1;
    @(negedge clk);
    load = 0;
    repeat (100) @(negedge clk);
    load = 1; load_val = int2sbcd(-5);
    @(negedge clk);
    load = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (cut_seen != 1) begin failures++; $display("FAIL cut_short seen %0d times", cut_seen); end
    while (busy) @(negedge clk);
    checks++;
    if (sbcd2int(c_q) != 0) begin failures++; $display("FAIL C after reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
