// tb_serial_multiplier - self-checking test of the n/10 serial multiplier.
//
// The source is a signed BCD counter loaded with a random value v; the
// destination is an integer in the testbench. After the multiplier has run,
// the destination must hold sign(v)*floor(|v|*n/10), the source must be zero,
// and the run must have taken exactly |v|*n oscillator ticks (the rate of the
// divide-by-n). A zero gain leaves the source untouched.
module tb_serial_multiplier;
  import ffc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  start, enable, osc_tick;
  bcd_t  n;
  logic  src_pulse, src_up, dst_pulse, dst_up, busy;
  logic  load;
  sbcd_t load_val, src_q;
  logic  src_zero, src_tu, src_ovf;
  int    checks = 0, failures = 0;
  int    dst, ticks_used;

  bcd_updown_counter u_src (
    .clk, .rst_n, .clear(1'b0), .load, .load_val, .cnt_en(src_pulse), .up(src_up),
    .q(src_q), .zero(src_zero), .toward_up(src_tu), .ovf(src_ovf)
  );

  serial_multiplier dut (
    .clk, .rst_n, .start, .enable, .osc_tick, .n, .src_pos(src_q.pos), .src_zero,
    .src_pulse, .src_up, .dst_pulse, .dst_up, .busy
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (dst_pulse) dst <= dst + (dst_up ? 1 : -1);
    if (osc_tick && busy && !start) ticks_used <= ticks_used + 1;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int v, int nv, bit every_cycle);
    int expected;
    @(negedge clk);
    load = 1; load_val = int2sbcd(v); n = int2bcd(nv); enable = 0;
    @(negedge clk);
    load = 0; start = 1; enable = 1; dst = 0; ticks_used = 0;
    @(negedge clk);
    start = 0;
    repeat (20 * 999 * 12) begin
      osc_tick = every_cycle ? 1'b1 : ($urandom_range(0, 3) == 0);
      @(negedge clk);
      if (!busy) break;
    end
    osc_tick = 0; enable = 0;
    @(negedge clk);
    expected = (v >= 0) ? (v * nv) / 10 : -((-v * nv) / 10);
    checks++;
    if (nv == 0) begin
      if (dst != 0 || sbcd2int(src_q) != v) begin
        failures++; $display("FAIL n=0: dst=%0d src=%0d", dst, sbcd2int(src_q));
      end
    end else if (dst != expected || !src_zero || ticks_used != (v < 0 ? -v : v) * nv) begin
      failures++;
      $display("FAIL v=%0d n=%0d: dst=%0d expected %0d, src=%0d, ticks=%0d", v, nv, dst,
               expected, sbcd2int(src_q), ticks_used);
    end
  endtask

  initial begin
    start = 0; enable = 0; osc_tick = 0; n = '0; load = 0; load_val = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run(20, 10, 1);       // gain 1
    run(-20, 10, 1);      // negative, complement form
    run(37, 25, 1);       // gain 2.5
    run(-123, 9, 0);      // K* = 0.9
    run(999, 36, 1);      // largest source, Gi = 3.6
    run(4, 3, 1);
    run(0, 30, 1);
    run(55, 0, 1);        // inhibited
    repeat (40) run(int'($urandom_range(0, 1998)) - 999, int'($urandom_range(1, 60)),
                    $urandom_range(0, 1) == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
