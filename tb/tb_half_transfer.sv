// tb_half_transfer - self-checking test of the B / B/2 transfer.
//
// Counters A and B and the accumulator are signed BCD counters loaded with
// random values. After the transfer B must be zero, the accumulator must
// have gained B and A must have lost B/2 (truncated toward zero), in |B|
// oscillator ticks.
module tb_half_transfer;
  import ffc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  start, enable, osc_tick, load;
  sbcd_t a_init, b_init, acc_init, a_q, b_q, acc_q;
  logic  a_zero, b_zero, acc_zero, a_tu, b_tu, acc_tu, a_ovf, b_ovf, acc_ovf;
  logic  b_pulse, b_up, acc_pulse, acc_up, a_pulse, a_up, busy;
  int    checks = 0, failures = 0, ticks_used;

  bcd_updown_counter u_a (.clk, .rst_n, .clear(1'b0), .load, .load_val(a_init),
    .cnt_en(a_pulse), .up(a_up), .q(a_q), .zero(a_zero), .toward_up(a_tu), .ovf(a_ovf));
  bcd_updown_counter u_b (.clk, .rst_n, .clear(1'b0), .load, .load_val(b_init),
    .cnt_en(b_pulse), .up(b_up), .q(b_q), .zero(b_zero), .toward_up(b_tu), .ovf(b_ovf));
  bcd_updown_counter u_acc (.clk, .rst_n, .clear(1'b0), .load, .load_val(acc_init),
    .cnt_en(acc_pulse), .up(acc_up), .q(acc_q), .zero(acc_zero), .toward_up(acc_tu), .ovf(acc_ovf));

  half_transfer dut (.clk, .rst_n, .start, .enable, .osc_tick, .b_pos(b_q.pos), .b_zero,
    .b_pulse, .b_up, .acc_pulse, .acc_up, .a_pulse, .a_up, .busy);

  always #5 clk = ~clk;

  always @(posedge clk) if (osc_tick && busy && !start) ticks_used <= ticks_used + 1;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int a, int b, int acc);
    int half = (b >= 0) ? b / 2 : -((-b) / 2);
    @(negedge clk);
    load = 1; a_init = int2sbcd(a); b_init = int2sbcd(b); acc_init = int2sbcd(acc);
    @(negedge clk);
    load = 0; start = 1; enable = 1; ticks_used = 0;
    @(negedge clk);
    start = 0;
    repeat (20000) begin
      osc_tick = ($urandom_range(0, 1) == 0);
      @(negedge clk);
      if (!busy) break;
    end
    osc_tick = 0; enable = 0;
    @(negedge clk);
    checks++;
    if (!b_zero || sbcd2int(acc_q) != acc + b || sbcd2int(a_q) != a - half ||
        ticks_used != (b < 0 ? -b : b)) begin
      failures++;
      $display("FAIL a=%0d b=%0d acc=%0d: A=%0d B=%0d ACC=%0d ticks=%0d", a, b, acc,
               sbcd2int(a_q), sbcd2int(b_q), sbcd2int(acc_q), ticks_used);
    end
  endtask

  initial begin
    start = 0; enable = 0; osc_tick = 0; load = 0;
    a_init = '0; b_init = '0; acc_init = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run(-30, -40, 5);     // deflection case from the acceleration justification
    run(30, 41, -7);
    run(0, 0, 0);
    run(3, -1, 0);
    repeat (60) run(int'($urandom_range(0, 600)) - 300, int'($urandom_range(0, 600)) - 300,
                    int'($urandom_range(0, 600)) - 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
