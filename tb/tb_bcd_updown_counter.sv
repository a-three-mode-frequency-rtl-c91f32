// tb_bcd_updown_counter - self-checking test of the signed BCD counter.
//
// Drives random clears, loads and count pulses and compares the counter
// with an integer model that saturates at +-999. Checks the stored
// complement form of negative numbers directly (-20 must be held as 980 with
// the sign clear), the zero detect, the toward-zero direction and the
// overflow pulse.
module tb_bcd_updown_counter;
  import ffc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  clear, load, cnt_en, up;
  sbcd_t load_val, q;
  logic  zero, toward_up, ovf;
  int    checks = 0, failures = 0;
  int    model;
  logic  model_ovf;

  bcd_updown_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: q=%0d(pos=%0b mag=%03h) model=%0d", what, sbcd2int(q), q.pos, q.mag, model);
    end
  endtask

  task automatic step_cycle();
    @(posedge clk);
    // model
    model_ovf = 1'b0;
    if (clear) model = 0;
    else if (load) model = sbcd2int(load_val);
    else if (cnt_en) begin
      if (up) begin if (model == 999) model_ovf = 1'b1; else model++; end
      else    begin if (model == -999) model_ovf = 1'b1; else model--; end
    end
    #1;
    check(sbcd2int(q) == model, "value");
    check(zero == (model == 0), "zero detect");
    check(toward_up == (model < 0), "toward zero direction");
    check(ovf == model_ovf, "overflow pulse");
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; load = 0; cnt_en = 0; up = 0; load_val = '0; model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q.pos && q.mag == '0, "reset to +0");

    // Sign convention example: count 20 down from zero.
    cnt_en = 1; up = 0;
    repeat (20) begin step_cycle(); @(negedge clk); end
    check(!q.pos && q.mag == bcd_t'(12'h980), "-20 held as 980, sign clear");
    // and back up through zero to +5
    up = 1;
    repeat (25) begin step_cycle(); @(negedge clk); end
    check(q.pos && q.mag == bcd_t'(12'h005), "+5 after crossing zero");

    // Saturation at both ends.
    cnt_en = 0; load = 1; load_val = int2sbcd(997);
    step_cycle(); @(negedge clk);
    load = 0; cnt_en = 1; up = 1;
    repeat (5) begin step_cycle(); @(negedge clk); end
    load = 1; load_val = int2sbcd(-997); cnt_en = 0;
    step_cycle(); @(negedge clk);
    load = 0; cnt_en = 1; up = 0;
    repeat (5) begin step_cycle(); @(negedge clk); end

    // Random operation.
    repeat (20000) begin
      int r;
      r = int'($urandom_range(0, 99));
      clear    = (r == 0);
      load     = (r inside {[1:3]});
      load_val = int2sbcd(int'($urandom_range(0, 1998)) - 999);
      cnt_en   = (r >= 10);
      up       = $urandom_range(0, 1) == 1;
      step_cycle();
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
