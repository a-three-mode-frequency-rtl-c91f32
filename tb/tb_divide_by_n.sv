// tb_divide_by_n - self-checking test of the BCD programmable divider.
//
// For a set of switch settings n, feeds irregular input ticks and checks
// that an output comes exactly on every n-th input tick (counted from the
// clear), in the cycle of that tick, and that n = 0 gives no output.
module tb_divide_by_n;
  import ffc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, tick_in, tick_out;
  bcd_t n;
  int   checks = 0, failures = 0;

  divide_by_n dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int settings[7] = '{1, 2, 7, 10, 25, 120, 999};
    clear = 0; tick_in = 0; n = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (settings[k]) begin
      int nv, ticks, outs, bad;
      nv = settings[k]; ticks = 0; outs = 0; bad = 0;
      @(negedge clk);
      n = int2bcd(nv); clear = 1;
      @(negedge clk);
      clear = 0;
      while (ticks < 3 * nv + 5) begin
        tick_in = ($urandom_range(0, 2) != 0);
        #1;
        if (tick_in) begin
          ticks++;
          if (tick_out !== ((ticks % nv) == 0)) bad++;
          if (tick_out) outs++;
        end else if (tick_out) bad++;
        @(negedge clk);
      end
      tick_in = 0;
      checks++;
      if (bad != 0 || outs != ticks / nv) begin
        failures++;
        $display("FAIL n=%0d: %0d outputs for %0d ticks, %0d misplaced", nv, outs, ticks, bad);
      end
    end
    // n = 0: inhibited
    begin
      int outs;
      outs = 0;
      @(negedge clk);
      n = '0; clear = 1;
      @(negedge clk);
      clear = 0;
      repeat (50) begin
        tick_in = 1; #1;
        if (tick_out) outs++;
        @(negedge clk);
      end
      tick_in = 0;
      checks++;
      if (outs != 0) begin failures++; $display("FAIL n=0 gave %0d outputs", outs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
