// tb_sample_rate - self-checking test of the timebase and VCO prescaler.
//
// For each rate setting, checks the spacing of timebase ticks (BASE_DIV <<
// rate_sel clock cycles) and that the number of VCO pulses counted over a
// stretched aperture stays the same as over the unstretched one, the VCO
// being a square wave of fixed period.
module tb_sample_rate;
  localparam int unsigned BASE_DIV = 20;
  localparam int          VCO_HALF = 3;     // VCO half period in clock cycles

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] rate_sel;
  logic       vco_in = 1'b0;
  logic       tick, vco_pulse;
  int         checks = 0, failures = 0;

  sample_rate #(.BASE_DIV(BASE_DIV)) dut (.*);

  always #5 clk = ~clk;

  // VCO square wave, period 2*VCO_HALF cycles.
  initial forever begin
    repeat (VCO_HALF) @(posedge clk);
    #2 vco_in = ~vco_in;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base_count = 0;
    rate_sel = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int rs = 0; rs < 4; rs++) begin
      int period, since, n_ticks, pulses, cycles;
      period = BASE_DIV << rs;
      @(negedge clk);
      rate_sel = 2'(rs);
      // settle: wait for two ticks
      repeat (2) begin
        do @(negedge clk); while (!tick);
      end
      since = 0; n_ticks = 0; pulses = 0; cycles = 0;
      // measure over 48 base periods' worth of the stretched timebase
      while (n_ticks < 48) begin
        @(negedge clk);
        since++;
        cycles++;
        if (vco_pulse) pulses++;
        if (tick) begin
          checks++;
          if (since != period) begin
            failures++; $display("FAIL rate %0d: tick after %0d cycles, expected %0d", rs, since, period);
          end
          since = 0;
          n_ticks++;
        end
      end
      // VCO pulses per timebase tick must not depend on the rate
      checks++;
      if (rs == 0) base_count = pulses;
      else if (pulses < base_count - 1 || pulses > base_count + 1) begin
        failures++;
        $display("FAIL rate %0d: %0d VCO counts, %0d at rate 0", rs, pulses, base_count);
      end
      checks++;
      if (pulses < (cycles / (2 * VCO_HALF)) / (1 << rs) - 1 ||
          pulses > (cycles / (2 * VCO_HALF)) / (1 << rs) + 1) begin
        failures++; $display("FAIL rate %0d: %0d VCO counts in %0d cycles", rs, pulses, cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
