// sample_rate - timebase and VCO conditioning with a selectable sample rate.
//
// The sequencer's timebase tick is the clock divided by BASE_DIV << rate_sel,
// so rate_sel stretches every aperture and delay, and with them the sample
// period, by 1, 2, 4 or 8. To keep the count of one aperture, and with it the
// resolution, unchanged, the VCO pulse stream is divided by the same power of
// two: a longer aperture sees a proportionally slower VCO. That pairing is
// what the original sample-rate circuit does; its circuit is not known, and
// the power-of-two steps are this design's choice (the document shows a 2.15 s
// and a 4.30 s sample time).
//
// The VCO input is an asynchronous square wave. It is synchronised with two
// flip-flops and its rising edges are taken as counts, so each of its high
// and low phases must last at least two clock cycles.
//
// Interface: tick and vco_pulse are one-cycle enables. rate_sel may change at
// any time; it takes effect on the next timebase and VCO count.
module sample_rate #(
  parameter int unsigned BASE_DIV = 1000  // clock cycles per 10 ms timebase tick
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] rate_sel,   // sample time x1, x2, x4, x8
  input  logic       vco_in,     // VCO square wave, asynchronous
  output logic       tick,       // timebase tick
  output logic       vco_pulse   // one per 2**rate_sel VCO cycles
);

  logic [31:0] base_cnt;
  logic [31:0] base_limit;
  logic [2:0]  vco_sync;
  logic        vco_edge;
  logic [2:0]  vco_pre;
  logic [2:0]  vco_mask;

  assign base_limit = 32'(BASE_DIV) << rate_sel;
  assign tick       = (base_cnt + 32'd1 >= base_limit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    base_cnt <= '0;
    else if (tick) base_cnt <= '0;
    else           base_cnt <= base_cnt + 32'd1;
  end

  // Synchroniser and rising-edge detector.
  assign vco_edge = vco_sync[1] & ~vco_sync[2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vco_sync <= '0;
    else        vco_sync <= {vco_sync[1:0], vco_in};
  end

  // Divide the VCO by 2**rate_sel.
  assign vco_mask  = 3'((32'd1 << rate_sel) - 32'd1);
  assign vco_pulse = vco_edge & ((vco_pre & vco_mask) == vco_mask);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        vco_pre <= '0;
    else if (vco_edge) vco_pre <= vco_pre + 3'd1;
  end

endmodule
