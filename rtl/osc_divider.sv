// osc_divider - free-running clock-enable generator.
//
// Stands in for the separate oscillators of the original controller (the
// multiplier oscillator and the stepper oscillator f_osc): tick is high for
// one clock cycle every DIV cycles, DIV = 1 giving a tick every cycle.
// Deriving all timing from one clock is this design's choice; the original
// used free-running oscillators.
module osc_divider #(
  parameter int unsigned DIV = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  logic [31:0] cnt;

  assign tick = (cnt + 32'd1 >= DIV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (tick) cnt <= '0;
    else           cnt <= cnt + 32'd1;
  end

endmodule
