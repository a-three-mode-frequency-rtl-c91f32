// divide_by_n - programmable divide-by-n counter with a BCD preset.
//
// Passes on one of every n input ticks. n is read from BCD thumbwheel
// switches, as in the serial multiplier of the original controller, where
// the switch setting is ten times the wanted gain. The counter runs down in
// BCD from n; on the input tick that finds it at 1 it emits tick_out in the
// same cycle and reloads n, so the first output comes on the n-th tick after
// clear. n = 0 gives no output at all (this design's choice; the document
// does not say what an all-zero setting does).
//
// Interface: tick_in is a one-cycle enable; tick_out is combinational from
// tick_in and the registered count. clear reloads n; the counter comes out
// of reset empty and must be cleared once before its first use (a tick on an
// empty counter only reloads it).
module divide_by_n
  import ffc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  bcd_t n,
  input  logic tick_in,
  output logic tick_out
);

  bcd_t cnt;
  logic n_zero, at_one;

  assign n_zero   = (n == '0);
  assign at_one   = (cnt == bcd_t'(1));
  assign tick_out = tick_in & at_one & ~n_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cnt <= '0;
    else if (clear)          cnt <= n;
    else if (tick_in) begin
      if (at_one || cnt == '0) cnt <= n;
      else                     cnt <= bcd_dec(cnt);
    end
  end

endmodule
