// serial_multiplier - pulse-counting multiplier by n/10.
//
// The original controller multiplies serially, because one sample period of
// about two seconds leaves plenty of time. The value to be multiplied sits in
// a signed BCD counter (the source). An oscillator f_osc drives two dividers:
// a programmable divide-by-n whose output counts the source toward zero, and
// a fixed divide-by-10 whose output pulses the destination (the accumulator,
// or the stepper motor for the output stage). The destination is counted up
// for a positive source and down for a negative one. A zero source inhibits
// both dividers, which ends the multiplication. The source reaches zero on
// oscillator tick |src|*n, so the destination receives floor(|src|*n/10)
// pulses: a gain of n/10 with n set on three BCD switches.
//
// This module is the control of that arrangement; the source and destination
// counters are outside it. start clears both dividers and must come before
// the first tick. enable gates the oscillator (the sequencer state that owns
// the multiplication).
//
// Timing: osc_tick is a one-cycle enable. src_pulse and dst_pulse are
// combinational in the cycle of the tick and take effect at the next clock
// edge, when src_zero (registered in the source counter) is seen again, so
// an oscillator tick every clock cycle is allowed.
module serial_multiplier
  import ffc_pkg::*;
#(
  parameter bcd_t FIXED_DIV = BCD_TEN  // divisor of the destination divider
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic enable,
  input  logic osc_tick,
  input  bcd_t n,           // gain switch setting, gain = n / FIXED_DIV
  input  logic src_pos,     // sign logic of the source counter
  input  logic src_zero,    // zero detect of the source counter
  output logic src_pulse,   // count the source ...
  output logic src_up,      // ... in this direction (toward zero)
  output logic dst_pulse,   // count the destination ...
  output logic dst_up,      // ... in this direction
  output logic busy
);

  logic run_tick;

  assign busy     = enable & ~src_zero & (n != '0);
  assign run_tick = osc_tick & busy & ~start;
  assign src_up   = ~src_pos;
  assign dst_up   = src_pos;

  divide_by_n u_div_n (
    .clk, .rst_n, .clear(start), .n(n), .tick_in(run_tick), .tick_out(src_pulse)
  );

  divide_by_n u_div_fixed (
    .clk, .rst_n, .clear(start), .n(FIXED_DIV), .tick_in(run_tick), .tick_out(dst_pulse)
  );

endmodule
