// bcd_updown_counter - three-decade signed BCD up/down counter.
//
// This is the counter the controller is built from: counters A, B and C and
// the accumulator are all instances of it. It counts single pulses up or down
// in BCD. The sign bit follows the zero transitions: counting down from 000
// gives 999 with the sign cleared (-1), and counting up from 999 while
// negative gives 000 with the sign set (0). A negative number -x is therefore
// held as 1000-x, the complement the original three-decade counters used, and
// counting toward zero means counting down when positive and up when
// negative, which the sign logic and zero detect outputs serve.
//
// The original counters could only wrap at the ends of their range; here a
// count that would pass +999 or -999 is refused, the counter holds and ovf
// pulses for one cycle. That saturation is this design's own choice.
//
// Interface: clear (to +0), load (of load_val) and a count enable cnt_en with
// direction up, in that priority, all synchronous to clk. q is registered;
// zero and toward_up are decoded from q in the same cycle.
module bcd_updown_counter
  import ffc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,      // synchronous clear to +0
  input  logic  load,       // synchronous parallel preset
  input  sbcd_t load_val,
  input  logic  cnt_en,     // count one pulse this cycle
  input  logic  up,         // direction of that pulse
  output sbcd_t q,
  output logic  zero,       // zero detect
  output logic  toward_up,  // direction that moves q toward zero
  output logic  ovf         // a count was refused at +999 / -999
);

  logic at_pos_max, at_neg_max;

  assign zero       = (q.mag == '0);
  assign toward_up  = ~q.pos;
  assign at_pos_max = q.pos & bcd_is_max(q.mag);
  // -999 is held as 001 with the sign clear
  assign at_neg_max = ~q.pos & (q.mag == bcd_t'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '{pos: 1'b1, mag: '0};
      ovf <= 1'b0;
    end else begin
      ovf <= 1'b0;
      if (clear) begin
        q <= '{pos: 1'b1, mag: '0};
      end else if (load) begin
        q <= load_val;
      end else if (cnt_en) begin
        if (up) begin
          if (at_pos_max) ovf <= 1'b1;
          else begin
            q.mag <= bcd_inc(q.mag);
            if (!q.pos && bcd_is_max(q.mag)) q.pos <= 1'b1;   // -1 -> 0
          end
        end else begin
          if (at_neg_max) ovf <= 1'b1;
          else begin
            q.mag <= bcd_dec(q.mag);
            if (q.pos && q.mag == '0) q.pos <= 1'b0;          // 0 -> -1
          end
        end
      end
    end
  end

  // Zero is never held as negative.
  a_no_neg_zero: assert property (@(posedge clk) disable iff (!rst_n)
    !(~q.pos && q.mag == '0));

endmodule
