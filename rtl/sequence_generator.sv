// sequence_generator - nine-state timing sequencer of one sample period.
//
// The original sequencer is a ring of nine cross-coupled NAND stages driven
// by a timebase counter: a stage goes high when the counter reaches the count
// wired to its two-input gate, and feedback forces every other stage low, so
// exactly one state is high at any time and a duration is changed by moving
// a counter connection. This module keeps that behaviour in synchronous form:
// a timebase counter runs from 0 to END_COUNT[last]-1 and wraps, and the
// state is the first i for which the count is below END_COUNT[i]. The
// END_COUNT table plays the part of the counter connections. The overlap of
// neighbouring states that the NAND ring shows is not reproduced: here the
// next state starts in the cycle the present one ends.
//
// The state order follows ffc_pkg::seq_state_e. The default durations, in
// 10 ms timebase ticks, are this design's reading of the original timing:
// 8-tick (0.08 s) apertures, an aperture-to-aperture delay alpha of 90 ticks
// and a 215-tick (2.15 s) sample period, of which the last three states take
// 27 ticks (about 12 %).
//
// Interface: tick is the one-cycle timebase enable. state is one-hot and
// registered; entered is one-hot and high for the first clock cycle of a
// state (after reset: the first cycle of ST_AP1). count is the timebase count.
module sequence_generator
  import ffc_pkg::*;
#(
  parameter int unsigned END_COUNT [NSTATES] = '{8, 48, 90, 98, 180, 188, 197, 206, 215},
  parameter int unsigned CW = 16   // width of the timebase counter
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  output logic [NSTATES-1:0] state,
  output logic [NSTATES-1:0] entered,
  output seq_state_e         state_id,
  output logic [CW-1:0]      count
);

  localparam int unsigned PERIOD = END_COUNT[NSTATES-1];

  logic [CW-1:0]      count_next;
  seq_state_e         id_next;
  logic [NSTATES-1:0] onehot_next;

  assign count_next = (32'(count) + 32'd1 >= PERIOD) ? '0 : count + CW'(1);

  // Decode of the counter: the "two-input gates" of the original.
  always_comb begin
    id_next = ST_OUT;
    for (int i = NSTATES - 1; i >= 0; i--)
      if (32'(count_next) < END_COUNT[i]) id_next = seq_state_e'(i);
    onehot_next = '0;
    onehot_next[id_next] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      state_id <= ST_AP1;
      state    <= NSTATES'(1);
      entered  <= NSTATES'(1);
    end else begin
      entered <= '0;
      if (tick) begin
        count    <= count_next;
        state_id <= id_next;
        state    <= onehot_next;
        if (id_next != state_id) entered <= onehot_next;
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));

endmodule
