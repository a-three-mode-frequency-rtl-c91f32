// tb_sequence_generator - self-checking test of the nine-state sequencer.
//
// With irregular timebase ticks, checks over three sample periods that the
// states come in order, that each lasts exactly its share of the END_COUNT
// table in ticks (8, 40, 42, 8, 82, 8, 9, 9, 9 at the defaults, 215 in all),
// that exactly one state is high at all times and that entered marks the
// first cycle of each state.
module tb_sequence_generator;
  import ffc_pkg::*;

  localparam int unsigned DUR [NSTATES] = '{8, 40, 42, 8, 82, 8, 9, 9, 9};

  logic clk = 1'b0, rst_n = 1'b0, tick;
  logic [NSTATES-1:0] state, entered;
  seq_state_e state_id;
  logic [15:0] count;
  int checks = 0, failures = 0;

  sequence_generator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cur, ticks_in_state, periods, total_ticks;
    tick = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (state != NSTATES'(1) || entered != NSTATES'(1)) begin
      failures++; $display("FAIL reset state %b entered %b", state, entered);
    end
    cur = 0; ticks_in_state = 0; periods = 0; total_ticks = 0;
    while (periods < 3) begin
      tick = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      checks++;
      if (!$onehot(state)) begin failures++; $display("FAIL not one-hot: %b", state); end
      if (tick) begin
        ticks_in_state++;
        total_ticks++;
        if (state[cur] == 1'b0) begin
          int nxt;
          nxt = (cur + 1) % NSTATES;
          checks += 3;
          if (ticks_in_state != int'(DUR[cur])) begin
            failures++;
            $display("FAIL state %0d lasted %0d ticks, expected %0d", cur, ticks_in_state, DUR[cur]);
          end
          if (!state[nxt]) begin failures++; $display("FAIL state %0d -> %b", cur, state); end
          if (entered != state) begin failures++; $display("FAIL entered %b", entered); end
          cur = nxt;
          ticks_in_state = 0;
          if (cur == 0) begin
            periods++;
            checks++;
            if (total_ticks != 215) begin
              failures++; $display("FAIL period of %0d ticks", total_ticks);
            end
            total_ticks = 0;
          end
        end
      end else begin
        checks++;
        if (entered != '0) begin failures++; $display("FAIL entered without tick"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
