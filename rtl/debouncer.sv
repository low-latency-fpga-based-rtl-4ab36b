// Push-button debouncer with synchroniser and press detector.
//
// The raw button level passes through two flip-flops to bring it into the
// system clock domain. A counter then measures how long the synchronised
// level has differed from the accepted (debounced) level; only when it has
// differed for STABLE_CYCLES consecutive cycles is the new level accepted.
// Any bounce back resets the counter. `level` is the debounced state and
// `press` is a one-cycle pulse on each accepted 0->1 change.
//
// The document names synchronisation and debouncing of the push buttons but
// gives no numbers; the 10 ms default (1_000_000 cycles of 100 MHz) and the
// counter scheme are this design's choices.
//
// Timing: a clean press shows up as `press` STABLE_CYCLES + 2 cycles after
// the raw input rises (two synchroniser stages, then the stable count).
// Reset is synchronous and treats the button as released.
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic btn_raw,
  output logic level,
  output logic press
);

  localparam int unsigned W = (STABLE_CYCLES > 1) ? $clog2(STABLE_CYCLES) : 1;

  logic         sync1_q, sync2_q;
  logic         level_q;
  logic [W-1:0] count_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1_q <= 1'b0;
      sync2_q <= 1'b0;
      level_q <= 1'b0;
      count_q <= '0;
      press   <= 1'b0;
    end else begin
      sync1_q <= btn_raw;
      sync2_q <= sync1_q;
      press   <= 1'b0;
      if (sync2_q == level_q) begin
        count_q <= '0;
      end else if (count_q == W'(STABLE_CYCLES - 1)) begin
        count_q <= '0;
        level_q <= sync2_q;
        press   <= sync2_q;
      end else begin
        count_q <= count_q + 1'b1;
      end
    end
  end

  assign level = level_q;

endmodule
