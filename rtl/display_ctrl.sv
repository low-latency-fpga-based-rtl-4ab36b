// Multiplexed seven-segment display controller for HH MM SS.
//
// The six time digits share one set of segment lines; only one digit's
// anode is driven at a time and the controller steps through the digits fast
// enough (REFRESH_CYCLES system clocks per digit, 1 ms by default, so a full
// 8-digit frame every 8 ms = 125 Hz) that the eye sees a steady display.
// This scanning scheme and the decoder from binary values to segment
// patterns are the document's; the refresh rate, digit order and pin
// polarities are this design's choices.
//
// Each binary field (0..59 or 0..23) is split into tens and ones by a
// constant divide by ten. Digit positions, counted from the right:
// 0 = seconds ones, 1 = seconds tens, 2 = minutes ones, 3 = minutes tens,
// 4 = hours ones, 5 = hours tens; positions 6 and up are blanked. The
// decimal points of digits 4 and 2 are lit as HH.MM.SS separators. `value`
// is whatever the top selects (current time, or the alarm time while it is
// being set). In alarm-setting mode (`alarm_mode` high) the decimal point of
// digit 0 is lit as well, so the two views can be told apart.
//
// Outputs are registered and active low, as on common-anode board displays:
// an[i] = 0 enables digit i, seg[k] = 0 lights segment k (seg[0] = a ..
// seg[6] = g), dp = 0 lights the decimal point. They change one cycle after
// the scan counter moves to the next digit.
module display_ctrl
  import alarm_clock_pkg::*;
#(
  parameter int unsigned NUM_DIGITS     = 8,
  parameter int unsigned REFRESH_CYCLES = 100_000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  hms_t                  value,
  input  logic                  alarm_mode,
  output logic [NUM_DIGITS-1:0] an,
  output logic [6:0]            seg,
  output logic                  dp
);

  localparam int unsigned RW = (REFRESH_CYCLES > 1) ? $clog2(REFRESH_CYCLES) : 1;
  localparam int unsigned DW = (NUM_DIGITS > 1) ? $clog2(NUM_DIGITS) : 1;

  logic [RW-1:0] refresh_q;
  logic [DW-1:0] sel_q;
  logic [3:0]    digit;
  logic          blank;
  logic          dp_on;
  logic [6:0]    seg_on;

  function automatic logic [3:0] tens(input logic [5:0] v);
    return 4'(v / 6'd10);
  endfunction

  function automatic logic [3:0] ones(input logic [5:0] v);
    return 4'(v % 6'd10);
  endfunction

  // Scan counter: move to the next digit every REFRESH_CYCLES clocks.
  always_ff @(posedge clk) begin
    if (rst) begin
      refresh_q <= '0;
      sel_q     <= '0;
    end else if (refresh_q == RW'(REFRESH_CYCLES - 1)) begin
      refresh_q <= '0;
      sel_q     <= (sel_q == DW'(NUM_DIGITS - 1)) ? '0 : sel_q + 1'b1;
    end else begin
      refresh_q <= refresh_q + 1'b1;
    end
  end

  // Digit value for the selected position.
  always_comb begin
    blank = 1'b0;
    dp_on = 1'b0;
    digit = 4'd0;
    case (int'(sel_q))
      0: begin digit = ones(value.ss);        dp_on = alarm_mode; end
      1: digit = tens(value.ss);
      2: begin digit = ones(value.mm);        dp_on = 1'b1; end
      3: digit = tens(value.mm);
      4: begin digit = ones({1'b0, value.hh}); dp_on = 1'b1; end
      5: digit = tens({1'b0, value.hh});
      default: blank = 1'b1;
    endcase
  end

  seg7_decoder u_dec (
    .digit(digit),
    .blank(blank),
    .seg  (seg_on)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      an  <= '1;
      seg <= '1;
      dp  <= 1'b1;
    end else begin
      an  <= ~(NUM_DIGITS'(1) << sel_q);
      seg <= ~seg_on;
      dp  <= ~dp_on;
    end
  end

endmodule
