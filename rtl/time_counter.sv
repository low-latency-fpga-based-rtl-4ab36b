// Time counter: the current time of day as cascaded seconds, minutes and
// hours counters.
//
// Every `tick` (the 1 Hz enable from the clock divider) advances the seconds
// counter. Seconds count 0..59; the tick on which seconds wrap from 59 to 0
// also advances minutes (0..59), and the tick on which both wrap advances
// hours (0..23), so 23:59:59 is followed by 00:00:00. All three counters are
// synchronous and update on the same clock edge. This cascade and the field
// ranges are the document's.
//
// Setting the time is this design's own scheme: an `edit` command bumps one
// field by one, wrapping within that field only (no carry into the next
// field), so the user can step each field independently. An edit in the same
// cycle as a tick wins over the tick. Reset is synchronous and clears the
// time to 00:00:00.
//
// Timing: `now` changes on the clock edge that samples tick or edit high.
module time_counter
  import alarm_clock_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,   // one-cycle 1 Hz enable
  input  edit_t edit,   // one-cycle per-field increment commands
  output hms_t  now
);

  hms_t time_q, time_d;

  always_comb begin
    time_d = time_q;
    if (edit.inc_hh || edit.inc_mm || edit.inc_ss) begin
      if (edit.inc_ss) time_d.ss = (time_q.ss == SS_MAX) ? 6'd0 : time_q.ss + 6'd1;
      if (edit.inc_mm) time_d.mm = (time_q.mm == MM_MAX) ? 6'd0 : time_q.mm + 6'd1;
      if (edit.inc_hh) time_d.hh = (time_q.hh == HH_MAX) ? 5'd0 : time_q.hh + 5'd1;
    end else if (tick) begin
      if (time_q.ss != SS_MAX) begin
        time_d.ss = time_q.ss + 6'd1;
      end else begin
        time_d.ss = 6'd0;
        if (time_q.mm != MM_MAX) begin
          time_d.mm = time_q.mm + 6'd1;
        end else begin
          time_d.mm = 6'd0;
          time_d.hh = (time_q.hh == HH_MAX) ? 5'd0 : time_q.hh + 5'd1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) time_q <= HMS_ZERO;
    else     time_q <= time_d;
  end

  assign now = time_q;

endmodule
