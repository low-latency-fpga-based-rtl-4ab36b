// Alarm register: holds the preset alarm time.
//
// The document keeps the alarm time in registers that the comparator reads;
// how they are written is this design's choice. In alarm-setting mode the
// user input unit sends one-cycle `edit` commands, each of which steps one
// field (hours 0..23, minutes 0..59, seconds 0..59) by one, wrapping within
// the field. Reset clears the alarm to 00:00:00. `alarm` changes on the clock
// edge that samples an edit command.
module alarm_register
  import alarm_clock_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  edit_t edit,
  output hms_t  alarm
);

  hms_t alarm_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      alarm_q <= HMS_ZERO;
    end else begin
      if (edit.inc_ss) alarm_q.ss <= (alarm_q.ss == SS_MAX) ? 6'd0 : alarm_q.ss + 6'd1;
      if (edit.inc_mm) alarm_q.mm <= (alarm_q.mm == MM_MAX) ? 6'd0 : alarm_q.mm + 6'd1;
      if (edit.inc_hh) alarm_q.hh <= (alarm_q.hh == HH_MAX) ? 5'd0 : alarm_q.hh + 5'd1;
    end
  end

  assign alarm = alarm_q;

endmodule
