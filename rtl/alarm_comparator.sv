// Alarm comparator: flags when the current time equals the alarm time.
//
// Purely combinational, as the document describes: all bits of hours,
// minutes and seconds of both times are compared at once, so `match` is high
// in the same cycle the time counter reaches the alarm time and stays high
// for as long as the two are equal (one second while the clock runs). There
// is no clock and no state.
module alarm_comparator
  import alarm_clock_pkg::*;
(
  input  hms_t now,
  input  hms_t alarm,
  output logic match
);

  assign match = (now.hh == alarm.hh) && (now.mm == alarm.mm) && (now.ss == alarm.ss);

endmodule
