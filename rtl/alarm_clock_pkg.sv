// Shared types and constants of the alarm clock.
//
// A time of day is kept as three binary fields, hours 0-23, minutes 0-59 and
// seconds 0-59 (HH:MM:SS, each field counting modulo its range). The same
// structure carries the current time and the preset alarm time, so the
// comparator can check every bit of both at once. The operating mode chosen
// by the switches is an enum: normal running, setting the time, or setting
// the alarm. The field ranges follow the clock's time model; the packing,
// the widths and the mode encoding are this design's own choices.
package alarm_clock_pkg;

  localparam int unsigned HOURS_PER_DAY   = 24;
  localparam int unsigned MINS_PER_HOUR   = 60;
  localparam int unsigned SECS_PER_MINUTE = 60;

  // Largest value of each field; the counters wrap to zero after it.
  localparam logic [4:0] HH_MAX = 5'(HOURS_PER_DAY - 1);
  localparam logic [5:0] MM_MAX = 6'(MINS_PER_HOUR - 1);
  localparam logic [5:0] SS_MAX = 6'(SECS_PER_MINUTE - 1);

  typedef struct packed {
    logic [4:0] hh;  // 0..23
    logic [5:0] mm;  // 0..59
    logic [5:0] ss;  // 0..59
  } hms_t;

  localparam hms_t HMS_ZERO = '{hh: 5'd0, mm: 6'd0, ss: 6'd0};

  typedef enum logic [1:0] {
    MODE_RUN       = 2'd0,  // clock runs, display shows current time
    MODE_SET_TIME  = 2'd1,  // clock paused, buttons edit current time
    MODE_SET_ALARM = 2'd2   // clock runs, buttons edit and display shows alarm
  } mode_e;

  // One-cycle edit commands from the user input unit, one per time field.
  typedef struct packed {
    logic inc_hh;
    logic inc_mm;
    logic inc_ss;
  } edit_t;

endpackage
