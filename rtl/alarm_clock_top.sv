// Alarm clock top level: 1 Hz time base, HH:MM:SS counter, alarm compare,
// buzzer and multiplexed seven-segment display on one 100 MHz clock.
//
// Data flow: clock_divider makes a one-cycle tick every CLK_DIV cycles (1 s
// at 100 MHz). The tick advances time_counter, whose current time is compared
// every cycle by the combinational alarm_comparator against the time held in
// alarm_register. When they become equal, buzzer_ctrl turns on the buzzer
// pin and the alarm LED on the next clock edge. display_ctrl scans the
// current time (or, while the alarm is being set, the alarm time) onto the
// seven-segment digits. user_input debounces the buttons, synchronises the
// switches and turns them into the mode and into per-field edit commands for
// the time counter or the alarm register. All blocks run concurrently on the
// one system clock; the slow rates are clock enables, not derived clocks.
// This block structure and the 100 MHz -> 1 Hz division are the document's.
//
// User interface (this design's own assignment):
//   sw_set_time   on: clock paused, btn_hh / btn_mm / btn_ss step the time
//   sw_set_alarm  on (and sw_set_time off): btn_* step the alarm time, which
//                 is shown on the display with the rightmost point lit
//   sw_alarm_en   on: alarm armed; off: alarm disarmed and silenced
//   btn_stop      silences a ringing alarm
// LEDs: led_alarm follows the buzzer, led_set_time / led_set_alarm show the
// mode, led_alarm_en shows that the alarm is armed.
//
// Reset: `rst` is an active-high push button; it is synchronised to `clk`
// by two flip-flops and then resets every block synchronously, giving time
// 00:00:00, alarm 00:00:00, alarm silent.
module alarm_clock_top
  import alarm_clock_pkg::*;
#(
  parameter int unsigned CLK_DIV         = 100_000_000,  // system clocks per second
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000,    // 10 ms at 100 MHz
  parameter int unsigned REFRESH_CYCLES  = 100_000,      // 1 ms per display digit
  parameter int unsigned NUM_DIGITS      = 8
) (
  input  logic                  clk,          // 100 MHz
  input  logic                  rst,          // active high, asynchronous source
  input  logic                  btn_hh,
  input  logic                  btn_mm,
  input  logic                  btn_ss,
  input  logic                  btn_stop,
  input  logic                  sw_set_time,
  input  logic                  sw_set_alarm,
  input  logic                  sw_alarm_en,
  output logic [NUM_DIGITS-1:0] an,           // digit enables, active low
  output logic [6:0]            seg,          // segments a..g, active low
  output logic                  dp,           // decimal point, active low
  output logic                  buzzer,       // active high
  output logic                  led_alarm,
  output logic                  led_set_time,
  output logic                  led_set_alarm,
  output logic                  led_alarm_en
);

  logic  rst_s1_q, rst_q;
  logic  tick;
  logic  run_tick;
  mode_e mode;
  edit_t time_edit, alarm_edit;
  logic  stop, alarm_en;
  hms_t  now, alarm;
  logic  match;
  hms_t  shown;

  // Reset synchroniser.
  always_ff @(posedge clk) begin
    rst_s1_q <= rst;
    rst_q    <= rst_s1_q;
  end

  clock_divider #(.DIV(CLK_DIV)) u_div (
    .clk (clk),
    .rst (rst_q),
    .tick(tick)
  );

  user_input #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_in (
    .clk         (clk),
    .rst         (rst_q),
    .btn_hh      (btn_hh),
    .btn_mm      (btn_mm),
    .btn_ss      (btn_ss),
    .btn_stop    (btn_stop),
    .sw_set_time (sw_set_time),
    .sw_set_alarm(sw_set_alarm),
    .sw_alarm_en (sw_alarm_en),
    .mode        (mode),
    .time_edit   (time_edit),
    .alarm_edit  (alarm_edit),
    .stop        (stop),
    .alarm_en    (alarm_en)
  );

  // The clock holds still while the user sets it.
  assign run_tick = tick && (mode != MODE_SET_TIME);

  time_counter u_time (
    .clk (clk),
    .rst (rst_q),
    .tick(run_tick),
    .edit(time_edit),
    .now (now)
  );

  alarm_register u_alarm (
    .clk  (clk),
    .rst  (rst_q),
    .edit (alarm_edit),
    .alarm(alarm)
  );

  alarm_comparator u_cmp (
    .now  (now),
    .alarm(alarm),
    .match(match)
  );

  buzzer_ctrl u_buz (
    .clk     (clk),
    .rst     (rst_q),
    .match   (match),
    .alarm_en(alarm_en),
    .stop    (stop),
    .buzzer  (buzzer),
    .led     (led_alarm)
  );

  assign shown = (mode == MODE_SET_ALARM) ? alarm : now;

  display_ctrl #(
    .NUM_DIGITS    (NUM_DIGITS),
    .REFRESH_CYCLES(REFRESH_CYCLES)
  ) u_disp (
    .clk       (clk),
    .rst       (rst_q),
    .value     (shown),
    .alarm_mode(mode == MODE_SET_ALARM),
    .an        (an),
    .seg       (seg),
    .dp        (dp)
  );

  assign led_set_time  = (mode == MODE_SET_TIME);
  assign led_set_alarm = (mode == MODE_SET_ALARM);
  assign led_alarm_en  = alarm_en;

endmodule
