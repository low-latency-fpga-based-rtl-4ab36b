// User input unit: push buttons and switches to mode and edit commands.
//
// Four push buttons go through a debouncer each; three slide switches go
// through two-flip-flop synchronisers (switches do not need debouncing here
// because only their settled level matters). From these the unit derives:
//   * the mode: sw_set_time selects MODE_SET_TIME (it wins if both set
//     switches are on), otherwise sw_set_alarm selects MODE_SET_ALARM,
//     otherwise MODE_RUN;
//   * one-cycle edit commands: a press of btn_hh, btn_mm or btn_ss steps the
//     hours, minutes or seconds of the current time in MODE_SET_TIME, or of
//     the alarm time in MODE_SET_ALARM; presses in MODE_RUN are ignored;
//   * `stop`, a one-cycle pulse from btn_stop that silences a ringing alarm;
//   * `alarm_en`, the synchronised alarm-enable switch.
// The document says only that buttons and switches set the time and the
// alarm and manage the alarm, through control logic synchronised to the
// system clock; this button and switch assignment is this design's own.
//
// Only the press pulses of the debouncers are used; their debounced levels
// are left unconnected to any logic (a lint tool reports them as unused).
//
// Timing: edit and stop pulses come DEBOUNCE_CYCLES + 2 cycles after a clean
// button press; mode and alarm_en follow their switches two cycles late.
module user_input
  import alarm_clock_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  btn_hh,
  input  logic  btn_mm,
  input  logic  btn_ss,
  input  logic  btn_stop,
  input  logic  sw_set_time,
  input  logic  sw_set_alarm,
  input  logic  sw_alarm_en,
  output mode_e mode,
  output edit_t time_edit,
  output edit_t alarm_edit,
  output logic  stop,
  output logic  alarm_en
);

  localparam int NBTN = 4;

  logic [NBTN-1:0] btn_raw, btn_level, btn_press;
  logic [2:0]      sw_s1_q, sw_s2_q;
  edit_t           edit;

  assign btn_raw = {btn_stop, btn_hh, btn_mm, btn_ss};

  for (genvar i = 0; i < NBTN; i++) begin : g_btn
    debouncer #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_deb (
      .clk    (clk),
      .rst    (rst),
      .btn_raw(btn_raw[i]),
      .level  (btn_level[i]),
      .press  (btn_press[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_s1_q <= '0;
      sw_s2_q <= '0;
    end else begin
      sw_s1_q <= {sw_alarm_en, sw_set_alarm, sw_set_time};
      sw_s2_q <= sw_s1_q;
    end
  end

  always_comb begin
    if (sw_s2_q[0])      mode = MODE_SET_TIME;
    else if (sw_s2_q[1]) mode = MODE_SET_ALARM;
    else                 mode = MODE_RUN;
  end

  assign alarm_en = sw_s2_q[2];
  assign stop     = btn_press[3];

  assign edit.inc_hh = btn_press[2];
  assign edit.inc_mm = btn_press[1];
  assign edit.inc_ss = btn_press[0];

  assign time_edit  = (mode == MODE_SET_TIME)  ? edit : '0;
  assign alarm_edit = (mode == MODE_SET_ALARM) ? edit : '0;

endmodule
