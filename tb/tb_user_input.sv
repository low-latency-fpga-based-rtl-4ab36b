// Testbench for user_input.
//
// With DEBOUNCE_CYCLES = 8, the testbench presses buttons (with bounce) in
// each mode and counts the one-cycle pulses on every output, checking that:
// presses in the run mode produce no edit; in set-time mode each button
// produces exactly one pulse on its own time_edit field and nothing on
// alarm_edit; in set-alarm mode the same on alarm_edit; set-time wins when
// both set switches are on; btn_stop gives one stop pulse in any mode; the
// mode and alarm_en follow the switches two cycles late.
module tb_user_input;
  import alarm_clock_pkg::*;

  localparam int unsigned DEB = 8;

  logic  clk = 1'b0;
  logic  rst;
  logic  btn_hh, btn_mm, btn_ss, btn_stop;
  logic  sw_set_time, sw_set_alarm, sw_alarm_en;
  mode_e mode;
  edit_t time_edit, alarm_edit;
  logic  stop, alarm_en;
  int    checks = 0;
  int    failures = 0;
  int    cnt_t[3], cnt_a[3], cnt_stop;

  always #5 clk = ~clk;

  user_input #(.DEBOUNCE_CYCLES(DEB)) dut (
    .clk(clk), .rst(rst),
    .btn_hh(btn_hh), .btn_mm(btn_mm), .btn_ss(btn_ss), .btn_stop(btn_stop),
    .sw_set_time(sw_set_time), .sw_set_alarm(sw_set_alarm), .sw_alarm_en(sw_alarm_en),
    .mode(mode), .time_edit(time_edit), .alarm_edit(alarm_edit),
    .stop(stop), .alarm_en(alarm_en)
  );

  // Pulse counters: index 0 = hh, 1 = mm, 2 = ss.
  always @(posedge clk) begin
    if (time_edit.inc_hh)  cnt_t[0]++;
    if (time_edit.inc_mm)  cnt_t[1]++;
    if (time_edit.inc_ss)  cnt_t[2]++;
    if (alarm_edit.inc_hh) cnt_a[0]++;
    if (alarm_edit.inc_mm) cnt_a[1]++;
    if (alarm_edit.inc_ss) cnt_a[2]++;
    if (stop)              cnt_stop++;
  end

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic clear_counts();
    for (int i = 0; i < 3; i++) begin cnt_t[i] = 0; cnt_a[i] = 0; end
    cnt_stop = 0;
  endtask

  task automatic drive_btn(input int which, input logic v);
    case (which)
      0: btn_hh = v;
      1: btn_mm = v;
      2: btn_ss = v;
      default: btn_stop = v;
    endcase
  endtask

  // A bouncing press and release of one button.
  task automatic press(input int which);
    for (int b = 0; b < 3; b++) begin
      drive_btn(which, 1'b1); repeat ($urandom_range(1, DEB - 2)) @(negedge clk);
      drive_btn(which, 1'b0); repeat ($urandom_range(1, DEB - 2)) @(negedge clk);
    end
    drive_btn(which, 1'b1); repeat (3 * DEB) @(negedge clk);
    drive_btn(which, 1'b0); repeat (3 * DEB) @(negedge clk);
  endtask

  task automatic set_switches(input logic st, input logic sa, input logic en);
    sw_set_time = st; sw_set_alarm = sa; sw_alarm_en = en;
    @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1;
    btn_hh = 0; btn_mm = 0; btn_ss = 0; btn_stop = 0;
    sw_set_time = 0; sw_set_alarm = 0; sw_alarm_en = 0;
    clear_counts();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    clear_counts();
    check(mode == MODE_RUN && alarm_en == 1'b0, "reset state");

    // Switch synchronisation: two cycles.
    sw_alarm_en = 1'b1;
    @(negedge clk);
    check(alarm_en == 1'b0, "alarm_en not yet after one cycle");
    @(negedge clk);
    check(alarm_en == 1'b1, "alarm_en after two cycles");

    // Run mode: edits ignored, stop works.
    for (int w = 0; w < 4; w++) press(w);
    check(cnt_t[0] + cnt_t[1] + cnt_t[2] == 0, "no time edit in run mode");
    check(cnt_a[0] + cnt_a[1] + cnt_a[2] == 0, "no alarm edit in run mode");
    check(cnt_stop == 1, $sformatf("stop pulses in run mode %0d", cnt_stop));

    // Set-time mode.
    clear_counts();
    set_switches(1'b1, 1'b0, 1'b1);
    check(mode == MODE_SET_TIME, "set-time mode");
    press(0); press(0); press(1); press(2); press(2); press(2);
    check(cnt_t[0] == 2 && cnt_t[1] == 1 && cnt_t[2] == 3,
          $sformatf("time edits %0d %0d %0d", cnt_t[0], cnt_t[1], cnt_t[2]));
    check(cnt_a[0] + cnt_a[1] + cnt_a[2] == 0, "no alarm edit in set-time mode");

    // Set-alarm mode.
    clear_counts();
    set_switches(1'b0, 1'b1, 1'b1);
    check(mode == MODE_SET_ALARM, "set-alarm mode");
    press(2); press(1); press(1); press(0); press(3);
    check(cnt_a[0] == 1 && cnt_a[1] == 2 && cnt_a[2] == 1,
          $sformatf("alarm edits %0d %0d %0d", cnt_a[0], cnt_a[1], cnt_a[2]));
    check(cnt_t[0] + cnt_t[1] + cnt_t[2] == 0, "no time edit in set-alarm mode");
    check(cnt_stop == 1, "stop in set-alarm mode");

    // Both set switches: set-time wins.
    clear_counts();
    set_switches(1'b1, 1'b1, 1'b0);
    check(mode == MODE_SET_TIME && alarm_en == 1'b0, "set-time has priority");
    press(1);
    check(cnt_t[1] == 1 && cnt_a[1] == 0, "priority routes edit to time");

    set_switches(1'b0, 1'b0, 1'b0);
    check(mode == MODE_RUN, "back to run mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
