// End-to-end testbench for alarm_clock_top.
//
// Runs the whole clock at reduced rates (a "second" of CLK_DIV = 200 clocks,
// 4-cycle debounce, 3-cycle display refresh) through a complete use:
//   1. reset, display shows 00:00:00;
//   2. set-time mode: a glitch shorter than the debounce time is ignored,
//      then button presses set 23:59:55 while the clock stays paused;
//   3. set-alarm mode: the display shows the alarm being set to 00:00:02
//      (with the alarm-mode point) while the clock runs on;
//   4. alarm armed: the clock passes midnight (seconds, minute and hour
//      carries), reaches 00:00:02, the buzzer and LED come on one cycle
//      after the time matches, and stop silences them;
//   5. alarm disarmed: a later match (alarm moved 6 s ahead) gives
//      no buzzer; armed again, a ringing alarm is silenced by the enable
//      switch.
// A reference model of the time of day advances on every tick outside
// set-time mode and is compared with the counter every cycle; the display
// is decoded back to digits from its segment patterns and compared with the
// model. Each mechanism is counted and a failure is counted for any that
// never happened.
module tb_alarm_clock_top;
  import alarm_clock_pkg::*;

  localparam int unsigned DIV = 200;
  localparam int unsigned DEB = 4;
  localparam int unsigned RC  = 3;
  localparam int unsigned ND  = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic          btn_hh, btn_mm, btn_ss, btn_stop;
  logic          sw_set_time, sw_set_alarm, sw_alarm_en;
  logic [ND-1:0] an;
  logic [6:0]    seg;
  logic          dp;
  logic          buzzer, led_alarm, led_set_time, led_set_alarm, led_alarm_en;
  int            checks = 0;
  int            failures = 0;

  always #5 clk = ~clk;

  alarm_clock_top #(
    .CLK_DIV(DIV), .DEBOUNCE_CYCLES(DEB), .REFRESH_CYCLES(RC), .NUM_DIGITS(ND)
  ) dut (
    .clk(clk), .rst(rst),
    .btn_hh(btn_hh), .btn_mm(btn_mm), .btn_ss(btn_ss), .btn_stop(btn_stop),
    .sw_set_time(sw_set_time), .sw_set_alarm(sw_set_alarm), .sw_alarm_en(sw_alarm_en),
    .an(an), .seg(seg), .dp(dp),
    .buzzer(buzzer), .led_alarm(led_alarm), .led_set_time(led_set_time),
    .led_set_alarm(led_set_alarm), .led_alarm_en(led_alarm_en)
  );

  // ---------------------------------------------------------------- checks
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- reference model
  // Seconds of the day; -1 while unknown (before the set phase).
  int   ref_secs = -1;
  int   alarm_secs = -1;
  logic model_on = 1'b0;
  logic in_set_time;
  int   n_ticks = 0, n_paused_ticks = 0, n_min_carry = 0, n_hour_carry = 0, n_midnight = 0;
  int   last_tick_cycle = -1, cycle = 0;

  function automatic int secs_of(input hms_t t);
    return int'(t.hh) * 3600 + int'(t.mm) * 60 + int'(t.ss);
  endfunction

  assign in_set_time = led_set_time;

  logic started = 1'b0;
  always @(posedge clk) begin
    cycle++;
    if (started && dut.u_div.tick) begin
      n_ticks++;
      if (last_tick_cycle >= 0)
        check(cycle - last_tick_cycle == int'(DIV), $sformatf("tick period %0d", cycle - last_tick_cycle));
      last_tick_cycle = cycle;
      if (in_set_time) begin
        n_paused_ticks++;
      end else if (model_on) begin
        if (ref_secs % 60 == 59)   n_min_carry++;
        if (ref_secs % 3600 == 3599) n_hour_carry++;
        if (ref_secs == 86_399)    n_midnight++;
        ref_secs = (ref_secs + 1) % 86_400;
      end
    end
  end

  always @(negedge clk) begin
    if (model_on)
      check(secs_of(dut.u_time.now) == ref_secs,
            $sformatf("time %0d expected %0d", secs_of(dut.u_time.now), ref_secs));
  end

  // Alarm latency: buzzer must rise exactly one cycle after the match.
  int   n_rings = 0, n_silent_matches = 0, match_cycle = -1;
  logic prev_match = 1'b0, prev_buzzer = 1'b0;
  always @(negedge clk) begin
    logic m;
    m = model_on && (ref_secs == secs_of(dut.u_alarm.alarm));
    if (m && !prev_match) begin
      match_cycle = cycle;
      if (!sw_alarm_en) n_silent_matches++;
    end
    if (buzzer && !prev_buzzer) begin
      n_rings++;
      check(cycle - match_cycle == 1, $sformatf("buzzer latency %0d cycles", cycle - match_cycle));
    end
    check(led_alarm == buzzer, "alarm LED follows buzzer");
    prev_match  = m;
    prev_buzzer = buzzer;
  end

  // -------------------------------------------------------- display reader
  string glyph[10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg"};

  function automatic int digit_of(input logic [6:0] lit);
    for (int d = 0; d < 10; d++) begin
      logic [6:0] p = '0;
      for (int i = 0; i < glyph[d].len(); i++) p[glyph[d][i] - "a"] = 1'b1;
      if (p == lit) return d;
    end
    return -1;
  endfunction

  // Watch one full scan and return the shown time in seconds (-1 if any
  // digit is unreadable) and the decimal points seen.
  task automatic read_display(output int secs, output logic [ND-1:0] points);
    int dig[ND];
    for (int i = 0; i < int'(ND); i++) dig[i] = -1;
    points = '0;
    repeat (ND * RC + 1) begin
      @(negedge clk);
      for (int i = 0; i < int'(ND); i++)
        if (!an[i]) begin
          dig[i] = (i >= 6) ? ((seg == '1) ? 0 : -1) : digit_of(~seg);
          points[i] = ~dp;
        end
    end
    secs = 0;
    for (int i = 0; i < 6; i++) if (dig[i] < 0) secs = -1;
    if (secs == 0)
      secs = (dig[5] * 10 + dig[4]) * 3600 + (dig[3] * 10 + dig[2]) * 60 + dig[1] * 10 + dig[0];
  endtask

  // ----------------------------------------------------------- stimulus
  int n_time_edits = 0, n_alarm_edits = 0, n_glitch_rejected = 0, n_stops = 0;
  int n_alarm_view = 0, n_enable_silenced = 0;

  task automatic drive_btn(input int which, input logic v);
    case (which)
      0: btn_hh = v;
      1: btn_mm = v;
      2: btn_ss = v;
      default: btn_stop = v;
    endcase
  endtask

  task automatic press(input int which, input int times);
    repeat (times) begin
      drive_btn(which, 1'b1); repeat (DEB + 4) @(negedge clk);
      drive_btn(which, 1'b0); repeat (DEB + 4) @(negedge clk);
    end
  endtask

  task automatic wait_secs(input int target);
    while (ref_secs != target) @(negedge clk);
  endtask

  initial begin
    int          shown;
    logic [ND-1:0] pts;
    int          t_before;
    rst = 1'b1;
    btn_hh = 0; btn_mm = 0; btn_ss = 0; btn_stop = 0;
    sw_set_time = 0; sw_set_alarm = 0; sw_alarm_en = 0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    started = 1'b1;

    // 1. Reset state.
    check(secs_of(dut.u_time.now) == 0 && secs_of(dut.u_alarm.alarm) == 0, "reset time and alarm");
    check(!buzzer, "silent after reset");

    // 2. Set the time to 23:59:55 with the clock paused.
    sw_set_time = 1'b1;
    repeat (4) @(negedge clk);
    check(led_set_time && !led_set_alarm, "set-time LED");
    t_before = secs_of(dut.u_time.now);
    btn_hh = 1'b1; repeat (DEB - 2) @(negedge clk); btn_hh = 1'b0;
    repeat (3 * DEB) @(negedge clk);
    if (secs_of(dut.u_time.now) == t_before) n_glitch_rejected++;
    check(secs_of(dut.u_time.now) == t_before, "short glitch ignored");
    press(0, 23); n_time_edits += 23;
    press(1, 59); n_time_edits += 59;
    press(2, 55); n_time_edits += 55;
    repeat (2 * DIV) @(negedge clk);  // ticks pass, clock must not move
    check(secs_of(dut.u_time.now) == 86_395, $sformatf("time set to %0d", secs_of(dut.u_time.now)));
    read_display(shown, pts);
    check(shown == 86_395, $sformatf("display shows set time %0d", shown));
    check(pts == 8'b0001_0100, $sformatf("time view points %b", pts));

    // 3. Set the alarm to 00:00:02 while the clock runs.
    @(negedge clk);
    sw_set_time = 1'b0;
    sw_set_alarm = 1'b1;
    // The model takes over from the set value once the mode has changed.
    repeat (2) @(negedge clk);
    ref_secs = 86_395;
    model_on = 1'b1;
    @(negedge clk);
    check(led_set_alarm && !led_set_time, "set-alarm LED");
    press(2, 2); n_alarm_edits += 2;
    alarm_secs = 2;
    check(secs_of(dut.u_alarm.alarm) == 2, "alarm register 00:00:02");
    read_display(shown, pts);
    check(shown == 2, $sformatf("display shows alarm %0d", shown));
    check(pts == 8'b0001_0101, $sformatf("alarm view points %b", pts));
    if (shown == 2 && pts[0]) n_alarm_view++;
    sw_set_alarm = 1'b0;
    sw_alarm_en = 1'b1;
    repeat (3) @(negedge clk);
    check(led_alarm_en, "alarm-enable LED");

    // 4. Past midnight to the alarm.
    wait_secs(0);
    read_display(shown, pts);
    check(shown == 0 || shown == 1, $sformatf("display after midnight %0d", shown));
    wait_secs(2);
    repeat (3) @(negedge clk);
    check(buzzer && led_alarm, "alarm ringing");
    repeat (3 * DIV) @(negedge clk);
    check(buzzer, "alarm keeps ringing after the match second");
    press(3, 1); n_stops++;
    check(!buzzer, "stop silences");

    // 5a. Disarmed: alarm moved 6 s ahead, the match passes silently.
    sw_alarm_en = 1'b0;
    sw_set_alarm = 1'b1;
    repeat (3) @(negedge clk);
    press(2, 6); n_alarm_edits += 6;
    alarm_secs = secs_of(dut.u_alarm.alarm);
    check(alarm_secs == 8 && alarm_secs > ref_secs, $sformatf("alarm %0d ahead of %0d", alarm_secs, ref_secs));
    sw_set_alarm = 1'b0;
    wait_secs(alarm_secs);
    repeat (2 * DIV) @(negedge clk);
    check(!buzzer, "disarmed alarm stays silent");

    // 5b. Armed again, ringing alarm silenced by the enable switch.
    sw_alarm_en = 1'b1;
    sw_set_alarm = 1'b1;
    repeat (3) @(negedge clk);
    alarm_secs = -1;
    press(2, 4); n_alarm_edits += 4;
    alarm_secs = secs_of(dut.u_alarm.alarm);
    check(alarm_secs > ref_secs, $sformatf("alarm %0d ahead of %0d", alarm_secs, ref_secs));
    sw_set_alarm = 1'b0;
    wait_secs(alarm_secs);
    repeat (3) @(negedge clk);
    check(buzzer, "re-armed alarm rings");
    sw_alarm_en = 1'b0;
    repeat (4) @(negedge clk);
    check(!buzzer, "enable switch silences");
    if (!buzzer) n_enable_silenced++;

    // Mechanism coverage.
    $display("coverage: ticks=%0d paused=%0d min_carry=%0d hour_carry=%0d midnight=%0d",
             n_ticks, n_paused_ticks, n_min_carry, n_hour_carry, n_midnight);
    $display("coverage: time_edits=%0d alarm_edits=%0d glitch=%0d rings=%0d stops=%0d silent=%0d view=%0d en_off=%0d",
             n_time_edits, n_alarm_edits, n_glitch_rejected, n_rings, n_stops, n_silent_matches,
             n_alarm_view, n_enable_silenced);
    check(n_ticks > 0, "tick seen");
    check(n_paused_ticks > 0, "pause in set-time mode seen");
    check(n_min_carry > 0, "minute carry seen");
    check(n_hour_carry > 0, "hour carry seen");
    check(n_midnight > 0, "midnight rollover seen");
    check(n_time_edits > 0 && n_alarm_edits > 0, "edits seen");
    check(n_glitch_rejected > 0, "debounce rejection seen");
    check(n_rings == 2, $sformatf("rings %0d", n_rings));
    check(n_stops > 0, "stop seen");
    check(n_silent_matches > 0, "disarmed match seen");
    check(n_alarm_view > 0, "alarm view seen");
    check(n_enable_silenced > 0, "enable-off silencing seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
