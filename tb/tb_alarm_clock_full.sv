// Full-size testbench for alarm_clock_top, every parameter at its default:
// 100 MHz clock, 1 s = 100_000_000 cycles, 10 ms debounce, 1 ms per display
// digit.
//
// One complete alarm operation in real (simulated) time: after reset the
// alarm is set to 00:00:02 with two debounced button presses, shown on the
// display in alarm-setting mode, then armed. The clock runs from 00:00:00;
// the testbench checks that the time advances exactly once every
// 100_000_000 cycles, that the buzzer comes on one cycle after the time
// reaches 00:00:02 (about 2 s of simulated time), that the display then reads
// 00:00:02, and that the stop button silences the buzzer.
module tb_alarm_clock_full;
  import alarm_clock_pkg::*;

  localparam int unsigned SEC = 100_000_000;
  localparam int unsigned DEB = 1_000_000;

  logic       clk = 1'b0;
  logic       rst;
  logic       btn_hh, btn_mm, btn_ss, btn_stop;
  logic       sw_set_time, sw_set_alarm, sw_alarm_en;
  logic [7:0] an;
  logic [6:0] seg;
  logic       dp;
  logic       buzzer, led_alarm, led_set_time, led_set_alarm, led_alarm_en;
  int         checks = 0;
  int         failures = 0;
  longint     cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  alarm_clock_top dut (
    .clk(clk), .rst(rst),
    .btn_hh(btn_hh), .btn_mm(btn_mm), .btn_ss(btn_ss), .btn_stop(btn_stop),
    .sw_set_time(sw_set_time), .sw_set_alarm(sw_set_alarm), .sw_alarm_en(sw_alarm_en),
    .an(an), .seg(seg), .dp(dp),
    .buzzer(buzzer), .led_alarm(led_alarm), .led_set_time(led_set_time),
    .led_set_alarm(led_set_alarm), .led_alarm_en(led_alarm_en)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  initial begin : watchdog
    repeat (4 * SEC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // Sample each of the six time digits once, at the middle of its slot.
  task automatic read_display(output int secs);
    int dig[6];
    for (int i = 0; i < 6; i++) dig[i] = -1;
    for (int s = 0; s < 16; s++) begin
      repeat (50_000) @(negedge clk);
      for (int i = 0; i < 6; i++) if (!an[i]) dig[i] = digit_of(~seg);
    end
    secs = 0;
    for (int i = 0; i < 6; i++) if (dig[i] < 0) secs = -1;
    if (secs == 0)
      secs = (dig[5] * 10 + dig[4]) * 3600 + (dig[3] * 10 + dig[2]) * 60 + dig[1] * 10 + dig[0];
  endtask

  task automatic press(input int which);
    case (which)
      2: btn_ss = 1'b1;
      default: btn_stop = 1'b1;
    endcase
    repeat (DEB + DEB / 5) @(negedge clk);
    btn_ss = 1'b0;
    btn_stop = 1'b0;
    repeat (DEB + DEB / 5) @(negedge clk);
  endtask

  // Tick period and buzzer latency monitors.
  longint last_tick = -1;
  int     n_ticks = 0;
  longint match_cycle = -1, ring_cycle = -1;
  logic   prev_match = 1'b0, prev_buzzer = 1'b0;
  always @(negedge clk) begin
    logic m;
    if (dut.u_div.tick && !rst) begin
      if (last_tick >= 0) check(cycle - last_tick == SEC, $sformatf("tick period %0d", cycle - last_tick));
      last_tick = cycle;
      n_ticks++;
    end
    m = (dut.u_time.now.hh == 5'd0) && (dut.u_time.now.mm == 6'd0) && (dut.u_time.now.ss == 6'd2);
    if (m && !prev_match) match_cycle = cycle;
    if (buzzer && !prev_buzzer) ring_cycle = cycle;
    prev_match  = m;
    prev_buzzer = buzzer;
  end

  initial begin
    int shown;
    rst = 1'b1;
    btn_hh = 0; btn_mm = 0; btn_ss = 0; btn_stop = 0;
    sw_set_time = 0; sw_set_alarm = 0; sw_alarm_en = 0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);

    // Set the alarm to 00:00:02 and look at it on the display.
    sw_set_alarm = 1'b1;
    press(2);
    press(2);
    check(dut.u_alarm.alarm == hms_t'{hh: 5'd0, mm: 6'd0, ss: 6'd2}, "alarm register 00:00:02");
    read_display(shown);
    check(shown == 2, $sformatf("display shows alarm %0d", shown));
    sw_set_alarm = 1'b0;
    sw_alarm_en = 1'b1;

    // Wait for the buzzer.
    while (!buzzer) @(negedge clk);
    @(negedge clk);  // let the monitor record this edge first
    check(ring_cycle - match_cycle == 1, $sformatf("buzzer latency %0d", ring_cycle - match_cycle));
    check(match_cycle > 2 * longint'(SEC) && match_cycle < 2 * longint'(SEC) + 20,
          $sformatf("00:00:02 reached at cycle %0d", match_cycle));
    check(n_ticks == 2, $sformatf("ticks before alarm %0d", n_ticks));
    read_display(shown);
    check(shown == 2, $sformatf("display at alarm %0d", shown));
    check(buzzer && led_alarm, "buzzer and LED on");
    press(3);
    check(!buzzer && !led_alarm, "stop silences");
    $display("alarm at cycle %0d, %0d ticks", match_cycle, n_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
