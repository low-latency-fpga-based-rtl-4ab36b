// Testbench for alarm_comparator.
//
// The comparator is combinational, so each check sets both times and reads
// `match` after a short settle delay, in zero clock cycles. Covers equal
// times across the whole range, times that differ in exactly one field (and
// in exactly one bit), and random pairs; the expected value is worked out
// from the integer fields.
module tb_alarm_comparator;
  import alarm_clock_pkg::*;

  hms_t now, alarm;
  logic match;
  int   checks = 0;
  int   failures = 0;

  alarm_comparator dut (.now(now), .alarm(alarm), .match(match));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int h1, input int m1, input int s1,
                       input int h2, input int m2, input int s2);
    logic exp;
    now   = '{hh: 5'(h1), mm: 6'(m1), ss: 6'(s1)};
    alarm = '{hh: 5'(h2), mm: 6'(m2), ss: 6'(s2)};
    exp   = (h1 == h2) && (m1 == m2) && (s1 == s2);
    #1;
    checks++;
    if (match !== exp) begin
      failures++;
      $display("FAIL %0d:%0d:%0d vs %0d:%0d:%0d match=%0b", h1, m1, s1, h2, m2, s2, match);
    end
  endtask

  initial begin
    int h, m, s;
    // Every time of one hour against itself, and against its neighbours.
    for (int i = 0; i < 3600; i++) begin
      h = (i * 7) % 24; m = i / 60; s = i % 60;
      apply(h, m, s, h, m, s);
      apply(h, m, s, h, m, (s + 1) % 60);
      apply(h, m, s, h, (m + 1) % 60, s);
      apply(h, m, s, (h + 1) % 24, m, s);
    end
    // One-bit differences in each position of the packed time.
    for (int b = 0; b < 17; b++) begin
      hms_t a, c;
      a = hms_t'(17'($urandom));
      c = a ^ hms_t'(17'(1) << b);
      apply(a.hh, a.mm, a.ss, c.hh, c.mm, c.ss);
    end
    // Random pairs, one in four equal.
    for (int i = 0; i < 5000; i++) begin
      int h2, m2, s2;
      h = $urandom_range(0, 23); m = $urandom_range(0, 59); s = $urandom_range(0, 59);
      if ($urandom_range(0, 3) == 0) begin
        h2 = h; m2 = m; s2 = s;
      end else begin
        h2 = $urandom_range(0, 23); m2 = $urandom_range(0, 59); s2 = $urandom_range(0, 59);
      end
      apply(h, m, s, h2, m2, s2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
