// Testbench for time_counter.
//
// A reference model counts seconds of the day (0..86399) and converts them to
// HH:MM:SS by division. The testbench drives a full day of ticks (86400),
// with random idle cycles between ticks, and compares the counter against the
// model after every tick, so every seconds, minutes and hours wrap, and the
// midnight rollover, are checked. It then checks the per-field edit commands
// (no carry between fields, wrap within a field, edit wins over a tick).
module tb_time_counter;
  import alarm_clock_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  logic  tick;
  edit_t edit;
  hms_t  now;
  int    checks = 0;
  int    failures = 0;

  always #5 clk = ~clk;

  time_counter dut (.clk(clk), .rst(rst), .tick(tick), .edit(edit), .now(now));

  function automatic hms_t from_secs(input int unsigned s);
    hms_t t;
    t.hh = 5'(s / 3600);
    t.mm = 6'((s / 60) % 60);
    t.ss = 6'(s % 60);
    return t;
  endfunction

  task automatic check_time(input hms_t exp, input string what);
    checks++;
    if (now !== exp) begin
      failures++;
      $display("FAIL %s: got %0d:%0d:%0d expected %0d:%0d:%0d", what,
               now.hh, now.mm, now.ss, exp.hh, exp.mm, exp.ss);
    end
  endtask

  task automatic pulse_edit(input edit_t e, input logic with_tick);
    @(negedge clk);
    edit = e;
    tick = with_tick;
    @(negedge clk);
    edit = '0;
    tick = 1'b0;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned secs;
    hms_t        exp;
    rst  = 1'b1;
    tick = 1'b0;
    edit = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    check_time(HMS_ZERO, "after reset");
    secs = 0;
    for (int i = 0; i < 86_400 + 5; i++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      secs = (secs + 1) % 86_400;
      check_time(from_secs(secs), $sformatf("tick %0d", i));
    end
    // Now at 00:00:05. Edits: each field steps alone, no carry.
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 59; i++) pulse_edit('{inc_hh: 1'b0, inc_mm: 1'b0, inc_ss: 1'b1}, 1'b0);
    check_time('{hh: 5'd0, mm: 6'd0, ss: 6'd59}, "ss edited to 59");
    pulse_edit('{inc_hh: 1'b0, inc_mm: 1'b0, inc_ss: 1'b1}, 1'b0);
    check_time(HMS_ZERO, "ss edit wraps without carry");
    for (int i = 0; i < 60; i++) pulse_edit('{inc_hh: 1'b0, inc_mm: 1'b1, inc_ss: 1'b0}, 1'b0);
    check_time(HMS_ZERO, "mm edit wraps without carry");
    for (int i = 0; i < 23; i++) pulse_edit('{inc_hh: 1'b1, inc_mm: 1'b0, inc_ss: 1'b0}, 1'b0);
    check_time('{hh: 5'd23, mm: 6'd0, ss: 6'd0}, "hh edited to 23");
    pulse_edit('{inc_hh: 1'b1, inc_mm: 1'b1, inc_ss: 1'b1}, 1'b0);
    check_time('{hh: 5'd0, mm: 6'd1, ss: 6'd1}, "all fields at once, hh wraps");
    pulse_edit('{inc_hh: 1'b0, inc_mm: 1'b1, inc_ss: 1'b0}, 1'b1);
    check_time('{hh: 5'd0, mm: 6'd2, ss: 6'd1}, "edit wins over tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
