// Testbench for alarm_register.
//
// Applies random per-field edit commands (any combination, with random gaps)
// and compares the stored alarm time after each against a reference that
// keeps three integers and wraps them modulo 24, 60 and 60. Also checks
// that reset clears the alarm and that idle cycles leave it unchanged.
module tb_alarm_register;
  import alarm_clock_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  edit_t edit;
  hms_t  alarm;
  int    checks = 0;
  int    failures = 0;

  always #5 clk = ~clk;

  alarm_register dut (.clk(clk), .rst(rst), .edit(edit), .alarm(alarm));

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int hh, input int mm, input int ss, input string what);
    checks++;
    if (alarm.hh != 5'(hh) || alarm.mm != 6'(mm) || alarm.ss != 6'(ss)) begin
      failures++;
      $display("FAIL %s: got %0d:%0d:%0d expected %0d:%0d:%0d", what,
               alarm.hh, alarm.mm, alarm.ss, hh, mm, ss);
    end
  endtask

  initial begin
    int hh, mm, ss;
    rst  = 1'b1;
    edit = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    hh = 0; mm = 0; ss = 0;
    check(0, 0, 0, "after reset");
    for (int i = 0; i < 3000; i++) begin
      edit.inc_hh = ($urandom_range(0, 2) == 0);
      edit.inc_mm = ($urandom_range(0, 1) == 0);
      edit.inc_ss = ($urandom_range(0, 1) == 0);
      if (edit.inc_hh) hh = (hh + 1) % 24;
      if (edit.inc_mm) mm = (mm + 1) % 60;
      if (edit.inc_ss) ss = (ss + 1) % 60;
      @(negedge clk);
      edit = '0;
      check(hh, mm, ss, $sformatf("edit %0d", i));
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check(hh, mm, ss, $sformatf("hold %0d", i));
    end
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(0, 0, 0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
