// Testbench for buzzer_ctrl.
//
// Checks, cycle by cycle, that the buzzer rises exactly one clock after the
// match rises, stays on after the match ends, is silenced by stop even while
// the match is still high (and not re-armed by it), is silenced and blocked
// by alarm_en low, and that the LED follows the buzzer.
module tb_buzzer_ctrl;

  logic clk = 1'b0;
  logic rst, match, alarm_en, stop;
  logic buzzer, led;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  buzzer_ctrl dut (
    .clk(clk), .rst(rst), .match(match), .alarm_en(alarm_en), .stop(stop),
    .buzzer(buzzer), .led(led)
  );

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic exp, input string what);
    checks++;
    if (buzzer !== exp || led !== exp) begin
      failures++;
      $display("FAIL %s: buzzer=%0b led=%0b expected %0b at %0t", what, buzzer, led, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1; match = 1'b0; alarm_en = 1'b1; stop = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_out(1'b0, "idle");
    // Match rises: buzzer in the same cycle is still off, next cycle on.
    match = 1'b1;
    #1 expect_out(1'b0, "same cycle as match");
    @(negedge clk);
    expect_out(1'b1, "one cycle after match");
    repeat (5) @(negedge clk);
    match = 1'b0;
    repeat (20) @(negedge clk);
    expect_out(1'b1, "latched after match ends");
    // Stop silences it.
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    expect_out(1'b0, "stopped");
    // Stop during a long match: must not re-ring while match stays high.
    match = 1'b1;
    @(negedge clk);
    expect_out(1'b1, "second alarm");
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    expect_out(1'b0, "stopped during match");
    repeat (10) @(negedge clk);
    expect_out(1'b0, "no re-trigger while match high");
    match = 1'b0;
    @(negedge clk);
    // Alarm disabled: match ignored.
    alarm_en = 1'b0;
    match = 1'b1;
    repeat (3) @(negedge clk);
    expect_out(1'b0, "disabled alarm ignores match");
    match = 1'b0;
    alarm_en = 1'b1;
    @(negedge clk);
    // Turning the enable off silences a ringing alarm.
    match = 1'b1;
    @(negedge clk);
    match = 1'b0;
    expect_out(1'b1, "third alarm");
    alarm_en = 1'b0;
    @(negedge clk);
    expect_out(1'b0, "enable off silences");
    alarm_en = 1'b1;
    // Reset silences.
    match = 1'b1;
    @(negedge clk);
    match = 1'b0;
    expect_out(1'b1, "fourth alarm");
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    expect_out(1'b0, "reset silences");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
