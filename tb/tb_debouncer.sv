// Testbench for debouncer.
//
// With STABLE_CYCLES = 16 it checks: a clean press gives one `press` pulse
// exactly STABLE_CYCLES + 2 cycles after the input rises; glitches of up to
// STABLE_CYCLES - 1 cycles give no pulse and leave `level` alone; a bouncing
// press gives exactly one pulse; a release gives none.
module tb_debouncer;

  localparam int unsigned STABLE = 16;
  localparam int unsigned LAT = STABLE + 2;

  logic clk = 1'b0;
  logic rst, btn;
  logic level, press;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  debouncer #(.STABLE_CYCLES(STABLE)) dut (
    .clk(clk), .rst(rst), .btn_raw(btn), .level(level), .press(press)
  );

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
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

  // Hold the input at `v` for n cycles, counting press pulses; return count
  // and the cycle (1-based) of the first pulse.
  task automatic hold(input logic v, input int n, output int pulses, output int first);
    pulses = 0;
    first  = 0;
    btn = v;
    for (int i = 1; i <= n; i++) begin
      @(negedge clk);
      if (press) begin
        pulses++;
        if (first == 0) first = i;
      end
    end
  endtask

  initial begin
    int p, f;
    rst = 1'b1;
    btn = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    hold(1'b0, 5, p, f);
    check(p == 0 && level == 1'b0, "idle");
    // Clean press: one pulse exactly LAT cycles after the edge.
    hold(1'b1, 3 * STABLE, p, f);
    check(p == 1, $sformatf("clean press pulses=%0d", p));
    check(f == LAT, $sformatf("press latency %0d expected %0d", f, LAT));
    check(level == 1'b1, "level high after press");
    // Release: no pulse, level falls.
    hold(1'b0, 3 * STABLE, p, f);
    check(p == 0 && level == 1'b0, "release gives no pulse");
    // Glitches shorter than STABLE are ignored.
    for (int len = 1; len < int'(STABLE); len++) begin
      hold(1'b1, len, p, f);
      check(p == 0, $sformatf("glitch %0d high", len));
      hold(1'b0, 2 * STABLE, p, f);
      check(p == 0 && level == 1'b0, $sformatf("glitch %0d ignored", len));
    end
    // Bouncing press: random short bounces, then stable. Exactly one pulse.
    for (int k = 0; k < 10; k++) begin
      int total;
      total = 0;
      for (int b = 0; b < 6; b++) begin
        hold(1'b1, $urandom_range(1, STABLE - 1), p, f); total += p;
        hold(1'b0, $urandom_range(1, STABLE - 1), p, f); total += p;
      end
      hold(1'b1, 3 * STABLE, p, f); total += p;
      check(total == 1, $sformatf("bouncing press %0d pulses=%0d", k, total));
      check(f == LAT, $sformatf("bouncing press %0d latency %0d", k, f));
      for (int b = 0; b < 6; b++) begin
        hold(1'b0, $urandom_range(1, STABLE - 1), p, f); total += p;
        hold(1'b1, $urandom_range(1, STABLE - 1), p, f); total += p;
      end
      hold(1'b0, 3 * STABLE, p, f); total += p;
      check(total == 1 && level == 1'b0, $sformatf("bouncing release %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
