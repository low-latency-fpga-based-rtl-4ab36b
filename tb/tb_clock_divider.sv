// Testbench for clock_divider.
//
// Runs a small divide ratio (DIV = 7) and checks, cycle by cycle against an
// independent reference count, that `tick` is high for exactly one cycle in
// every DIV, that the first tick comes DIV cycles after reset, and that a
// reset in mid-count restarts the phase. A second instance with DIV = 1000
// checks the tick rate over many periods.
module tb_clock_divider;

  localparam int unsigned DIV_A = 7;
  localparam int unsigned DIV_B = 1000;

  logic clk = 1'b0;
  logic rst;
  logic tick_a, tick_b;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  clock_divider #(.DIV(DIV_A)) dut_a (.clk(clk), .rst(rst), .tick(tick_a));
  clock_divider #(.DIV(DIV_B)) dut_b (.clk(clk), .rst(rst), .tick(tick_b));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n;
    int unsigned ticks_b;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // Cycle n after reset release: tick expected when n is a multiple of DIV.
    for (n = 1; n <= 20 * DIV_A; n++) begin
      @(posedge clk);
      #1 check(tick_a == ((n % DIV_A) == 0), $sformatf("tick_a cycle %0d", n));
    end
    // Reset in the middle of a period restarts the count.
    repeat (3) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    for (n = 1; n <= 3 * DIV_A; n++) begin
      @(posedge clk);
      #1 check(tick_a == ((n % DIV_A) == 0), $sformatf("tick_a after reset cycle %0d", n));
    end
    // Rate check for the larger ratio.
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    ticks_b = 0;
    for (n = 1; n <= 50 * DIV_B; n++) begin
      @(posedge clk);
      #1 if (tick_b) ticks_b++;
    end
    check(ticks_b == 50, $sformatf("tick_b count %0d over %0d cycles", ticks_b, 50 * DIV_B));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
