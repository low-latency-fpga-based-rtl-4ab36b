// Testbench for display_ctrl.
//
// With REFRESH_CYCLES = 5 and 8 digits, the testbench samples the active-low
// outputs every cycle and checks: exactly one anode is low at a time; digits
// are scanned 0,1,...,7,0,... each for REFRESH_CYCLES cycles; every digit
// shows the segments of the right decimal digit of HH MM SS (the expected
// pattern comes from a per-glyph segment letter list), digits 6 and 7 are
// blank, and the decimal points are lit at digits 2 and 4, plus digit 0 when
// alarm_mode is high. Random times and both modes are covered.
module tb_display_ctrl;
  import alarm_clock_pkg::*;

  localparam int unsigned ND = 8;
  localparam int unsigned RC = 5;

  logic          clk = 1'b0;
  logic          rst;
  hms_t          value;
  logic          alarm_mode;
  logic [ND-1:0] an;
  logic [6:0]    seg;
  logic          dp;
  int            checks = 0;
  int            failures = 0;

  always #5 clk = ~clk;

  display_ctrl #(.NUM_DIGITS(ND), .REFRESH_CYCLES(RC)) dut (
    .clk(clk), .rst(rst), .value(value), .alarm_mode(alarm_mode),
    .an(an), .seg(seg), .dp(dp)
  );

  string glyph[10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg"};

  function automatic logic [6:0] pattern(input string s);
    logic [6:0] p = '0;
    for (int i = 0; i < s.len(); i++) p[s[i] - "a"] = 1'b1;
    return p;
  endfunction

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

  // Expected lit segments and point of digit position `pos`.
  function automatic logic [7:0] expected(input int pos, input int h, input int m, input int s,
                                          input logic amode);
    int         d;
    logic       blank;
    logic       point;
    blank = 1'b0;
    d = 0;
    case (pos)
      0: d = s % 10;
      1: d = s / 10;
      2: d = m % 10;
      3: d = m / 10;
      4: d = h % 10;
      5: d = h / 10;
      default: blank = 1'b1;
    endcase
    point = (pos == 2) || (pos == 4) || (pos == 0 && amode);
    return {point, blank ? 7'b0 : pattern(glyph[d])};
  endfunction

  initial begin
    int   h, m, s;
    int   pos, prev_pos, dwell;
    logic [7:0] exp;
    logic full_dwell;
    rst = 1'b1;
    value = HMS_ZERO;
    alarm_mode = 1'b0;
    repeat (3) @(negedge clk);
    check(an == '1 && seg == '1 && dp == 1'b1, "all dark in reset");
    rst = 1'b0;
    for (int t = 0; t < 40; t++) begin
      h = $urandom_range(0, 23); m = $urandom_range(0, 59); s = $urandom_range(0, 59);
      if (t == 0) begin h = 23; m = 59; s = 58; end
      if (t == 1) begin h = 0; m = 0; s = 0; end
      value = '{hh: 5'(h), mm: 6'(m), ss: 6'(s)};
      alarm_mode = t[0];
      // Let the new value reach the registered outputs.
      @(negedge clk);
      @(negedge clk);
      prev_pos = -1;
      dwell = 0;
      full_dwell = 1'b0;
      // Two full frames.
      for (int c = 0; c < int'(2 * ND * RC); c++) begin
        @(negedge clk);
        check($countones(~an) == 1, $sformatf("one anode active, an=%b", an));
        pos = 0;
        for (int i = 0; i < int'(ND); i++) if (!an[i]) pos = i;
        if (pos == prev_pos) begin
          dwell++;
        end else begin
          if (prev_pos >= 0) begin
            check(pos == (prev_pos + 1) % ND, $sformatf("scan order %0d -> %0d", prev_pos, pos));
            // The first digit seen in this window was entered before it began.
            if (full_dwell)
              check(dwell == int'(RC), $sformatf("dwell %0d on digit %0d", dwell, prev_pos));
            full_dwell = 1'b1;
          end
          prev_pos = pos;
          dwell = 1;
        end
        exp = expected(pos, h, m, s, alarm_mode);
        check({~dp, ~seg} == exp, $sformatf("digit %0d of %0d:%0d:%0d am=%0b: seg=%b dp=%b exp=%b",
                                            pos, h, m, s, alarm_mode, seg, dp, exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
