// Testbench for seg7_decoder.
//
// The reference describes each glyph by the letters of its lit segments
// ("abcdef" for 0, "bc" for 1, ...) and builds the expected bit pattern from
// those letters, independently of the decoder's table. All 16 digit values
// are checked with blank low, and with blank high every output must be off.
module tb_seg7_decoder;

  logic [3:0] digit;
  logic       blank;
  logic [6:0] seg;
  int         checks = 0;
  int         failures = 0;

  seg7_decoder dut (.digit(digit), .blank(blank), .seg(seg));

  string glyph[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] pattern(input string s);
    logic [6:0] p = '0;
    for (int i = 0; i < s.len(); i++) p[s[i] - "a"] = 1'b1;
    return p;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      blank = 1'b0;
      #1;
      checks++;
      if (seg !== pattern(glyph[d])) begin
        failures++;
        $display("FAIL digit %0d: seg=%b expected %b", d, seg, pattern(glyph[d]));
      end
      blank = 1'b1;
      #1;
      checks++;
      if (seg !== 7'b0) begin
        failures++;
        $display("FAIL digit %0d blanked: seg=%b", d, seg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
