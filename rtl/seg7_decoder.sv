// Seven-segment decoder: one digit value to a segment pattern.
//
// Combinational. `digit` 0-9 gives the decimal numeral, 10-15 the hex letters
// A b C d E F, and `blank` switches every segment off. The output is active
// high with seg[0] = segment a through seg[6] = segment g (a top, b upper
// right, c lower right, d bottom, e lower left, f upper left, g middle); the
// display controller inverts it for a common-anode display. The document
// names a decoder from counter values to segment patterns; the encoding and
// bit order are the usual ones, chosen here.
module seg7_decoder (
  input  logic [3:0] digit,
  input  logic       blank,
  output logic [6:0] seg     // {g,f,e,d,c,b,a}, 1 = segment lit
);

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b011_1111;
      4'h1: seg = 7'b000_0110;
      4'h2: seg = 7'b101_1011;
      4'h3: seg = 7'b100_1111;
      4'h4: seg = 7'b110_0110;
      4'h5: seg = 7'b110_1101;
      4'h6: seg = 7'b111_1101;
      4'h7: seg = 7'b000_0111;
      4'h8: seg = 7'b111_1111;
      4'h9: seg = 7'b110_1111;
      4'hA: seg = 7'b111_0111;
      4'hB: seg = 7'b111_1100;
      4'hC: seg = 7'b011_1001;
      4'hD: seg = 7'b101_1110;
      4'hE: seg = 7'b111_1001;
      4'hF: seg = 7'b111_0001;
    endcase
    if (blank) seg = 7'b000_0000;
  end

endmodule
