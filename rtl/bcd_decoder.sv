// bcd_decoder: one decimal digit to a seven-segment pattern.
//
// Combinational. The output is seven active-low segment lines in the order
// {g, f, e, d, c, b, a} (segment a is the top bar, going clockwise, g the
// middle bar), as the common-anode displays of the target board expect. Codes
// 10..15 are not digits and blank the display (all segments off).
//
// The document names this block and says it turns a digit 0-9 into a
// seven-bit code; the segment order, polarity and blanking are this
// design's choices.
module bcd_decoder (
  input  logic [3:0] digit,
  output logic [6:0] seg_n
);

  logic [6:0] seg;   // active high, {g, f, e, d, c, b, a}

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b0111111;
      4'd1:    seg = 7'b0000110;
      4'd2:    seg = 7'b1011011;
      4'd3:    seg = 7'b1001111;
      4'd4:    seg = 7'b1100110;
      4'd5:    seg = 7'b1101101;
      4'd6:    seg = 7'b1111101;
      4'd7:    seg = 7'b0000111;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1101111;
      default: seg = 7'b0000000;
    endcase
    seg_n = ~seg;
  end

endmodule
