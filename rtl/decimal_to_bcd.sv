// decimal_to_bcd: binary integer to binary-coded decimal.
//
// Combinational shift-and-add-3 ("double dabble") conversion: the binary
// value is shifted into the BCD digits one bit at a time, most significant
// bit first, and before each shift every digit of 5 or more has 3 added so
// that it carries correctly into the next digit.
//
// Interface: `value` is BIN_W bits; `bcd` holds DIGITS digits of 4 bits,
// digit 0 (the units) in bits 3:0. DIGITS must be large enough for
// 2**BIN_W - 1; the defaults (8 bits, 3 digits) cover 0..255.
//
// The document names this block and says what it does; the algorithm is
// this design's choice.
module decimal_to_bcd #(
  parameter int unsigned BIN_W  = 8,
  parameter int unsigned DIGITS = 3
) (
  input  logic [BIN_W-1:0]    value,
  output logic [4*DIGITS-1:0] bcd
);

  if ((1.0 * (2 ** BIN_W) - 1) >= 10.0 ** DIGITS) begin : g_check
    $error("decimal_to_bcd: %0d digits cannot hold %0d bits", DIGITS, BIN_W);
  end

  always_comb begin
    bcd = '0;
    for (int b = BIN_W - 1; b >= 0; b--) begin
      for (int d = 0; d < DIGITS; d++) begin
        if (bcd[4*d +: 4] >= 4'd5) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      end
      bcd = {bcd[4*DIGITS-2:0], value[b]};
    end
  end

endmodule
