// bcd_decoder_tb: checks the segment pattern of every input code against the
// lit segments of each digit, written as letters (a top, b upper right,
// c lower right, d bottom, e lower left, f upper left, g middle). Outputs
// are active low; codes 10..15 must blank the digit.
module bcd_decoder_tb;
  logic [3:0] digit;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  bcd_decoder dut (.digit(digit), .seg_n(seg_n));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] lit(input string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  initial begin
    string shape [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                          "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (d < 10 ? (seg_n != ~lit(shape[d])) : (seg_n != 7'h7F)) begin
        failures++;
        $display("FAIL: digit %0d gave %b", d, seg_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
