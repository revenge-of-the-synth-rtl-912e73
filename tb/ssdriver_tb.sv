// ssdriver_tb: with REFRESH_CYCLES = 4 and digits 7..0 set to 9,1,F,3,4,5,6,0
// (F = blank), watches three frames and checks that exactly one anode is
// low, that the lit digit advances 0,1,...,7 every 4 cycles, and that the
// segments show that digit's pattern (given here as lit-segment letters).
module ssdriver_tb;
  logic        clk = 1'b0, rst;
  logic [31:0] digits;
  logic [7:0]  an_n;
  logic [6:0]  seg_n;
  logic        dp_n;
  int checks = 0, failures = 0;

  ssdriver #(.N_DIGITS(8), .REFRESH_CYCLES(4)) dut (
    .clk(clk), .rst(rst), .digits(digits), .an_n(an_n), .seg_n(seg_n), .dp_n(dp_n));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [6:0] lit(input string s);
    logic [6:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  initial begin
    // Expected lit segments of digits 0..7 of the display.
    string shape [8] = '{"abcdef", "acdefg", "acdfg", "bcfg", "abcdg", "", "bc", "abcdfg"};
    int pos;
    rst = 1'b1;
    digits = 32'h91F3_4560;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 3 * 8 * 4; c++) begin
      pos = (c / 4) % 8;
      check(an_n == ~(8'b1 << pos), $sformatf("cycle %0d: anodes %b, want digit %0d", c, an_n, pos));
      check(seg_n == ~lit(shape[pos]), $sformatf("digit %0d segments %b", pos, seg_n));
      check(dp_n == 1'b1, "decimal point lit");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
