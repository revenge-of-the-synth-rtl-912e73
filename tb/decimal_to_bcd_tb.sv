// decimal_to_bcd_tb: converts every value 0..255 with the default 3-digit
// converter and 0..15 with a 2-digit, 4-bit one, and compares each digit
// with the value's decimal digits found by division.
module decimal_to_bcd_tb;
  logic [7:0]  v8;
  logic [11:0] bcd8;
  logic [3:0]  v4;
  logic [7:0]  bcd4;
  int checks = 0, failures = 0;

  decimal_to_bcd                         dut8 (.value(v8), .bcd(bcd8));
  decimal_to_bcd #(.BIN_W(4), .DIGITS(2)) dut4 (.value(v4), .bcd(bcd4));

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

  initial begin
    for (int v = 0; v < 256; v++) begin
      v8 = 8'(v);
      #1;
      check(bcd8[3:0] == 4'(v % 10) && bcd8[7:4] == 4'((v / 10) % 10) && bcd8[11:8] == 4'(v / 100),
            $sformatf("%0d -> %h", v, bcd8));
    end
    for (int v = 0; v < 16; v++) begin
      v4 = 4'(v);
      #1;
      check(bcd4[3:0] == 4'(v % 10) && bcd4[7:4] == 4'(v / 10), $sformatf("%0d -> %h", v, bcd4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
