// quarter_sine_rom_tb: reads all 64 entries of the quarter-sine table and
// compares each with round(1023 * sin(pi/2 * k/64)) computed here in real
// arithmetic. Also checks the one-cycle read latency (the output must not
// change before the clock edge) and that the table rises monotonically.
module quarter_sine_rom_tb;
  import synth_pkg::*;

  logic               clk = 1'b0;
  logic [QADDR_W-1:0] addr;
  logic [QDATA_W-1:0] data;
  int checks = 0, failures = 0;

  quarter_sine_rom dut (.clk(clk), .addr(addr), .data(data));

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

  initial begin
    int expected, prev;
    prev = -1;
    addr = '0;
    @(posedge clk);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      addr = 6'(k);
      #1;
      // Before the edge the previous entry must still be visible.
      if (k > 0) check(int'(data) == prev, $sformatf("latency: addr %0d changed data early", k));
      @(posedge clk);
      #1;
      expected = int'($floor(1023.0 * $sin(3.14159265358979 * k / 128.0) + 0.5));
      check(int'(data) == expected, $sformatf("entry %0d: got %0d want %0d", k, data, expected));
      check(int'(data) > prev, $sformatf("entry %0d not rising", k));
      prev = int'(data);
    end
    check(prev == 1023, "last entry is not the full-scale 1023");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
