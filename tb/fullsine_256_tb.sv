// fullsine_256_tb: sweeps all 256 sample numbers through the full-period
// sine and checks
//   - each value lies within 2 of 1024 + 1023 * sin(2*pi*s/256),
//   - the exact values at 0, 64, 128 and 192 (1024, 2047, 1024, 1),
//   - the odd symmetry v(s) + v(256 - s) = 2048 for s = 1..127,
//   - the one-cycle latency from sample_num to value.
module fullsine_256_tb;
  import synth_pkg::*;

  logic    clk = 1'b0;
  phase_t  s;
  sample_t value;
  int checks = 0, failures = 0;
  int v [256];

  fullsine_256 dut (.clk(clk), .sample_num(s), .value(value));

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
    real ideal;
    s = '0;
    @(posedge clk);
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      s = 8'(k);
      @(posedge clk);
      #1;
      v[k] = int'(value);
      ideal = 1024.0 + 1023.0 * $sin(2.0 * 3.14159265358979 * k / 256.0);
      check((real'(v[k]) - ideal) <= 2.0 && (ideal - real'(v[k])) <= 2.0,
            $sformatf("s=%0d: got %0d, ideal %f", k, v[k], ideal));
    end
    check(v[0] == 1024,   "s=0 not 1024");
    check(v[64] == 2047,  "s=64 not 2047");
    check(v[128] == 1024, "s=128 not 1024");
    check(v[192] == 1,    "s=192 not 1");
    for (int k = 1; k < 128; k++)
      check(v[k] + v[256-k] == 2048, $sformatf("symmetry at s=%0d: %0d + %0d", k, v[k], v[256-k]));
    // Latency: change the input just after an edge; the output must hold.
    @(negedge clk);
    s = 8'd64;
    @(posedge clk);
    #1;
    @(negedge clk);
    s = 8'd192;
    #1;
    check(value == 11'd2047, "value changed before the clock edge");
    @(posedge clk);
    #1;
    check(value == 11'd1, "value not updated one cycle after the input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
