// pwmor_tb: for a set of sample levels (0, 1, 512, 1024, 2047 and random
// ones) holds the level for a full PWM period of 2048 cycles and counts the
// high cycles, which must equal the level; also checks the period length by
// the spacing of rising edges for a mid-scale level.
module pwmor_tb;
  import synth_pkg::*;

  logic    clk = 1'b0, rst, pwm;
  sample_t sample;
  int checks = 0, failures = 0;

  pwmor dut (.clk(clk), .rst(rst), .sample(sample), .pwm(pwm));

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  task automatic measure(input int level);
    int highs;
    @(negedge clk);
    sample = sample_t'(level);
    // Align to the start of a PWM period.
    while (dut.count != '0) @(negedge clk);
    @(negedge clk);   // counter 0 captured at this edge
    highs = 0;
    for (int c = 0; c < 2048; c++) begin
      if (pwm) highs++;
      @(negedge clk);
    end
    check(highs == level, $sformatf("level %0d: high for %0d cycles", level, highs));
  endtask

  initial begin
    int last_rise, rises;
    logic prev;
    rst = 1'b1;
    sample = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    measure(0);
    measure(1);
    measure(512);
    measure(1024);
    measure(2047);
    repeat (5) measure(int'($urandom_range(0, 2047)));
    // Period: rising edges 2048 cycles apart.
    sample = 11'd700;
    prev = pwm;
    rises = 0;
    last_rise = 0;
    for (int c = 0; c < 2048 * 4; c++) begin
      @(negedge clk);
      if (pwm && !prev) begin
        if (rises > 0) check(c - last_rise == 2048, $sformatf("period %0d", c - last_rise));
        rises++;
        last_rise = c;
      end
      prev = pwm;
    end
    check(rises >= 3, "too few PWM periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
