// function_generator_tb: runs one voice end to end.
//   - SAW at tick period 3: every sample equals 8 * (step count mod 256)
//     and the ramp restarts exactly every 256 * 3 cycles;
//   - SQUARE at tick period 7: high and low halves of 128 * 7 cycles each;
//   - SINE at tick period 2: period measured between rising crossings of
//     the zero level is 512 cycles;
//   - en low gives the zero level 1024.
module function_generator_tb;
  import synth_pkg::*;

  logic      clk = 1'b0, rst, en;
  tick_t     tick;
  waveform_t wf;
  sample_t   sample;
  int checks = 0, failures = 0;

  function_generator dut (.clk(clk), .rst(rst), .en(en), .tick_period(tick),
                          .waveform(wf), .sample(sample));

  always #5 clk = ~clk;

  initial begin
    #500000;
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

  task automatic restart(input waveform_t w, input int t);
    @(negedge clk);
    en = 1'b0;
    wf = w;
    tick = tick_t'(t);
    repeat (2) @(posedge clk);
    @(negedge clk);
    en = 1'b1;
  endtask

  initial begin
    int wraps, last_wrap, highs, n_cross, last_cross, periods;
    sample_t prev;
    rst = 1'b1;
    en = 1'b0;
    wf = SAW;
    tick = tick_t'(3);
    repeat (2) @(posedge clk);
    rst = 1'b0;

    // SAW: en rises; the phase is k/3 after k cycles (floor), and the sample
    // shows the phase of one cycle earlier.
    restart(SAW, 3);
    @(posedge clk);  // first enabled edge: output register still catching up
    wraps = 0;
    last_wrap = 0;
    for (int c = 1; c <= 3 * 256 * 2 + 4; c++) begin
      @(posedge clk);
      #1;
      check(int'(sample) == 8 * ((c / 3) % 256),
            $sformatf("SAW cycle %0d: %0d want %0d", c, sample, 8 * ((c / 3) % 256)));
      if (c > 1 && sample < prev) begin
        wraps++;
        if (wraps > 1) check(c - last_wrap == 768, $sformatf("SAW period %0d", c - last_wrap));
        last_wrap = c;
      end
      prev = sample;
    end
    check(wraps == 2, "SAW did not wrap twice");

    // SQUARE: count high cycles over one full period.
    restart(SQUARE, 7);
    repeat (2) @(posedge clk);
    highs = 0;
    for (int c = 0; c < 256 * 7; c++) begin
      @(posedge clk);
      #1;
      if (sample == 11'd2047) highs++;
      else check(sample == 11'd0, "SQUARE level neither 2047 nor 0");
    end
    check(highs == 128 * 7, $sformatf("SQUARE high for %0d cycles", highs));

    // SINE: period between rising crossings of 1024.
    restart(SINE, 2);
    n_cross = 0;
    last_cross = 0;
    periods = 0;
    prev = 11'd1024;
    for (int c = 0; c < 512 * 3 + 10; c++) begin
      @(posedge clk);
      #1;
      if (prev < 11'd1100 && sample >= 11'd1100) begin
        if (n_cross > 0) begin
          check(c - last_cross == 512, $sformatf("SINE period %0d", c - last_cross));
          periods++;
        end
        n_cross++;
        last_cross = c;
      end
      prev = sample;
    end
    check(periods >= 2, "SINE did not complete two periods");

    @(negedge clk);
    en = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(sample == 11'd1024, "disabled voice is not at 1024");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
