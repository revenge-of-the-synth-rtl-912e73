// synth_top_full_tb: plays one note on the synthesizer with every parameter
// at its default (10 ms debounce, 1 ms display refresh, real envelope
// rates). After reset the octave code is 1 and the waveform is the sine, so
// key 0 plays middle C with a tick period of 1493 cycles. The test
//   - presses key 0 and checks nothing sounds before the 10 ms debounce,
//   - waits for the envelope to reach its sustain level (1536),
//   - measures the sine period on the audio sample as the time between
//     rising crossings of its mid level: it must be 256 * 1493 = 382208
//     cycles, i.e. 261.64 Hz at 100 MHz,
//   - checks the PWM duty of one period against the sample,
//   - releases the key and checks the voice returns to silence.
module synth_top_full_tb;
  import synth_pkg::*;

  logic               clk = 1'b0, rst;
  logic [N_NOTES-1:0] keys;
  logic               aud_pwm, aud_sd, dp_n;
  sample_t            audio;
  logic [7:0]         an_n;
  logic [6:0]         seg_n;
  logic [1:0]         octave;
  waveform_t          wf;
  int checks = 0, failures = 0;

  synth_top dut (
    .clk(clk), .rst(rst), .keys(keys), .btn_oct_up(1'b0), .btn_oct_down(1'b0),
    .btn_wave_next(1'b0), .btn_wave_prev(1'b0), .aud_pwm(aud_pwm), .aud_sd(aud_sd),
    .audio_sample(audio), .an_n(an_n), .seg_n(seg_n), .dp_n(dp_n),
    .octave(octave), .waveform(wf)
  );

  always #5 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
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
    int c, last, n, highs, level;
    sample_t prev;
    rst = 1'b1;
    keys = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    check(octave == 2'd1 && wf == SINE, "reset selections");

    keys[0] = 1'b1;
    repeat (999_990) @(negedge clk);
    check(dut.voice_active == '0 && audio == '0, "note sounded before the debounce time");
    c = 0;
    while (!dut.voice_active[0] && c < 100) begin
      @(negedge clk);
      c++;
    end
    check(dut.voice_active == 12'b1, "key 0 did not start its voice");

    // Attack (2047 * 49 cycles) and decay (511 * 98 cycles) to sustain.
    c = 0;
    while (dut.g_voice[0].u_adsr.state.name() != "SUSTAIN" && c < 300_000) begin
      @(negedge clk);
      c++;
    end
    check(c >= 2047 * 49 + 511 * 98 - 10 && c < 2047 * 49 + 511 * 98 + 100,
          $sformatf("sustain reached after %0d cycles", c));
    check(dut.g_voice[0].u_adsr.scaler == 11'd1536, "sustain level is not 1536");

    // Period of the sine between rising crossings of the mid level (32).
    prev = audio;
    last = -1;
    n = 0;
    c = 0;
    while (n < 3 && c < 4 * 382208) begin
      @(negedge clk);
      c++;
      if (prev < 11'd32 && audio >= 11'd32) begin
        if (last >= 0) check(c - last == 256 * 1493, $sformatf("period %0d cycles", c - last));
        last = c;
        n++;
      end
      prev = audio;
    end
    check(n == 3, "sine crossings not seen");

    // PWM: one period of 2048 cycles, duty equal to the captured sample.
    while (dut.u_pwm.count != '0) @(negedge clk);
    level = int'(audio);
    @(negedge clk);
    highs = 0;
    repeat (2048) begin
      if (aud_pwm) highs++;
      @(negedge clk);
    end
    check(highs == level, $sformatf("PWM high %0d for level %0d", highs, level));

    // Release: debounce, then about 1536 * 489 cycles of release.
    keys[0] = 1'b0;
    c = 0;
    while (dut.voice_active[0] && c < 2_500_000) begin
      @(negedge clk);
      c++;
    end
    check(c > 1_000_000 + 1536 * 489 - 100 && c < 1_000_000 + 1536 * 489 + 100,
          $sformatf("silent %0d cycles after release", c));
    repeat (2) @(negedge clk);
    check(audio == '0, "output not silent after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
