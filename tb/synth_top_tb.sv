// synth_top_tb: end-to-end test of the synthesizer with short debounce,
// display refresh and envelope times (the note tick periods are the real
// ones). Buttons are pressed with bounces. It checks, and counts how often
// each mechanism of the design was exercised (a mechanism never seen is a
// failure):
//   debounce    - bouncing presses are filtered and reach the voices
//   octave      - octave up/down, saturation at 3 and 0, and the played
//                 period 256 * (NOTE_TICK >> octave) cycles, measured on the
//                 audio sample of a sawtooth
//   waveform    - all four waveforms selected and heard
//   envelope    - attack, decay, sustain and release phases of a voice, with
//                 the output returning to silence after release
//   polyphony   - several voices, up to all twelve, sounding together; the
//                 mixed sample equals the sum of the active voices / 32
//   pwm         - PWM duty equals the sample captured for that period
//   display     - the octave and waveform codes shown as binary digits
module synth_top_tb;
  import synth_pkg::*;

  logic               clk = 1'b0, rst;
  logic [N_NOTES-1:0] keys;
  logic               b_up, b_down, b_next, b_prev;
  logic               aud_pwm, aud_sd, dp_n;
  sample_t            audio;
  logic [7:0]         an_n;
  logic [6:0]         seg_n;
  logic [1:0]         octave;
  waveform_t          wf;
  int checks = 0, failures = 0;

  synth_top #(
    .DEBOUNCE_CYCLES(4), .REFRESH_CYCLES(8), .ATTACK_RATE(2), .DECAY_RATE(2),
    .SUSTAIN_LEVEL(1536), .RELEASE_RATE(2)
  ) dut (
    .clk(clk), .rst(rst), .keys(keys), .btn_oct_up(b_up), .btn_oct_down(b_down),
    .btn_wave_next(b_next), .btn_wave_prev(b_prev), .aud_pwm(aud_pwm), .aud_sd(aud_sd),
    .audio_sample(audio), .an_n(an_n), .seg_n(seg_n), .dp_n(dp_n),
    .octave(octave), .waveform(wf)
  );

  always #5 clk = ~clk;

  initial begin
    #60ms;
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

  // ---- mechanism counters -------------------------------------------------
  int n_debounce = 0, n_oct_up = 0, n_oct_down = 0, n_oct_sat = 0, n_period = 0;
  int n_attack = 0, n_decay = 0, n_sustain = 0, n_release = 0;
  int n_poly = 0, n_twelve = 0, n_pwm = 0, n_display = 0, n_mix = 0;
  bit wave_seen [4];

  // Envelope phases of voice 0, watched through its scaler and gate.
  sample_t sc_prev = '0;
  always @(posedge clk) begin
    sample_t sc;
    sc = dut.g_voice[0].u_adsr.scaler;
    if (dut.gates[0] && sc > sc_prev) n_attack++;
    if (dut.gates[0] && sc < sc_prev) n_decay++;
    if (dut.gates[0] && sc == sample_t'(1536) && sc_prev == sample_t'(1536)) n_sustain++;
    if (!dut.gates[0] && sc < sc_prev) n_release++;
    sc_prev <= sc;
  end

  // Mixer: the audio sample is the sum of the active voices' shaped samples / 32.
  always @(negedge clk) begin
    if (!rst) begin
      int sum, act;
      sum = 0;
      act = 0;
      for (int v = 0; v < N_NOTES; v++) begin
        if (dut.voice_active[v]) begin
          sum += int'(dut.shaped_sample[v]);
          act++;
        end
      end
      checks++;
      if (int'(audio) != sum / 32) begin
        failures++;
        $display("FAIL: mixed %0d want %0d", audio, sum / 32);
      end
      if (act >= 2) n_poly++;
      if (act == 12) n_twelve++;
      if (act >= 1) n_mix++;
      if (act > 0) wave_seen[wf] = 1'b1;
    end
  end

  // PWM: duty over each PWM period equals the audio sample present when the
  // PWM counter wrapped. The output is registered, so at a clock edge it
  // shows the position one before the counter value.
  int pwm_high = 0, pwm_level = -1, pwm_next = -1;
  always @(posedge clk) begin
    if (dut.u_pwm.count == '0) pwm_next = int'(audio);
    if (dut.u_pwm.count == 11'd1) begin
      if (pwm_level >= 0) begin
        checks++;
        n_pwm++;
        if (pwm_high != pwm_level) begin
          failures++;
          $display("FAIL: PWM high %0d cycles for level %0d", pwm_high, pwm_level);
        end
      end
      pwm_level = pwm_next;
      pwm_high = aud_pwm ? 1 : 0;
    end else if (aud_pwm) begin
      pwm_high++;
    end
  end

  // ---- stimulus helpers ---------------------------------------------------
  // Press (level 1) or release (0) with a few bounces first.
  task automatic set_button(ref logic btn, input logic level);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      btn = ~level;
      repeat ($urandom_range(1, 2)) @(negedge clk);
      btn = level;
      repeat ($urandom_range(1, 2)) @(negedge clk);
    end
    btn = level;
    repeat (10) @(negedge clk);
  endtask

  task automatic tap(ref logic btn);
    set_button(btn, 1'b1);
    set_button(btn, 1'b0);
  endtask

  task automatic set_keys(input logic [N_NOTES-1:0] k);
    logic [N_NOTES-1:0] old_keys;
    old_keys = dut.gates;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      keys = k ^ (k ^ old_keys);   // bounce back to the old state
      @(negedge clk);
      keys = k;
    end
    repeat (12) @(negedge clk);
    check(dut.gates == k, "debounced keys do not match the pressed keys");
    if (dut.gates == k && k != old_keys) n_debounce++;
  endtask

  // Segment pattern (active low) of a 0 or 1 digit.
  function automatic logic [6:0] bit_digit(input logic b);
    return b ? ~7'b0000110 : ~7'b0111111;
  endfunction

  // Read the display for one full frame and compare the four used digits.
  task automatic check_display();
    logic [6:0] seen [8];
    for (int c = 0; c < 8 * 8 + 8; c++) begin
      @(negedge clk);
      for (int d = 0; d < 8; d++) if (an_n == ~(8'b1 << d)) seen[d] = seg_n;
    end
    check(seen[0] == bit_digit(octave[0]) && seen[1] == bit_digit(octave[1]),
          $sformatf("display octave %b", octave));
    check(seen[4] == bit_digit(wf[0]) && seen[5] == bit_digit(wf[1]),
          $sformatf("display waveform %b", wf));
    check(seen[2] == 7'h7F && seen[7] == 7'h7F, "unused digits not blank");
    n_display++;
  endtask

  // Measure the sawtooth period of a single voice on the audio sample: the
  // time between wraps (large drops).
  task automatic check_saw_period(input int key);
    int expected, last, n, c;
    sample_t prev;
    expected = 256 * (int'(NOTE_TICKS[key]) >> octave);
    prev = audio;
    last = -1;
    n = 0;
    c = 0;
    while (n < 3 && c < 4 * expected) begin
      @(negedge clk);
      c++;
      if (int'(audio) + 20 < int'(prev)) begin
        if (last >= 0) begin
          check(c - last == expected, $sformatf("octave %0d key %0d: period %0d want %0d",
                                                octave, key, c - last, expected));
          n_period++;
        end
        last = c;
        n++;
      end
      prev = audio;
    end
    check(n == 3, "sawtooth wraps not seen");
  endtask

  task automatic wait_idle();
    int c = 0;
    while (dut.voice_active != '0 && c < 100000) begin
      @(negedge clk);
      c++;
    end
    check(dut.voice_active == '0, "voices still active after release");
    repeat (4) @(negedge clk);
    check(audio == '0, "output not silent after release");
  endtask

  initial begin
    rst = 1'b1;
    keys = '0;
    {b_up, b_down, b_next, b_prev} = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    check(octave == 2'd1 && wf == SINE, "reset selections");
    check(aud_sd == 1'b1, "audio amplifier not enabled");
    check_display();

    // Octave up twice (to 3), once more (saturates), waveform to SAW.
    tap(b_up);
    check(octave == 2'd2, "octave up");
    if (octave == 2'd2) n_oct_up++;
    tap(b_up);
    tap(b_up);
    check(octave == 2'd3, "octave did not saturate at 3");
    if (octave == 2'd3) n_oct_sat++;
    tap(b_prev);
    check(wf == SAW, "waveform prev from SINE is SAW");
    check_display();

    // One sawtooth voice: envelope and period at octave 3.
    set_keys(12'b0000_0000_0001);
    repeat (2047 * 2 + 600 * 2 + 200) @(negedge clk);
    check(dut.g_voice[0].u_adsr.scaler == 11'd1536, "voice 0 not at sustain");
    check_saw_period(0);
    tap(b_down);
    check(octave == 2'd2, "octave down");
    if (octave == 2'd2) n_oct_down++;
    check_saw_period(0);
    set_keys('0);
    wait_idle();

    // Two voices, sine, then triangle.
    tap(b_next);                     // SAW -> SINE
    check(wf == SINE, "waveform next from SAW is SINE");
    set_keys(12'b0000_1000_0001);    // C and G
    repeat (30000) @(negedge clk);
    tap(b_next);                     // SQUARE
    repeat (20000) @(negedge clk);
    tap(b_next);                     // TRIANGLE
    check(wf == TRIANGLE, "waveform TRIANGLE");
    check_display();
    repeat (30000) @(negedge clk);
    set_keys('0);
    wait_idle();

    // All twelve keys together, then octave down to 0 and saturate.
    set_keys('1);
    repeat (20000) @(negedge clk);
    tap(b_down);
    tap(b_down);
    tap(b_down);
    check(octave == 2'd0, "octave did not saturate at 0");
    if (octave == 2'd0) n_oct_sat++;
    check_display();
    repeat (5000) @(negedge clk);
    set_keys('0);
    wait_idle();

    // Every mechanism must have happened.
    check(n_debounce > 0, "debounce never exercised");
    check(n_oct_up > 0 && n_oct_down > 0, "octave shift never exercised");
    check(n_oct_sat >= 2, "octave saturation not exercised at both ends");
    check(n_period >= 4, "played period never measured");
    check(wave_seen[SINE] && wave_seen[SQUARE] && wave_seen[TRIANGLE] && wave_seen[SAW],
          "not every waveform was played");
    check(n_attack > 0, "attack never seen");
    check(n_decay > 0, "decay never seen");
    check(n_sustain > 0, "sustain never seen");
    check(n_release > 0, "release never seen");
    check(n_poly > 0, "polyphony never seen");
    check(n_twelve > 0, "twelve voices never sounded together");
    check(n_pwm > 0, "PWM never checked");
    check(n_display > 0, "display never checked");
    $display("mechanisms: debounce=%0d oct_up=%0d oct_down=%0d oct_sat=%0d periods=%0d",
             n_debounce, n_oct_up, n_oct_down, n_oct_sat, n_period);
    $display("mechanisms: attack=%0d decay=%0d sustain=%0d release=%0d poly=%0d twelve=%0d pwm=%0d display=%0d",
             n_attack, n_decay, n_sustain, n_release, n_poly, n_twelve, n_pwm, n_display);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
