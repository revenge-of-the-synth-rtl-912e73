// synth_workloads_tb: the test cases of the synthesizer's evaluation, run on
// its polyphonic datapath (twelve function generators into the mixer, each
// with its own tick period, all sharing one waveform selection):
//   1. each of the four waveforms alone at middle C (tick 1493): period
//      256 * 1493 cycles, 261.64 Hz, within 0.01 Hz of 261.63 Hz;
//   2. C4 + F4 (ticks 1493 and 1119) mixed, as sines and as triangles: the
//      mixed sample equals (v1 + v2) / 32 with v1, v2 computed here from the
//      waveform formulas (exact for triangles, within 1 for sines);
//   3. twelve sines spread from 100 Hz to 2.8 kHz playing together: every
//      voice keeps its own period, within half a tick of its target
//      frequency, and the mixed sample never clips;
//   4. A7 (3520 Hz): tick 111 gives 3519.14 Hz, an error below 0.9 Hz;
//   5. the fastest tone, tick 1: 256 cycles per period, 390.625 kHz.
// Periods are measured between rising crossings of 1100 on each voice.
module synth_workloads_tb;
  import synth_pkg::*;

  localparam int N = 12;
  logic      clk = 1'b0, rst;
  logic [N-1:0] en;
  tick_t     tick [N];
  waveform_t wf;
  sample_t   voice [N];
  sample_t   mixed;
  int checks = 0, failures = 0;

  for (genvar v = 0; v < N; v++) begin : g_fg
    function_generator u_fg (.clk(clk), .rst(rst), .en(en[v]), .tick_period(tick[v]),
                             .waveform(wf), .sample(voice[v]));
  end

  mixer #(.N_VOICES(N)) u_mix (.signals(voice), .enabled(en), .mixed(mixed));

  always #5 clk = ~clk;

  initial begin
    #200ms;
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

  // Per-voice period monitor.
  longint cyc = 0;
  longint last_cross [N];
  longint period [N];
  int     n_cross [N];
  sample_t prev [N];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int v = 0; v < N; v++) begin
      if (!en[v]) begin
        n_cross[v] <= 0;
      end else if (prev[v] < 11'd1100 && voice[v] >= 11'd1100) begin
        if (n_cross[v] > 0) period[v] <= cyc - last_cross[v];
        last_cross[v] <= cyc;
        n_cross[v] <= n_cross[v] + 1;
      end
      prev[v] <= voice[v];
    end
  end

  task automatic start(input logic [N-1:0] mask, input waveform_t w);
    @(negedge clk);
    en = '0;
    wf = w;
    repeat (3) @(negedge clk);
    en = mask;
  endtask

  // Run until every enabled voice has completed `n` periods.
  task automatic run_periods(input int n, input longint limit);
    longint c = 0;
    bit done;
    do begin
      @(negedge clk);
      c++;
      done = 1'b1;
      for (int v = 0; v < N; v++) if (en[v] && n_cross[v] < n + 1) done = 1'b0;
    end while (!done && c < limit);
    check(done, "voices did not complete their periods");
  endtask

  function automatic real ideal(input waveform_t w, input int ph);
    case (w)
      SINE:     return 1024.0 + 1023.0 * $sin(2.0 * 3.14159265358979 * ph / 256.0);
      SQUARE:   return (ph < 128) ? 2047.0 : 0.0;
      TRIANGLE: return (ph < 128) ? 16.0 * ph : 2047.0 - 16.0 * (ph - 128);
      default:  return 8.0 * ph;
    endcase
  endfunction

  initial begin
    waveform_t waves [4] = '{SINE, SQUARE, TRIANGLE, SAW};
    real f, target;
    int t12 [N];
    rst = 1'b1;
    en = '0;
    wf = SINE;
    foreach (tick[v]) tick[v] = tick_t'(1);
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // 1. Monophonic, every waveform at middle C.
    tick[0] = tick_t'(1493);
    foreach (waves[w]) begin
      start(12'b1, waves[w]);
      run_periods(2, 2_000_000);
      f = 100.0e6 / real'(period[0]);
      check(period[0] == 256 * 1493, $sformatf("%s middle C period %0d", waves[w].name(), period[0]));
      check(f - 261.63 < 0.01 && 261.63 - f < 0.01, $sformatf("middle C at %f Hz", f));
    end

    // 2. C4 + F4, sine then triangle; the phases restart together, so voice
    //    i, k cycles after being enabled, shows phase floor((k-1)/T_i).
    tick[0] = tick_t'(1493);
    tick[1] = tick_t'(1119);
    for (int pass = 0; pass < 2; pass++) begin
      waveform_t w;
      real expect_mix;
      w = (pass == 0) ? SINE : TRIANGLE;
      start(12'b11, w);
      for (int k = 1; k <= 3 * 256 * 1493; k++) begin
        @(negedge clk);
        if (k >= 2 && k % 97 == 0) begin
          expect_mix = $floor((ideal(w, ((k - 1) / 1493) % 256) + ideal(w, ((k - 1) / 1119) % 256)) / 32.0);
          check(real'(mixed) - expect_mix < ((w == SINE) ? 1.2 : 0.01) &&
                expect_mix - real'(mixed) < ((w == SINE) ? 1.2 : 0.01),
                $sformatf("%s C4+F4 at %0d: mixed %0d want %f", w.name(), k, mixed, expect_mix));
        end
      end
      check(period[0] == 256 * 1493 && period[1] == 256 * 1119, "C4/F4 periods");
    end

    // 3. Twelve sines, geometrically spaced from 100 Hz to 2.8 kHz.
    for (int v = 0; v < N; v++) begin
      target = 100.0 * $pow(28.0, v / 11.0);
      t12[v] = int'($floor(100.0e6 / (256.0 * target) + 0.5));
      tick[v] = tick_t'(t12[v]);
    end
    start('1, SINE);
    fork
      run_periods(2, 3_000_000);
      begin
        int maxmix = 0;
        repeat (2_200_000) begin
          @(negedge clk);
          if (int'(mixed) > maxmix) maxmix = int'(mixed);
        end
        check(maxmix <= 2047 && maxmix > 500, $sformatf("twelve-voice peak %0d", maxmix));
      end
    join
    for (int v = 0; v < N; v++) begin
      target = 100.0 * $pow(28.0, v / 11.0);
      f = 100.0e6 / real'(period[v]);
      check(period[v] == 256 * t12[v], $sformatf("voice %0d period %0d", v, period[v]));
      // The tick period is a whole number of cycles, so the frequency can
      // be off by up to half a tick: a relative error of 0.5 / tick.
      check((f - target) / target <= 0.5 / t12[v] && (target - f) / target <= 0.5 / t12[v],
            $sformatf("voice %0d at %f Hz, wanted %f Hz", v, f, target));
    end

    // 4. A7 = 3520 Hz with tick 111.
    tick[0] = tick_t'(111);
    start(12'b1, SINE);
    run_periods(2, 200_000);
    f = 100.0e6 / real'(period[0]);
    check(period[0] == 256 * 111, $sformatf("A7 period %0d", period[0]));
    check(3520.0 - f < 0.9 && f < 3520.0, $sformatf("A7 at %f Hz", f));

    // 5. Fastest tone: tick 1.
    tick[0] = tick_t'(1);
    start(12'b1, SINE);
    run_periods(3, 10_000);
    check(period[0] == 256, $sformatf("tick-1 period %0d", period[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
