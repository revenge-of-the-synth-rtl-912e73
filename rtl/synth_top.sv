// synth_top: twelve-voice direct digital synthesizer.
//
// Twelve external keys play the twelve notes of one octave; any number of
// them may sound at once. Each key has its own voice: a function_generator
// (phase accumulator plus phase-to-waveform converter) running at the key's
// tick period, followed by an adsr_envelope gated by the key. The mixer adds
// the voices whose envelope is active and scales the sum to 11 bits, and
// pwmor turns it into a PWM signal for the audio jack. On-board buttons
// shift the octave and select the waveform (sine, square, triangle,
// sawtooth), shared by all voices. The seven-segment display shows the
// octave code (digits 1..0) and the waveform code (digits 5..4) as two
// binary digits each; the other digits are blank.
//
// Every button passes through a debounced_button first. All logic runs on
// the single 100 MHz clock; `rst` is synchronous and active high.
//
// Interface:
//   keys          raw note buttons, key 0 = C ... key 11 = B
//   btn_oct_up/_down, btn_wave_next/_prev   raw on-board buttons
//   aud_pwm       PWM audio, aud_sd the audio amplifier enable (always on)
//   audio_sample  the mixed 11-bit sample fed to the PWM
//   an_n, seg_n, dp_n   seven-segment display, all active low
//   octave, waveform    the present selections
//
// Timing: a key press reaches its voice DEBOUNCE_CYCLES + 3 cycles later;
// the envelope then ramps as set by the ADSR parameters. A voice's sample
// reaches audio_sample in the cycle after its phase index changes.
//
// From the document: the voice chain, twelve keys, octave and waveform
// buttons, the mixer with its enable mask, PWM output and the display of the
// two 2-bit codes. The per-key envelope, the use of the envelope's activity
// as the mixer enable, the display layout and the ADSR settings are this
// design's choices.
module synth_top
  import synth_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000, // 10 ms
  parameter int unsigned REFRESH_CYCLES  = 100_000,   // 1 ms per digit
  parameter int unsigned ATTACK_RATE     = 49,        // ~1 ms rise to full
  parameter int unsigned DECAY_RATE      = 98,        // ~0.5 ms to sustain
  parameter int unsigned SUSTAIN_LEVEL   = 1536,      // 75 % of full scale
  parameter int unsigned RELEASE_RATE    = 489        // ~7.5 ms from sustain
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_NOTES-1:0] keys,
  input  logic               btn_oct_up,
  input  logic               btn_oct_down,
  input  logic               btn_wave_next,
  input  logic               btn_wave_prev,
  output logic               aud_pwm,
  output logic               aud_sd,
  output sample_t            audio_sample,
  output logic [7:0]         an_n,
  output logic [6:0]         seg_n,
  output logic               dp_n,
  output logic [1:0]         octave,
  output waveform_t          waveform
);

  localparam int unsigned N_BTN = N_NOTES + 4;

  // ---- buttons ------------------------------------------------------------
  logic [N_BTN-1:0] raw_btn, clean_btn;

  assign raw_btn = {btn_wave_prev, btn_wave_next, btn_oct_down, btn_oct_up, keys};

  for (genvar b = 0; b < N_BTN; b++) begin : g_debounce
    debounced_button #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_db (
      .clk       (clk),
      .rst       (rst),
      .btn_in    (raw_btn[b]),
      .btn_state (clean_btn[b])
    );
  end

  // ---- note, octave and waveform selection --------------------------------
  tick_t              tick_periods [N_NOTES];
  logic [N_NOTES-1:0] gates;

  key_controller u_keys (
    .clk          (clk),
    .rst          (rst),
    .keys         (clean_btn[N_NOTES-1:0]),
    .oct_up       (clean_btn[N_NOTES]),
    .oct_down     (clean_btn[N_NOTES+1]),
    .wave_next    (clean_btn[N_NOTES+2]),
    .wave_prev    (clean_btn[N_NOTES+3]),
    .tick_periods (tick_periods),
    .gates        (gates),
    .octave       (octave),
    .waveform     (waveform)
  );

  // ---- voices -------------------------------------------------------------
  sample_t            raw_sample    [N_NOTES];
  sample_t            shaped_sample [N_NOTES];
  sample_t            scaler        [N_NOTES];
  logic [N_NOTES-1:0] voice_active;

  for (genvar v = 0; v < N_NOTES; v++) begin : g_voice
    function_generator u_fg (
      .clk         (clk),
      .rst         (rst),
      .en          (voice_active[v]),
      .tick_period (tick_periods[v]),
      .waveform    (waveform),
      .sample      (raw_sample[v])
    );

    adsr_envelope u_adsr (
      .clk           (clk),
      .rst           (rst),
      .gate          (gates[v]),
      .attack_rate   (16'(ATTACK_RATE)),
      .decay_rate    (16'(DECAY_RATE)),
      .sustain_level (sample_t'(SUSTAIN_LEVEL)),
      .release_rate  (16'(RELEASE_RATE)),
      .signal_in     (raw_sample[v]),
      .scaler        (scaler[v]),
      .signal_out    (shaped_sample[v]),
      .active        (voice_active[v])
    );
  end

  mixer #(.N_VOICES(N_NOTES)) u_mixer (
    .signals (shaped_sample),
    .enabled (voice_active),
    .mixed   (audio_sample)
  );

  pwmor u_pwm (
    .clk    (clk),
    .rst    (rst),
    .sample (audio_sample),
    .pwm    (aud_pwm)
  );

  assign aud_sd = 1'b1;

  // ---- status display -----------------------------------------------------
  // Each 2-bit code is shown as two binary digits: the number 10*b1 + b0 is
  // converted to decimal, giving the digits b1 and b0.
  logic [7:0] oct_bcd, wave_bcd;

  decimal_to_bcd #(.BIN_W(4), .DIGITS(2)) u_oct_bcd (
    .value (4'(octave[1] * 10 + octave[0])),
    .bcd   (oct_bcd)
  );

  decimal_to_bcd #(.BIN_W(4), .DIGITS(2)) u_wave_bcd (
    .value (4'(waveform[1] * 10 + waveform[0])),
    .bcd   (wave_bcd)
  );

  ssdriver #(.N_DIGITS(8), .REFRESH_CYCLES(REFRESH_CYCLES)) u_display (
    .clk    (clk),
    .rst    (rst),
    .digits ({8'hFF, wave_bcd, 8'hFF, oct_bcd}),
    .an_n   (an_n),
    .seg_n  (seg_n),
    .dp_n   (dp_n)
  );

endmodule
