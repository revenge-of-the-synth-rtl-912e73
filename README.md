# Twelve-voice direct digital synthesizer

This is a polyphonic audio synthesizer for a 100 MHz FPGA. It is built
from direct digital synthesis (DDS). Each voice steps through a 256-sample
waveform table. The stepping rate sets the pitch, and each voice has its own
rate, so twelve notes can sound at once without slowing each other down.
Twelve keys play the twelve notes of one octave. Buttons shift the octave
and choose among sine, square, triangle and sawtooth. Each note has an
attack/decay/sustain/release envelope. The voices are summed, and the sum
leaves the chip as a pulse-width-modulated (PWM) signal for an audio jack.
A seven-segment display shows the selected octave and waveform.

Everything runs on one 100 MHz clock with a synchronous, active-high reset.
The RTL is plain synthesizable SystemVerilog (IEEE 1800-2017).

## Signal chain

```
keys[11:0] ─► debounced_button ×12 ─┐
buttons    ─► debounced_button ×4  ─┤
                                    ▼
                             key_controller ── tick period per key, octave, waveform
                                    │
          ┌──── one per key ────────┴───────────────────────────────┐
          │ function_generator                                      │
          │   index_generator ──phase──► sample_generator ──────────┼─► adsr_envelope ─┐
          │   (phase accumulator)       (fullsine_256 / arithmetic)  │   (gate = key)   │
          └─────────────────────────────────────────────────────────┘                  │
                                                                                       ▼
                                    mixer (sum of active voices >> 5) ─► pwmor ─► aud_pwm
octave, waveform ─► decimal_to_bcd ×2 ─► ssdriver (bcd_decoder inside) ─► an_n, seg_n
```

## Sample format

All audio values are 11-bit unsigned numbers. The level 1024 is silence:
0 is the most negative level and 2047 the most positive. The sine swings
1024 ± 1023. The square wave jumps between 2047 and 0. The triangle and
sawtooth ramp over 0..2047. The envelope scales each voice around 1024, so
a silent voice sits at 1024, not at 0.

## Pitch: the phase accumulator

`index_generator` holds an 8-bit phase index and a tick counter. The counter
counts clock cycles. When it reaches the tick period `T`, the phase index
advances by one and the counter restarts at 1. So the index advances every
`T` cycles. It wraps after 256 steps, which gives

    f = 100 MHz / (256 * T)

Examples:

- T = 1493 is middle C: 261.637 Hz, 0.007 Hz from 261.63 Hz.
- T = 111 is the nearest to A7 (3520 Hz): 3519.14 Hz.
- T = 1 is the fastest tone: 390.625 kHz.

Pitch resolution is set by rounding `T` to a whole number of cycles. The
relative error is at most 0.5 / T. That is under 0.5 % for any T of 100 or
more, which covers everything up to about 3.9 kHz. The tick period is 16
bits wide, so the lowest tone is about 6 Hz.

## The quarter-wave sine (`fullsine_256`)

This is the least obvious part of the design. Only the first quarter of a
sine period is stored: 64 words of 10 bits, entry k = round(1023·sin(π/2 ·
k/64)). The table is in `quarter_sine_rom`. Its contents are computed at
elaboration time, and its read is registered, so it maps to a block RAM.

The 8-bit sample number `s` selects one of four quarters. Two flags say how
to use the table for that quarter: *reverse* reads it backwards, and
*invert* subtracts the word from the zero level.

| s          | quarter | reverse | invert | table address            |
|------------|---------|---------|--------|--------------------------|
| 0 .. 64    | rising  | no      | no     | s (64 reuses entry 63)   |
| 65 .. 128  | falling | yes     | no     | 64 − s[5:0] (128 → 0)    |
| 129 .. 192 | falling | no      | yes    | s[5:0] (192 reuses 63)   |
| 193 .. 255 | rising  | yes     | yes    | 64 − s[5:0]              |

The output is `1024 + word`, or `1024 − word` when inverted. The invert
flag is registered next to the table read, so the output arrives one clock
after `sample_num`.

This mapping has two consequences:

- The sine is exactly odd-symmetric: v(s) + v(256 − s) = 2048.
- The peaks at s = 64 and s = 192 reuse entry 63 (1023), not a true sin(π/2).

Every value is within 2 of 1024 + 1023·sin(2πs/256).

## The other waveforms (`sample_generator`)

For phase index p:

- square: 2047 for p < 128, otherwise 0
- sawtooth: 8p
- triangle: 16p for p < 128, otherwise 2047 − 16(p − 128)

These values are registered. A registered copy of the waveform code chooses
between them and the sine path. So every waveform has exactly one cycle of
latency from the phase index. While the voice is disabled its output is 1024.

## Mixing (`mixer`)

The mixer is purely combinational. It adds the samples of the enabled
voices into a 16-bit sum and shifts the sum right by 5. Up to 32 full-scale
voices fit in 16 bits, and (32 · 2047) >> 5 = 2047, so the output can never
wrap or clip. The price is level: with twelve voices the mix reaches at most
(12 · 2047) >> 5 = 767. A single voice at full envelope swings only about ±32 around 32.
A disabled voice adds 0, not 1024, so the DC level of the mix moves as notes
start and stop.

## Envelope (`adsr_envelope`)

Each voice has an envelope. The envelope holds an 11-bit *scaler* and its
gate is the voice's key:

- **Attack.** While the key is held, the scaler rises by 1 every
  `attack_rate` cycles until it reaches 2047.
- **Decay.** It then falls by 1 every `decay_rate` cycles down to
  `sustain_level`.
- **Sustain.** It stays at that level while the key is held.
- **Release.** When the key is let go, from any phase, the scaler falls by
  1 every `release_rate` cycles to 0.

Pressing the key again during release restarts the attack from the present
value. The shaped sample is

    signal_out = 1024 + ((signal_in − 1024) · scaler) >>> 11

`active` is high from the cycle after the key goes down until the release
reaches 0. In `synth_top`, `active` does two jobs:

- It enables the voice's function generator, which restarts at phase 0 on
  each new note.
- It sets the voice's bit in the mixer's enable mask, so a note keeps
  sounding through its release after the key is up.

The default settings are about 1 ms of attack, a sustain at 75 %
(1536/2047) and about 7.5 ms of release. They are parameters of
`synth_top`.

## Keys, octave and waveform (`key_controller`)

Key i (0 = C … 11 = B) gets its tick period from a table of C3..B3. The
table uses equal temperament with A4 = 440 Hz:

    NOTE_TICKS[n] = round(100e6 / (256 · 440 · 2^((n − 9)/12 − 1)))

The period is shifted right by the 2-bit octave code:

| octave code | notes    |
|-------------|----------|
| 0           | C3..B3   |
| 1 (reset)   | C4..B4, which includes middle C |
| 2           | C5..B5   |
| 3           | C6..B6   |

Shifting truncates, so a higher octave can be up to one cycle of tick
period off the nearest value. The octave up/down buttons saturate at 3 and
0. The waveform next/previous buttons wrap around the four waveforms, and
the waveform starts as a sine after reset. A button acts once per press, on
its rising edge. All voices share one waveform.

## Board interface

- `debounced_button`: a two-flop synchroniser and a stability counter. The
  state changes only after the input has held its new level for
  `DEBOUNCE_CYCLES` cycles. The default is 10 ms, and a clean edge arrives
  `DEBOUNCE_CYCLES + 2` cycles later.
- `pwmor`: an 11-bit free-running counter. The output is high while the
  counter is below the sample, and the sample is captured at the start of
  each period. This gives a 2048-cycle period (48.8 kHz) with a duty of
  sample/2048. An external RC filter and amplifier make the analogue signal
  (`aud_sd` enables the amplifier).
- Display: eight multiplexed digits, with active-low anodes and segments
  {g..a}.
  - `ssdriver` lights one digit at a time, for 1 ms each.
  - `bcd_decoder` turns the selected digit code into segments; codes 10..15
    blank the digit.
  - The octave code is shown as two binary digits on digits 1..0, and the
    waveform code on digits 5..4.
  - `decimal_to_bcd` (double dabble) converts the value 10·b1 + b0 of each
    code into the two digits it displays.

Waveform codes: 0 sine, 1 square, 2 triangle, 3 sawtooth.

## Timing summary

| path | latency |
|---|---|
| key edge → voice starts | DEBOUNCE_CYCLES + 3 cycles |
| phase index → voice sample | 1 cycle |
| voice sample → envelope → mix → `audio_sample` | combinational |
| `audio_sample` → PWM duty | the next PWM period (≤ 2048 cycles) |

## Where this design departs from, or fills in, its source description

The design follows a published FPGA synthesizer. These points were
reconstructed or chosen here:

- **Phase accumulator.** The source describes the clock scaling in two ways.
  One counts on both clock edges and toggles a divided clock. The other
  counts on the rising edge and compares the count with the tick period.
  The second is implemented here, and it reproduces the source's worked
  numbers (for example α = 111 → 3519.14 Hz).
- **Sine output width.** The sine output is 11 bits, centred on 1024. One
  description of this block gives a 10-bit output, but the rest of the
  datapath uses 11-bit samples.
- **Sine table.** Only the first and fourth quarters of the address mapping
  are given in the source. The middle two quarters follow the same symmetry.
  The table contents (amplitude 1023, points k/64) are this design's choice.
- **Enables.** The enable behaviour of the voice parts is this design's
  choice: the phase is held at 0 and the output at 1024.
- **Envelope.** The source gives only the envelope's phases and its centring
  on 1024. The linear ramps, the rate inputs, the retrigger behaviour, the
  default rates and one envelope per key are this design's choices.
- **Controls and display.** The note table, the four-octave range, the reset
  values, the two waveform buttons and the display layout are this design's
  choices.
- **Ported modules.** The debouncer, PWM, BCD and display modules are only
  named in the source. Here they are the simplest circuits that do the job.
- **Not built.** The source mentions analog knobs, pitch bend and MIDI as
  future work. They are not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `quarter_sine_rom_tb` | all 64 words against the sine formula; read latency |
| `fullsine_256_tb` | all 256 values within 2 of the ideal; exact 0/64/128/192 values; odd symmetry; latency |
| `index_generator_tb` | exactly T cycles per step for T = 0, 1, 2, 5; wrap after 256·T; enable and reset |
| `sample_generator_tb` | every waveform at every phase; latency; disabled level |
| `function_generator_tb` | sawtooth sample by sample; square duty; sine period |
| `mixer_tb` | 2000 random mixes; 12 and 32 voices at full scale |
| `adsr_envelope_tb` | ramp durations and monotonicity; sustain level; release and retrigger; output formula every cycle |
| `key_controller_tb` | all tick periods against the frequency formula at every octave; saturation; wrapping; one step per press |
| `debounced_button_tb` | random bounces rejected; exact delay of a clean edge |
| `pwmor_tb` | duty equals the sample at several levels; period |
| `decimal_to_bcd_tb`, `bcd_decoder_tb`, `ssdriver_tb` | exhaustive conversion; segment shapes; digit scanning |
| `synth_top_tb` | the whole synthesizer with short debounce and envelope times (see below) |
| `synth_top_full_tb` | the whole synthesizer at default parameters (see below) |
| `synth_workloads_tb` | the evaluation cases on the twelve-voice datapath (see below) |

`synth_top_tb` drives bouncing button presses. It counts each mechanism and
fails if any never occurred:

- debouncing
- octave up, down and saturation at both ends, with the played period
  measured
- all four waveforms
- all four envelope phases
- two-voice and twelve-voice polyphony, with the mix checked every cycle
- PWM duty against the sample in every PWM period
- the display contents

`synth_top_full_tb` runs with every parameter at its default. It plays
middle C and checks:

- the 10 ms debounce
- the time to reach sustain
- a period of exactly 382208 cycles
- the PWM duty
- the return to silence after release

It simulates about 40 ms, which takes a few seconds.

`synth_workloads_tb` runs the cases the synthesizer was evaluated on:

- every waveform at middle C
- C4 + F4 as sines and as triangles, with the mix compared against the
  waveform formulas
- twelve sines spread from 100 Hz to 2.8 kHz playing together
- A7 at tick 111
- the 390.6 kHz limit at tick 1

To run any testbench with Verilator from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/synth_pkg.sv tb/synth_top_tb.sv \
  --top-module synth_top_tb -o sim && ./obj_dir/sim
```

## Changing the design

- **Voice count.** `N_NOTES` in `synth_pkg` sets the number of keys and
  voices, and the mixer accepts up to 32. More than twelve keys also needs a
  longer `NOTE_TICKS` table.
- **Pitch range.** To go lower, widen `TICK_W` in `synth_pkg`. To go
  higher, change the octave range in `key_controller`.
- **Envelope and timing.** The ADSR rates and sustain level, the debounce
  time and the display refresh are parameters of `synth_top`.
- **Synthesis on an FPGA.** Each voice has its own 640-bit sine table, so
  twelve voices use twelve small ROMs. Sharing one table would need
  time-multiplexing, which this design does not do. Two top-level outputs
  are constants: `aud_sd` is 1 and `dp_n` is 1.

## Files

- `rtl/synth_pkg.sv`: widths, the waveform enum and the note table
- `rtl/synth_top.sv`: the complete synthesizer
- `rtl/function_generator.sv`, `index_generator.sv`, `sample_generator.sv`,
  `fullsine_256.sv`, `quarter_sine_rom.sv`: one voice
- `rtl/mixer.sv`, `adsr_envelope.sv`, `key_controller.sv`
- `rtl/debounced_button.sv`, `pwmor.sv`, `decimal_to_bcd.sv`,
  `bcd_decoder.sv`, `ssdriver.sv`: board interface
- `tb/*_tb.sv`: the testbenches listed above
