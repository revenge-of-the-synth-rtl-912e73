// sample_generator: the phase-to-waveform converter of one voice.
//
// Turns an 8-bit phase index p into an 11-bit sample for the selected
// waveform definition:
//   SINE     : the fullsine_256 look-up (1024 +/- quarter-table word)
//   SQUARE   : 2047 for p < 128, else 0
//   TRIANGLE : 16*p for p < 128, else 2047 - 16*(p - 128)
//   SAW      : 8*p
//
// Timing: every waveform is registered once, so `sample` follows `phase`,
// `waveform` and `en` by one clock cycle. The sine comes from a clocked
// table, the other three from a register, and a registered copy of the
// waveform code selects between them so the latency is the same for all.
// While `en` (registered) is low the output is the zero level, 1024.
//
// From the document: the four waveform codes, the 256-step phase, the sine
// from fullsine_256 and the arithmetic of the other three waveforms. The
// zero-level output while disabled is this design's choice.
module sample_generator
  import synth_pkg::*;
(
  input  logic      clk,
  input  logic      en,
  input  waveform_t waveform,
  input  phase_t    phase,
  output sample_t   sample
);

  sample_t   sine_value;
  sample_t   arith_q;
  waveform_t waveform_q;
  logic      en_q;

  fullsine_256 u_sine (
    .clk        (clk),
    .sample_num (phase),
    .value      (sine_value)
  );

  always_ff @(posedge clk) begin
    en_q       <= en;
    waveform_q <= waveform;
    unique case (waveform)
      SQUARE:   arith_q <= (phase < 8'd128) ? sample_t'(2047) : sample_t'(0);
      TRIANGLE: arith_q <= (phase < 8'd128)
                           ? sample_t'({phase[6:0], 4'b0000})
                           : sample_t'(2047) - sample_t'({phase[6:0], 4'b0000});
      SAW:      arith_q <= sample_t'({phase, 3'b000});
      default:  arith_q <= sample_t'(MID);  // SINE uses the table path
    endcase
  end

  always_comb begin
    if (!en_q)
      sample = sample_t'(MID);
    else if (waveform_q == SINE)
      sample = sine_value;
    else
      sample = arith_q;
  end

endmodule
