// mixer: sums the voices into one polyphonic sample.
//
// Purely combinational. Each voice's 11-bit sample is added to a 16-bit sum
// when its bit of the `enabled` mask is set; the sum is then shifted right
// by 5 to give an 11-bit output. Because at most 32 voices of at most 2047
// each fit in 16 bits, and (32 * 2047) >> 5 = 2047, the output can never
// overflow or clip, whatever voices are enabled.
//
// Interface: `signals[i]` is voice i, `enabled[i]` its enable bit. The
// output is an unsigned 11-bit sample; note that a disabled voice
// contributes 0, not the zero level 1024.
//
// From the document: the enable mask, the 16-bit sum and the shift by 5.
// The voice count is a parameter (12 in the synthesizer).
module mixer
  import synth_pkg::*;
#(
  parameter int unsigned N_VOICES = 12,
  parameter int unsigned SUM_W    = 16,
  parameter int unsigned SHIFT    = 5
) (
  input  sample_t                signals [N_VOICES],
  input  logic    [N_VOICES-1:0] enabled,
  output sample_t                mixed
);

  // The sum of every voice at full scale must fit the accumulator.
  if (N_VOICES * ((1 << SAMPLE_W) - 1) >= (1 << SUM_W)) begin : g_check
    $error("mixer: %0d voices overflow a %0d-bit sum", N_VOICES, SUM_W);
  end

  logic [SUM_W-1:0] prescale;

  always_comb begin
    prescale = '0;
    for (int i = 0; i < N_VOICES; i++) begin
      if (enabled[i]) prescale = prescale + SUM_W'(signals[i]);
    end
  end

  assign mixed = sample_t'(prescale >> SHIFT);

endmodule
