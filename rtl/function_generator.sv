// function_generator: one monophonic voice.
//
// An index_generator (phase accumulator) steps an 8-bit phase index at the
// rate set by `tick_period`; a sample_generator (phase-to-waveform
// converter) turns that index into an 11-bit sample of the selected
// waveform. The output frequency is f_clk / (256 * tick_period).
//
// Interface: `en` drives the enable of both parts. While it is low the phase
// is held at 0 and the output sits at the zero level 1024. `rst` is
// synchronous, active high.
//
// Timing: `sample` lags the phase index by one clock cycle.
//
// From the document: the composition of the two parts and the shared enable.
module function_generator
  import synth_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  tick_t     tick_period,
  input  waveform_t waveform,
  output sample_t   sample
);

  phase_t phase;

  index_generator u_index (
    .clk         (clk),
    .rst         (rst),
    .en          (en),
    .tick_period (tick_period),
    .phase       (phase)
  );

  sample_generator u_sample (
    .clk      (clk),
    .en       (en),
    .waveform (waveform),
    .phase    (phase),
    .sample   (sample)
  );

endmodule
