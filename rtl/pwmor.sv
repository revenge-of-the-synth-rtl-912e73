// pwmor: pulse-width modulator for the audio output.
//
// A free-running counter of SAMPLE_W bits counts 0 .. 2**SAMPLE_W - 1. The
// sample is captured when the counter is 0, and the output is high while
// the counter is below the captured sample, so each PWM period of 2048
// cycles (48.8 kHz at 100 MHz) has a duty cycle of sample / 2048. An
// external low-pass filter turns this into the analogue audio signal.
//
// Interface: `sample` unsigned 11-bit level, `pwm` the registered output.
// `rst` is synchronous, active high.
//
// Timing: a new sample takes effect at the start of the next PWM period;
// the output of that period rises one cycle after the counter wraps.
//
// The document names this block and says it converts samples to a PWM
// signal for the audio jack; the counter-compare scheme is this design's.
module pwmor
  import synth_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t sample,
  output logic    pwm
);

  sample_t count;
  sample_t level;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      level <= '0;
      pwm   <= 1'b0;
    end else begin
      count <= count + 1'b1;
      if (count == '0) begin
        level <= sample;
        pwm   <= (sample != '0);
      end else begin
        pwm   <= (count < level);
      end
    end
  end

endmodule
