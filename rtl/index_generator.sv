// index_generator: the phase accumulator of one voice.
//
// A tick counter counts clock cycles; when it reaches the tick period the
// 8-bit phase index advances by one and the counter restarts at 1. The phase
// index therefore advances once every `tick_period` cycles and wraps from
// 255 to 0, so a full 256-sample period lasts 256 * tick_period cycles and
// the output frequency is f = f_clk / (256 * tick_period). A tick period of
// 0 behaves like 1 (one step per cycle, the fastest rate).
//
// Interface: `en` low holds the counter at 1 and the phase at 0, so every
// note starts at the beginning of its waveform. `rst` is synchronous and
// active high. `tick_period` may change at any time; it is compared with the
// running count on every cycle.
//
// Timing: with `en` high from cycle 0 the phase becomes 1 at the rising edge
// of cycle tick_period - 1, 2 at cycle 2*tick_period - 1, and so on.
//
// From the document: the compare-and-restart counter and the 8-bit index.
// The enable behaviour and the reset values are this design's choices.
module index_generator
  import synth_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  tick_t  tick_period,
  output phase_t phase
);

  tick_t tick_count;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      tick_count <= tick_t'(1);
      phase      <= '0;
    end else if (tick_count >= tick_period) begin
      tick_count <= tick_t'(1);
      phase      <= phase + 1'b1;
    end else begin
      tick_count <= tick_count + 1'b1;
    end
  end

endmodule
