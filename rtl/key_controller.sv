// key_controller: note keys, octave and waveform selection.
//
// Each of the twelve note keys is tied to one note of a fixed octave scale
// C..B. The tick period of key i is NOTE_TICKS[i] >> octave, where
// NOTE_TICKS holds the C3..B3 periods, so octave code 0 plays C3..B3 and each
// step up halves the period (one octave higher): code 1 is the octave of
// middle C, code 3 reaches C6..B6. Two buttons step the octave code up and
// down (saturating at 3 and 0); two more step the waveform code forwards and
// backwards through the four waveforms (wrapping).
//
// Interface: all button inputs are debounced levels; a selection changes
// once per press, on the rising edge. `gates` are the key levels, passed on
// as the note on/off signals. After reset the octave code is 1 and the
// waveform is the sine. `rst` is synchronous, active high.
//
// Timing: octave and waveform change one cycle after the button's rising
// edge is seen; tick periods follow combinationally from the octave code.
//
// From the document: twelve keys for one pre-assigned octave, on-board
// buttons to shift up and down one octave at a time and to switch among the
// four waveforms, and 2-bit octave and waveform codes. The note table, the
// four-octave range, the reset values and the use of two buttons for the
// waveform are this design's choices.
module key_controller
  import synth_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [N_NOTES-1:0]  keys,
  input  logic                oct_up,
  input  logic                oct_down,
  input  logic                wave_next,
  input  logic                wave_prev,
  output tick_t               tick_periods [N_NOTES],
  output logic  [N_NOTES-1:0] gates,
  output logic  [1:0]         octave,
  output waveform_t           waveform
);

  logic oct_up_q, oct_down_q, wave_next_q, wave_prev_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      oct_up_q    <= 1'b0;
      oct_down_q  <= 1'b0;
      wave_next_q <= 1'b0;
      wave_prev_q <= 1'b0;
      octave      <= 2'd1;
      waveform    <= SINE;
    end else begin
      oct_up_q    <= oct_up;
      oct_down_q  <= oct_down;
      wave_next_q <= wave_next;
      wave_prev_q <= wave_prev;
      if (oct_up && !oct_up_q && octave != 2'd3)
        octave <= octave + 1'b1;
      else if (oct_down && !oct_down_q && octave != 2'd0)
        octave <= octave - 1'b1;
      if (wave_next && !wave_next_q)
        waveform <= waveform_t'(waveform + 2'd1);
      else if (wave_prev && !wave_prev_q)
        waveform <= waveform_t'(waveform - 2'd1);
    end
  end

  always_comb begin
    for (int i = 0; i < N_NOTES; i++) begin
      tick_periods[i] = NOTE_TICKS[i] >> octave;
    end
  end

  assign gates = keys;

endmodule
