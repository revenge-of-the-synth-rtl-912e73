// synth_pkg: types and constants shared by the synthesizer blocks.
//
// Samples are 11-bit unsigned values with 1024 as the zero level (0 is the
// most negative and 2047 the most positive level). The phase index that walks
// through one waveform period is 8 bits, so one period has 256 samples. The
// tick period is the number of 100 MHz clock cycles between phase-index
// increments, so the output frequency is f = 100 MHz / (256 * tick_period).
// The four waveform codes and the 8-bit phase / 11-bit sample widths follow
// the document; the 16-bit tick-period width and the note table are this
// design's choices.
package synth_pkg;

  localparam int unsigned PHASE_W  = 8;     // phase index width (256 samples)
  localparam int unsigned SAMPLE_W = 11;    // sample width (0..2047)
  localparam int unsigned TICK_W   = 16;    // tick period width (down to ~6 Hz)
  localparam int unsigned QADDR_W  = 6;     // quarter-sine table address (64 entries)
  localparam int unsigned QDATA_W  = 10;    // quarter-sine table value (0..1023)
  localparam int unsigned MID      = 1024;  // zero level of a sample

  typedef logic [PHASE_W-1:0]  phase_t;
  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [TICK_W-1:0]   tick_t;

  // Waveform definitions, encoded as two bits.
  typedef enum logic [1:0] {
    SINE     = 2'b00,
    SQUARE   = 2'b01,
    TRIANGLE = 2'b10,
    SAW      = 2'b11
  } waveform_t;

  localparam int unsigned N_NOTES = 12;

  // Tick periods of the twelve notes C3..B3 (twelve-tone equal temperament,
  // A4 = 440 Hz): round(100e6 / (256 * f)), f = 440 * 2**((n - 9)/12 - 1).
  // Each higher octave halves the tick period (a right shift by one).
  localparam tick_t NOTE_TICKS [N_NOTES] = '{
    16'd2986, 16'd2819, 16'd2660, 16'd2511, 16'd2370, 16'd2237,
    16'd2112, 16'd1993, 16'd1881, 16'd1776, 16'd1676, 16'd1582
  };

endpackage
