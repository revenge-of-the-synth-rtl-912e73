// fullsine_256: sine value for any of the 256 samples of one period.
//
// Only the first quarter of the sine is stored (quarter_sine_rom, 64 words).
// The other three quarters follow from the symmetry of the sine: the second
// quarter reads the table backwards ("reverse"), the third reads it forwards
// but subtracts from the zero level ("invert"), the fourth does both. The
// 8-bit sample number s is mapped to a 6-bit table address as follows:
//   s = 0..64    : forward,  address s (s = 64 reuses entry 63, the peak)
//   s = 65..128  : reverse,  address 64 - s[5:0] (s = 128 gives 0)
//   s = 129..192 : forward,  address s[5:0] (s = 192 reuses entry 63), invert
//   s = 193..255 : reverse,  address 64 - s[5:0], invert
// and the table word q becomes value = 1024 + q, or 1024 - q when inverted,
// an 11-bit sample centred on 1024 (range 1..2047).
//
// Timing: the table is a clocked block RAM, so `value` belongs to the
// `sample_num` present at the previous rising clock edge (one cycle). The
// invert flag is registered alongside the read so both stay aligned.
//
// From the document: the quarter-wave table, the invert and reverse flags,
// the address mapping of the first and fourth quarters and the 8-bit input.
// The document gives the output as 11 bits in its text and 10 bits in its
// block diagram; 11 bits centred on 1024 is used here because the sample
// generator and mixer work on 11-bit samples. The second and third quarter
// mappings are this design's completion of the same symmetry.
module fullsine_256
  import synth_pkg::*;
(
  input  logic    clk,
  input  phase_t  sample_num,
  output sample_t value
);

  logic               reverse, invert, invert_q;
  logic [QADDR_W-1:0] addra;
  logic [QDATA_W-1:0] quarter;

  always_comb begin
    // A sample is in the upper half when s > 128 and in an odd quarter
    // (second or fourth) when s lies in 65..128 or 193..255.
    invert  = (sample_num > 8'd128);
    reverse = (sample_num > 8'd64  && sample_num <= 8'd128) ||
              (sample_num > 8'd192);
    if (reverse)
      addra = QADDR_W'(7'd64 - {1'b0, sample_num[5:0]});
    else if (sample_num[5:0] == '0 && sample_num != '0)
      addra = '1;            // s = 64 or 192: the peak, nearest stored entry
    else
      addra = sample_num[5:0];
  end

  quarter_sine_rom u_rom (
    .clk  (clk),
    .addr (addra),
    .data (quarter)
  );

  always_ff @(posedge clk) begin
    invert_q <= invert;
  end

  always_comb begin
    if (invert_q)
      value = sample_t'(MID) - sample_t'(quarter);
    else
      value = sample_t'(MID) + sample_t'(quarter);
  end

endmodule
