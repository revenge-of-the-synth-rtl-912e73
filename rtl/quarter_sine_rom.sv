// quarter_sine_rom: the quarter-sine memory block.
//
// Holds the first quarter of one sine period as 64 unsigned 10-bit values,
// entry k = round(1023 * sin(pi/2 * k/64)), k = 0..63, so the table runs from
// 0 up to 1023. The contents are computed at elaboration time and the read is
// registered, which maps to one block RAM on an FPGA.
//
// Timing: `data` shows the entry for the `addr` present at the previous
// rising clock edge (one cycle read latency).
//
// From the document: a block-RAM look-up table of the first quarter of the
// sine, 64 entries addressed by 6 bits, 10-bit words, clocked. The amplitude
// 1023 and the sample points k/64 are this design's choices.
module quarter_sine_rom
  import synth_pkg::*;
(
  input  logic               clk,
  input  logic [QADDR_W-1:0] addr,
  output logic [QDATA_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << QADDR_W;
  typedef logic [QDATA_W-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < DEPTH; k++) begin
      t[k] = QDATA_W'($rtoi(1023.0 * $sin(3.14159265358979 / 2.0 * k / DEPTH) + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) begin
    data <= TABLE[addr];
  end

endmodule
