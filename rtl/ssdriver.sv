// ssdriver: multiplexed driver for an eight-digit seven-segment display.
//
// The digits share one set of segment lines, so only one digit is lit at a
// time. A refresh counter advances the lit digit every REFRESH_CYCLES clock
// cycles (1 ms at 100 MHz by default, an 8 ms frame, fast enough that all
// digits appear lit). The selected digit's BCD code is turned into segments
// by a bcd_decoder; a code of 10..15 leaves that digit blank.
//
// Interface: `digits` holds N_DIGITS 4-bit codes, digit 0 (rightmost) in
// bits 3:0. `an_n` are the active-low digit enables (one low at a time),
// `seg_n` the active-low segments {g..a}, `dp_n` the decimal point (off).
// `rst` is synchronous, active high.
//
// Timing: an_n and the digit select are registered; seg_n is decoded from
// the registered select and the present `digits`.
//
// The document names this block and says it writes to the seven-segment
// display; the multiplexing scheme and its rate are this design's choices.
module ssdriver #(
  parameter int unsigned N_DIGITS       = 8,
  parameter int unsigned REFRESH_CYCLES = 100_000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [4*N_DIGITS-1:0] digits,
  output logic [N_DIGITS-1:0]   an_n,
  output logic [6:0]            seg_n,
  output logic                  dp_n
);

  localparam int unsigned CNT_W = $clog2(REFRESH_CYCLES + 1);
  localparam int unsigned SEL_W = (N_DIGITS > 1) ? $clog2(N_DIGITS) : 1;

  logic [CNT_W-1:0] refresh_count;
  logic [SEL_W-1:0] sel;
  logic [3:0]       code;

  always_ff @(posedge clk) begin
    if (rst) begin
      refresh_count <= '0;
      sel           <= '0;
    end else if (refresh_count == CNT_W'(REFRESH_CYCLES - 1)) begin
      refresh_count <= '0;
      sel           <= (sel == SEL_W'(N_DIGITS - 1)) ? '0 : sel + 1'b1;
    end else begin
      refresh_count <= refresh_count + 1'b1;
    end
  end

  always_comb begin
    an_n = '1;
    an_n[sel] = 1'b0;
    code = digits[4*sel +: 4];
  end

  bcd_decoder u_decoder (
    .digit (code),
    .seg_n (seg_n)
  );

  assign dp_n = 1'b1;

endmodule
