// debounced_button: a clean level from a bouncing push button.
//
// The raw input is first brought into the clock domain by two flip-flops.
// The debounced state only changes after the synchronised input has held
// the opposite value for DEBOUNCE_CYCLES consecutive clock cycles; any
// bounce back restarts the count. The default, 1,000,000 cycles, is 10 ms
// at 100 MHz.
//
// Interface: `btn_in` raw (asynchronous), `btn_state` debounced level.
// `rst` is synchronous, active high, and clears the state to released.
//
// Timing: a clean edge on btn_in reaches btn_state DEBOUNCE_CYCLES + 2
// cycles later.
//
// The document names this block and says what it does (it stabilises button
// states on press and release); the synchroniser and the counting scheme are
// this design's choices.
module debounced_button #(
  parameter int unsigned DEBOUNCE_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic btn_in,
  output logic btn_state
);

  localparam int unsigned CNT_W = $clog2(DEBOUNCE_CYCLES + 1);

  logic             sync_0, sync_1;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_0    <= 1'b0;
      sync_1    <= 1'b0;
      btn_state <= 1'b0;
      count     <= '0;
    end else begin
      sync_0 <= btn_in;
      sync_1 <= sync_0;
      if (sync_1 == btn_state) begin
        count <= '0;
      end else if (count == CNT_W'(DEBOUNCE_CYCLES - 1)) begin
        btn_state <= sync_1;
        count     <= '0;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
