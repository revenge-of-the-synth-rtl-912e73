// key_controller_tb: checks the note, octave and waveform selection.
//   - tick periods of all twelve keys, for every octave code, against
//     floor(round(100e6 / (256 f)) / 2**octave), with f the equal-tempered
//     frequency of C3..B3 computed here (A4 = 440 Hz);
//   - octave steps once per press, saturates at 3 and 0, starts at 1;
//   - waveform starts at SINE, steps forwards and backwards and wraps;
//   - a held button acts only once; gates follow the keys.
module key_controller_tb;
  import synth_pkg::*;

  logic               clk = 1'b0, rst;
  logic [N_NOTES-1:0] keys, gates;
  logic               up, down, next, prev;
  tick_t              ticks [N_NOTES];
  logic [1:0]         octave;
  waveform_t          wf;
  int checks = 0, failures = 0;

  key_controller dut (
    .clk(clk), .rst(rst), .keys(keys), .oct_up(up), .oct_down(down),
    .wave_next(next), .wave_prev(prev), .tick_periods(ticks), .gates(gates),
    .octave(octave), .waveform(wf)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic press(ref logic btn, input int hold);
    @(negedge clk);
    btn = 1'b1;
    repeat (hold) @(negedge clk);
    btn = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic check_ticks();
    real f;
    int base;
    for (int n = 0; n < 12; n++) begin
      f = 440.0 * $pow(2.0, (n - 9) / 12.0 - 1.0);
      base = int'($floor(100.0e6 / (256.0 * f) + 0.5));
      check(int'(ticks[n]) == (base >> octave),
            $sformatf("octave %0d key %0d: tick %0d want %0d", octave, n, ticks[n], base >> octave));
    end
  endtask

  initial begin
    rst = 1'b1;
    keys = '0;
    {up, down, next, prev} = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(octave == 2'd1, "octave after reset is not 1");
    check(wf == SINE, "waveform after reset is not SINE");
    check_ticks();
    check(int'(ticks[0]) == 1493, "middle C tick period is not 1493");
    press(down, 1);
    check(octave == 2'd0, "octave down");
    check_ticks();
    press(down, 1);
    check(octave == 2'd0, "octave did not saturate at 0");
    press(up, 10);
    check(octave == 2'd1, "held up button stepped more than once");
    press(up, 1);
    press(up, 1);
    check(octave == 2'd3, "octave up to 3");
    check_ticks();
    press(up, 1);
    check(octave == 2'd3, "octave did not saturate at 3");
    press(next, 1);
    check(wf == SQUARE, "waveform next -> SQUARE");
    press(next, 5);
    check(wf == TRIANGLE, "waveform next -> TRIANGLE");
    press(next, 1);
    check(wf == SAW, "waveform next -> SAW");
    press(next, 1);
    check(wf == SINE, "waveform did not wrap to SINE");
    press(prev, 1);
    check(wf == SAW, "waveform prev did not wrap to SAW");
    keys = 12'b1010_0000_0101;
    #1;
    check(gates == 12'b1010_0000_0101, "gates do not follow keys");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
