// sample_generator_tb: for every waveform and every phase index, checks the
// sample one cycle after the phase is applied:
//   SQUARE 2047 / 0, TRIANGLE 16p or 2047 - 16(p-128), SAW 8p, SINE within 2
//   of 1024 + 1023 sin(2 pi p / 256);
// and that the output is the zero level 1024 while en is low.
module sample_generator_tb;
  import synth_pkg::*;

  logic      clk = 1'b0, en;
  waveform_t wf;
  phase_t    p;
  sample_t   sample;
  int checks = 0, failures = 0;

  sample_generator dut (.clk(clk), .en(en), .waveform(wf), .phase(p), .sample(sample));

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  function automatic int expect_arith(waveform_t w, int ph);
    case (w)
      SQUARE:   return (ph < 128) ? 2047 : 0;
      TRIANGLE: return (ph < 128) ? 16 * ph : 2047 - 16 * (ph - 128);
      SAW:      return 8 * ph;
      default:  return -1;
    endcase
  endfunction

  initial begin
    waveform_t waves [4] = '{SINE, SQUARE, TRIANGLE, SAW};
    real ideal;
    en = 1'b1;
    wf = SINE;
    p = '0;
    @(posedge clk);
    foreach (waves[w]) begin
      for (int ph = 0; ph < 256; ph++) begin
        @(negedge clk);
        wf = waves[w];
        p = 8'(ph);
        @(posedge clk);
        #1;
        if (waves[w] == SINE) begin
          ideal = 1024.0 + 1023.0 * $sin(2.0 * 3.14159265358979 * ph / 256.0);
          check(real'(sample) - ideal <= 2.0 && ideal - real'(sample) <= 2.0,
                $sformatf("SINE p=%0d: %0d", ph, sample));
        end else begin
          check(int'(sample) == expect_arith(waves[w], ph),
                $sformatf("%s p=%0d: got %0d want %0d", waves[w].name(), ph, sample,
                          expect_arith(waves[w], ph)));
        end
      end
    end
    // Latency: the new value must not appear before the edge.
    @(negedge clk);
    wf = SAW;
    p = 8'd10;
    @(posedge clk);
    @(negedge clk);
    p = 8'd20;
    #1;
    check(sample == 11'd80, "output changed before the clock edge");
    @(posedge clk);
    #1;
    check(sample == 11'd160, "output not updated after one cycle");
    // Disabled: zero level.
    @(negedge clk);
    en = 1'b0;
    wf = SQUARE;
    p = 8'd0;
    @(posedge clk);
    #1;
    check(sample == 11'd1024, "disabled output is not 1024");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
