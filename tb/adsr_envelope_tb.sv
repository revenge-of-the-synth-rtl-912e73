// adsr_envelope_tb: presses the gate twice, as in a note being played twice.
// Rates: attack 2, decay 3, release 1 cycle per step, sustain 1500.
//   - attack: scaler rises by one every 2 cycles and reaches 2047 after
//     about 2 * 2047 cycles, never falling;
//   - decay: falls to 1500 in about 3 * 547 cycles; sustain holds 1500;
//   - release: falls to 0 in about 1500 cycles, then `active` drops;
//   - a release started during the attack, and a new press during release;
//   - signal_out = 1024 + ((signal_in - 1024) * scaler) >>> 11 every cycle,
//     with a random input.
module adsr_envelope_tb;
  import synth_pkg::*;

  logic    clk = 1'b0, rst, gate;
  sample_t sig_in, scaler, sig_out;
  logic    active;
  int checks = 0, failures = 0;

  adsr_envelope dut (
    .clk(clk), .rst(rst), .gate(gate),
    .attack_rate(16'd2), .decay_rate(16'd3), .sustain_level(11'd1500),
    .release_rate(16'd1), .signal_in(sig_in), .scaler(scaler),
    .signal_out(sig_out), .active(active)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  // Output formula check on every cycle, with a fresh random input.
  int out_checks = 0;
  always @(negedge clk) begin
    if (!rst) begin
      int dev, expect_out;
      dev = int'(sig_in) - 1024;
      expect_out = 1024 + ((dev * int'(scaler)) >>> 11);
      checks++;
      out_checks++;
      if (int'(sig_out) != expect_out) begin
        failures++;
        $display("FAIL: out %0d want %0d (in %0d scaler %0d)", sig_out, expect_out, sig_in, scaler);
      end
      sig_in = 11'($urandom);
    end
  end

  // Wait for a condition, counting cycles; returns the count.
  task automatic wait_scaler(input int target, input bit rising, output int cycles,
                             input int limit);
    sample_t prev;
    cycles = 0;
    prev = scaler;
    while (cycles < limit && (rising ? int'(scaler) < target : int'(scaler) > target)) begin
      @(posedge clk);
      #1;
      cycles++;
      if (rising) check(scaler >= prev, "scaler fell during attack");
      else        check(scaler <= prev, "scaler rose during decay/release");
      prev = scaler;
    end
  endtask

  initial begin
    int n;
    sig_in = 11'd1024;
    rst = 1'b1;
    gate = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #1;
    check(!active && scaler == 0, "not idle after reset");

    // First press: full ADSR.
    @(negedge clk);
    gate = 1'b1;
    wait_scaler(2047, 1'b1, n, 10000);
    check(n >= 2 * 2047 - 2 && n <= 2 * 2047 + 4, $sformatf("attack took %0d cycles", n));
    wait_scaler(1500, 1'b0, n, 10000);
    check(n >= 3 * 547 - 2 && n <= 3 * 547 + 6, $sformatf("decay took %0d cycles", n));
    repeat (500) @(posedge clk);
    #1;
    check(scaler == 11'd1500 && active, "sustain level not held");
    @(negedge clk);
    gate = 1'b0;
    wait_scaler(0, 1'b0, n, 10000);
    check(n >= 1500 - 2 && n <= 1500 + 4, $sformatf("release took %0d cycles", n));
    repeat (3) @(posedge clk);
    #1;
    check(!active, "still active after release");

    // Second press, released during the attack, pressed again in release.
    @(negedge clk);
    gate = 1'b1;
    repeat (1000) @(posedge clk);
    #1;
    check(scaler > 400 && scaler < 600, $sformatf("mid-attack scaler %0d", scaler));
    @(negedge clk);
    gate = 1'b0;
    repeat (100) @(posedge clk);
    #1;
    check(scaler < 500 && scaler > 0 && active, "release from attack not ramping");
    @(negedge clk);
    gate = 1'b1;
    wait_scaler(2047, 1'b1, n, 10000);
    check(scaler == 2047, "retriggered attack did not reach full scale");
    @(negedge clk);
    gate = 1'b0;
    wait_scaler(0, 1'b0, n, 10000);
    repeat (3) @(posedge clk);
    #1;
    check(!active && scaler == 0, "not idle at the end");
    check(out_checks > 1000, "too few output checks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
