// index_generator_tb: checks the phase accumulator.
//   - with tick period T the phase advances exactly once every T cycles,
//     for T = 1, 2, 5 and 0 (treated as 1),
//   - the phase wraps from 255 to 0, a full period taking 256*T cycles,
//   - en low and rst hold the phase at 0 and restart the tick count.
module index_generator_tb;
  import synth_pkg::*;

  logic   clk = 1'b0, rst, en;
  tick_t  tick;
  phase_t phase;
  int checks = 0, failures = 0;

  index_generator dut (.clk(clk), .rst(rst), .en(en), .tick_period(tick), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  // Run with period t for n cycles after a restart and record the cycle of
  // every phase change; check spacing and the full-period wrap.
  task automatic run_period(input int t);
    int eff, last_change, cycle, changes;
    phase_t prev;
    eff = (t == 0) ? 1 : t;
    @(negedge clk);
    en = 1'b0;
    tick = tick_t'(t);
    @(negedge clk);
    check(phase == 0, "phase not 0 while disabled");
    en = 1'b1;
    prev = phase;
    last_change = 0;
    changes = 0;
    for (cycle = 1; cycle <= 256 * eff; cycle++) begin
      @(posedge clk);
      #1;
      if (phase != prev) begin
        changes++;
        check(phase == phase_t'(prev + 1), $sformatf("T=%0d: phase jumped %0d->%0d", t, prev, phase));
        check(cycle - last_change == eff,
              $sformatf("T=%0d: step after %0d cycles", t, cycle - last_change));
        if (changes == 256) begin
          check(phase == 0, "phase did not wrap to 0");
          check(cycle == 256 * eff, $sformatf("T=%0d: period %0d cycles", t, cycle));
        end
        last_change = cycle;
        prev = phase;
      end
    end
    check(changes == 256, $sformatf("T=%0d: %0d steps in one period", t, changes));
  endtask

  initial begin
    rst = 1'b1;
    en = 1'b0;
    tick = tick_t'(3);
    repeat (2) @(posedge clk);
    rst = 1'b0;
    run_period(1);
    run_period(2);
    run_period(5);
    run_period(0);
    // Synchronous reset while running.
    @(negedge clk);
    tick = tick_t'(1);
    repeat (10) @(posedge clk);
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1;
    check(phase == 0, "reset did not clear the phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
