// debounced_button_tb: with DEBOUNCE_CYCLES = 20,
//   - bursts of bounces shorter than 20 cycles never change the state,
//   - a clean press is reported exactly 22 cycles after the input edge
//     (2 synchroniser cycles + 20 stable cycles), and likewise a release.
module debounced_button_tb;
  logic clk = 1'b0, rst, btn, state;
  int checks = 0, failures = 0;

  debounced_button #(.DEBOUNCE_CYCLES(20)) dut (.clk(clk), .rst(rst), .btn_in(btn), .btn_state(state));

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

  // Bounce: toggle the input an even number of times with random gaps
  // shorter than 20 cycles, ending at the level it started from.
  task automatic bounce(input logic final_level);
    for (int i = 0; i < 14; i++) begin
      @(negedge clk);
      btn = ~btn;
      repeat ($urandom_range(1, 15)) begin
        @(negedge clk);
        check(state == !final_level, "state changed during bouncing");
      end
    end
  endtask

  task automatic edge_to(input logic level);
    int n;
    @(negedge clk);
    btn = level;
    n = 0;
    while (state != level && n < 100) begin
      @(negedge clk);
      n++;
    end
    check(n == 22, $sformatf("edge to %0d reported after %0d cycles", level, n));
  endtask

  initial begin
    rst = 1'b1;
    btn = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(state == 1'b0, "not released after reset");
    bounce(1'b1);
    edge_to(1'b1);
    repeat (30) @(negedge clk);
    check(state == 1'b1, "pressed state not held");
    bounce(1'b0);
    edge_to(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
