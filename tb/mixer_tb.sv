// mixer_tb: drives random voice samples and enable masks into a 12-voice
// mixer and compares the output with (sum of enabled samples) / 32. Also
// checks the corner cases: nothing enabled, every voice at full scale, and
// a 32-voice mixer with every voice at 2047 (must give 2047, no overflow).
module mixer_tb;
  import synth_pkg::*;

  localparam int N = 12;
  sample_t        sig   [N];
  logic [N-1:0]   en;
  sample_t        mixed;
  sample_t        sig32 [32];
  sample_t        mixed32;
  int checks = 0, failures = 0;

  mixer #(.N_VOICES(N))  dut   (.signals(sig), .enabled(en), .mixed(mixed));
  mixer #(.N_VOICES(32)) dut32 (.signals(sig32), .enabled('1), .mixed(mixed32));

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

  initial begin
    int sum;
    for (int i = 0; i < 32; i++) sig32[i] = 11'd2047;
    for (int t = 0; t < 2000; t++) begin
      sum = 0;
      en = N'($urandom);
      for (int i = 0; i < N; i++) begin
        sig[i] = 11'($urandom);
        if (en[i]) sum += int'(sig[i]);
      end
      #1;
      check(int'(mixed) == sum / 32, $sformatf("mix %0d want %0d", mixed, sum / 32));
    end
    en = '0;
    #1;
    check(mixed == 0, "no voice enabled but output not 0");
    en = '1;
    for (int i = 0; i < N; i++) sig[i] = 11'd2047;
    #1;
    check(int'(mixed) == (12 * 2047) / 32, "twelve voices at full scale");
    check(mixed32 == 11'd2047, $sformatf("32 voices at full scale gave %0d", mixed32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
