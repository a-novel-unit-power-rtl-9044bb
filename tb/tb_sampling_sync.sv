// Self-checking testbench for sampling_sync: a sampled sine of known period is
// applied; exactly one pulse per period is expected, seen on the ce-cycle after
// the first non-negative sample of each rising half-wave, and none on the falling
// crossings. ce is held low at times to check that it freezes the detector.
module tb_sampling_sync;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, pulse;
  fx_t sin_theta = 0;
  int checks = 0, failures = 0;

  sampling_sync dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PER = 200;
  initial begin
    int k, pulses, expect_at;
    real ph;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    k = 0; pulses = 0; expect_at = -1;
    // the sine starts in its negative half, so every rising crossing is seen
    for (int n = 0; n < 20 * PER * 8 / 7 + 8; n++) begin
      @(negedge clk);
      ce = (n % 7 != 3);
      #1;
      // a pulse seen together with ce is acted on at the next clock edge
      if (ce && pulse) begin
        pulses++;
        checks++;
        if (k != expect_at) begin
          failures++;
          $display("pulse while sample %0d is applied, expected %0d", k, expect_at);
        end
      end
      if (ce) begin
        ph = 6.2831853 * (real'(k % PER) + 0.3) / PER + 3.1415926;
        sin_theta = fx_t'($rtoi(65536.0 * $sin(ph)));
        if (k % PER == PER / 2) expect_at = k + 1;   // first sample >= 0
        k++;
      end
    end
    checks++;
    if (pulses != 20) begin
      failures++;
      $display("%0d pulses over 20 periods", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
