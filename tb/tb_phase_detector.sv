// Self-checking testbench for phase_detector: random alpha/beta and angles
// are sampled with a pulse; the output must keep its old value for MULT_LAT
// ce-cycles and then equal alpha*cos - beta*sin (the five-cycle latency of
// the sampling register plus the 4-stage multipliers is checked exactly).
// Inputs that change without a pulse must not reach the output.
module tb_phase_detector;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1, en = 0;
  fx_t u_alpha = 0, u_beta = 0, sin_theta = 0, cos_theta = 0, ud;
  int checks = 0, failures = 0;

  phase_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fx_t prev, expv;
    real th, a, b;
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      th = 6.2831853 * ($urandom % 4096) / 4096.0;
      a  = 300.0 * (($urandom % 2001) - 1000.0) / 1000.0;
      b  = 300.0 * (($urandom % 2001) - 1000.0) / 1000.0;
      u_alpha   = fx_t'($rtoi(a * 65536.0));
      u_beta    = fx_t'($rtoi(b * 65536.0));
      sin_theta = fx_t'($rtoi($sin(th) * 65536.0));
      cos_theta = fx_t'($rtoi($cos(th) * 65536.0));
      // reference from the quantised inputs, in real arithmetic
      expv = fx_t'($rtoi((real'(u_alpha) * real'(cos_theta) -
                          real'(u_beta) * real'(sin_theta)) / 65536.0));
      en = 1;
      @(negedge clk);
      en = 0;
      // change the inputs: without a pulse they must be ignored
      u_alpha = fx_t'($urandom); u_beta = fx_t'($urandom);
      lat = 0;
      while (ud == prev && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 4 && !(lat == 20 && prev == expv)) begin
        failures++;
        $display("latency %0d ce-cycles after the sampling edge, expected 4", lat);
      end
      checks++;
      if ((ud - expv) > 3 || (expv - ud) > 3) begin
        failures++;
        if (failures < 10) $display("ud %0d expected %0d", ud, expv);
      end
      repeat (3) @(negedge clk);
      checks++;
      if ((ud - expv) > 3 || (expv - ud) > 3) failures++;
      prev = ud;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
