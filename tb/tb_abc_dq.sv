// Self-checking testbench for abc_dq: balanced three-phase samples of random
// amplitude Um and phase phi, and a random rotation angle theta, must give
// d = Um*sin(phi - theta) and q = -Um*cos(phi - theta) two ce-cycles later
// (Clarke register, then rotation register).
module tb_abc_dq;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  logic signed [15:0] a = 0, b = 0, c = 0;
  fx_t sin_theta = 0, cos_theta = 0, d, q;
  int checks = 0, failures = 0;

  abc_dq dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real um, phi, th, ed, eq, rd, rq;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      um  = 350.0 * ($urandom % 1000) / 1000.0;
      phi = 6.2831853 * ($urandom % 3600) / 3600.0;
      th  = 6.2831853 * ($urandom % 3600) / 3600.0;
      @(negedge clk);
      a = 16'($rtoi(32768.0 / 400.0 * um * $sin(phi)));
      b = 16'($rtoi(32768.0 / 400.0 * um * $sin(phi - 2.0943951)));
      c = 16'($rtoi(32768.0 / 400.0 * um * $sin(phi + 2.0943951)));
      sin_theta = fx_t'($rtoi(65536.0 * $sin(th)));
      cos_theta = fx_t'($rtoi(65536.0 * $cos(th)));
      ce = 1;
      @(negedge clk);
      @(negedge clk);
      ce = 0;
      ed = um * $sin(phi - th);
      eq = -um * $cos(phi - th);
      rd = real'(d) / 65536.0;
      rq = real'(q) / 65536.0;
      checks++;
      // 0.667 * 0.8662 vs 1/sqrt(3) limits the accuracy to about 0.1 %
      if ((rd - ed) > 0.5 || (ed - rd) > 0.5 || (rq - eq) > 0.5 || (eq - rq) > 0.5) begin
        failures++;
        if (failures < 10) $display("d %f/%f q %f/%f", rd, ed, rq, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
