// Self-checking testbench for dq_alphabeta: for random d, q and theta the
// outputs must equal alpha = d*cos - q*sin and beta = -d*sin - q*cos, and the
// forward rotation of abc_dq applied to (alpha, beta) must return (d, q).
module tb_dq_alphabeta;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1;
  fx_t d = 0, q = 0, sin_theta = 0, cos_theta = 0, alpha, beta;
  int checks = 0, failures = 0;

  dq_alphabeta dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rd, rq, th, s, c, ea, eb, ra, rb, bd, bq;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      rd = (($urandom % 2001) - 1000.0) / 2.0;
      rq = (($urandom % 2001) - 1000.0) / 2.0;
      th = 6.2831853 * ($urandom % 3600) / 3600.0;
      s = $sin(th); c = $cos(th);
      @(negedge clk);
      d = fx_t'($rtoi(rd * 65536.0));
      q = fx_t'($rtoi(rq * 65536.0));
      sin_theta = fx_t'($rtoi(65536.0 * s));
      cos_theta = fx_t'($rtoi(65536.0 * c));
      @(negedge clk);
      ea = rd * c - rq * s;
      eb = -rd * s - rq * c;
      ra = real'(alpha) / 65536.0;
      rb = real'(beta) / 65536.0;
      bd = ra * c - rb * s;
      bq = -(ra * s + rb * c);
      checks += 2;
      if ((ra - ea) > 0.02 || (ea - ra) > 0.02 || (rb - eb) > 0.02 || (eb - rb) > 0.02) begin
        failures++;
        if (failures < 10) $display("alpha %f/%f beta %f/%f", ra, ea, rb, eb);
      end
      if ((bd - rd) > 0.05 || (rd - bd) > 0.05 || (bq - rq) > 0.05 || (rq - bq) > 0.05) begin
        failures++;
        if (failures < 10) $display("round trip d %f/%f q %f/%f", bd, rd, bq, rq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
