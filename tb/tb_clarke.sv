// Self-checking testbench for clarke: random phase samples are compared with
// a real-valued evaluation of 0.667*400*(a - b/2 - c/2) and
// 0.667*400*0.8662*(c - b); the clock enable is checked to hold the outputs.
module tb_clarke;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  logic signed [15:0] ua = 0, ub = 0, uc = 0;
  fx_t u_alpha, u_beta;
  int checks = 0, failures = 0;

  clarke dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(input fx_t x);
    return real'(x) / 65536.0;
  endfunction

  initial begin
    real a, b, c, ea, eb;
    fx_t hold_a;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ua = 16'($urandom); ub = 16'($urandom); uc = 16'($urandom);
      if (n % 4 == 0) begin       // three balanced phases
        real ph, m;
        ph = 6.2831853 * ($urandom % 1000) / 1000.0;
        m  = 0.9 * ($urandom % 1000) / 1000.0;
        ua = 16'($rtoi(32767.0 * m * $sin(ph)));
        ub = 16'($rtoi(32767.0 * m * $sin(ph - 2.0943951)));
        uc = 16'($rtoi(32767.0 * m * $sin(ph + 2.0943951)));
      end
      ce = 1;
      @(negedge clk);
      ce = 0;
      a  = 400.0 * ua / 32768.0;
      b  = 400.0 * ub / 32768.0;
      c  = 400.0 * uc / 32768.0;
      ea = 0.667 * (a - 0.5 * b - 0.5 * c);
      eb = 0.667 * 0.8662 * (c - b);
      checks++;
      if ((r(u_alpha) - ea) > 0.01 || (ea - r(u_alpha)) > 0.01 ||
          (r(u_beta) - eb) > 0.01 || (eb - r(u_beta)) > 0.01) begin
        failures++;
        if (failures < 10)
          $display("mismatch a=%f b=%f c=%f: alpha %f/%f beta %f/%f",
                   a, b, c, r(u_alpha), ea, r(u_beta), eb);
      end
      // hold while ce is low
      hold_a = u_alpha;
      ua = ~ua;
      @(negedge clk);
      checks++;
      if (u_alpha !== hold_a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
