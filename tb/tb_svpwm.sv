// Self-checking testbench for svpwm (carrier of 2*PWM_HALF = 200 clocks).
// For space vectors of random length and angle in each of the six sectors
// (alpha = M cos g, beta = -M sin g, so that va, vb, vc = M cos(g - k*120 deg))
// it checks the carrier period, the sector number floor(g / 60 deg) + 1, the
// complementary lower gates and the on-time of each upper gate against
// 2*cmp - 1 clocks, with cmp = PWM_HALF * (1/2 + (v + vz) / 600 V) and
// vz = -(max + min) / 2 worked out here in real arithmetic. Vectors beyond the
// linear range are included and must clip.
module tb_svpwm;
  import fx_pkg::*;
  localparam int PH = 100;
  logic clk = 0, rst_n = 0;
  fx_t alpha = 0, beta = 0;
  logic [5:0] gate;
  logic [2:0] sector;
  logic period_start;
  int checks = 0, failures = 0;

  svpwm #(.PWM_HALF(PH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_cmp(input real v);
    real x;
    x = PH / 2.0 + v * PH / 600.0;
    if (x < 0.0) return 0;
    if (x > PH) return PH;
    return $rtoi($floor(x));
  endfunction

  function automatic int exp_on(input int cmp);
    return cmp == 0 ? 0 : 2 * cmp - 1;
  endfunction

  initial begin
    real m, g, va, vb, vc, vmax, vmin, vz;
    int on_a, on_b, on_c, len, sec_seen [1:6];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 1; k <= 6; k++) sec_seen[k] = 0;
    for (int n = 0; n < 120; n++) begin
      m = (n % 10 == 9) ? 500.0 : 20.0 + 320.0 * ($urandom % 1000) / 1000.0;
      g = (60.0 * (n % 6) + 30.0 + (($urandom % 41) - 20.0)) * 3.14159265 / 180.0;
      va = m * $cos(g);
      vb = m * $cos(g - 2.0943951);
      vc = m * $cos(g + 2.0943951);
      vmax = va > vb ? (va > vc ? va : vc) : (vb > vc ? vb : vc);
      vmin = va < vb ? (va < vc ? va : vc) : (vb < vc ? vb : vc);
      vz = -(vmax + vmin) / 2.0;
      @(negedge clk);
      alpha = fx_t'($rtoi(65536.0 * m * $cos(g)));
      beta  = fx_t'($rtoi(-65536.0 * m * $sin(g)));
      // skip to the start of the next-but-one period: new compares loaded
      @(posedge period_start);
      @(negedge clk);
      while (!period_start) @(negedge clk);
      on_a = 0; on_b = 0; on_c = 0; len = 0;
      do begin
        on_a += gate[0]; on_b += gate[2]; on_c += gate[4];
        checks++;
        if (gate[3] != !gate[0] || gate[5] != !gate[2] || gate[1] != !gate[4]) failures++;
        len++;
        @(negedge clk);
      end while (!period_start);
      checks += 5;
      if (len != 2 * PH) begin
        failures++;
        $display("carrier period %0d clocks", len);
      end
      if (sector != 3'(n % 6 + 1)) begin
        failures++;
        $display("g=%f deg: sector %0d expected %0d", g * 180.0 / 3.14159265, sector, n % 6 + 1);
      end
      sec_seen[sector]++;
      if ((on_a - exp_on(exp_cmp(va + vz))) > 4 || (exp_on(exp_cmp(va + vz)) - on_a) > 4) begin
        failures++;
        $display("leg A on %0d expected %0d", on_a, exp_on(exp_cmp(va + vz)));
      end
      if ((on_b - exp_on(exp_cmp(vb + vz))) > 4 || (exp_on(exp_cmp(vb + vz)) - on_b) > 4) begin
        failures++;
        $display("leg B on %0d expected %0d", on_b, exp_on(exp_cmp(vb + vz)));
      end
      if ((on_c - exp_on(exp_cmp(vc + vz))) > 4 || (exp_on(exp_cmp(vc + vz)) - on_c) > 4) begin
        failures++;
        $display("leg C on %0d expected %0d", on_c, exp_on(exp_cmp(vc + vz)));
      end
    end
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (sec_seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
