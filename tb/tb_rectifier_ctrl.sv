// End-to-end testbench of rectifier_ctrl at its default parameters (10 MHz
// clock, 100 kHz control rate, 10 kHz PWM carrier).
//
// The controller drives a real-valued model of the power circuit, the
// switching-function equations of the three-phase rectifier:
//   L dia/dt + R ia = ua + (-2Sa + Sb + Sc) udc / 3   (and cyclically for b, c)
//   C dudc/dt = ia Sa + ib Sb + ic Sc - udc / RL
// with L = 6 mH, R = 0.5 ohm, C = 1000 uF, RL = 18 ohm and Sx the upper gate of
// leg x, integrated with the forward Euler method at the clock step (100 ns).
// The grid is 311 V, 50 Hz; starting from an empty capacitor and a grid phase
// of 0.3, -0.4 and 1.0 rad (so the PLL has to pull in), three runs of
// 0.35 s each apply: ideal voltage, a sag to 200 V and an unbalance with phase
// b at 250 V, the latter two from 0.135 s to 0.23 s.
//
// Checks at the end of each run: PLL phase error below 5 V, DC voltage within
// 600 +/- 15 V, and a power factor above 0.95 over the last two grid periods.
// In every run the following must occur at least once and are counted: PLL
// sampling pulses (at least 15), the voltage-loop current clamp, all six PWM
// sectors, and the disturbance itself (sag or unbalance samples).
module tb_rectifier_ctrl;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] va = 0, vb = 0, vc = 0, ia = 0, ib = 0, ic = 0, udc = 0;
  logic [5:0] gate;
  logic ce, pll_sync, i_limit, pwm_start;
  fx_t sin_theta, cos_theta, pll_err, pll_freq, pll_integ, u_d, u_q, i_d, i_q, i_ref;
  logic [31:0] pll_theta;
  logic [2:0] sector;
  int checks = 0, failures = 0;

  rectifier_ctrl dut (.*);
  always #50 clk = ~clk;          // 10 MHz

  localparam real DT    = 1.0e-7;
  localparam int  NSTEP = 3500000;  // 0.35 s

  initial begin
    repeat (3 * NSTEP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic signed [15:0] q15(input real x, input real fs);
    real y;
    y = x / fs * 32768.0;
    if (y > 32767.0) y = 32767.0;
    if (y < -32768.0) y = -32768.0;
    return 16'($rtoi(y));
  endfunction

  task automatic run(input int scen, input string name, input real phi0);
    real t, w, ea, eb, ec, xa, xb, xc, xdc, sa, sb, sc, da, db, dc, ddc;
    real p_acc, va2, ia2, udc_acc, pf;
    int n_sync, n_limit, n_dist, n_win;
    int sec_seen [1:6];
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    xa = 0.0; xb = 0.0; xc = 0.0; xdc = 0.0;
    n_sync = 0; n_limit = 0; n_dist = 0; n_win = 0;
    p_acc = 0.0; va2 = 0.0; ia2 = 0.0; udc_acc = 0.0;
    for (int k = 1; k <= 6; k++) sec_seen[k] = 0;
    for (int n = 0; n < NSTEP; n++) begin
      t = n * DT;
      w = 314.159265 * t + phi0;
      ea = 311.0; eb = 311.0; ec = 311.0;
      if (t >= 0.135 && t <= 0.23) begin
        if (scen == 1) begin ea = 200.0; eb = 200.0; ec = 200.0; end
        if (scen == 2) eb = 250.0;
        if (scen != 0) n_dist++;
      end
      ea = ea * $sin(w);
      eb = eb * $sin(w - 2.0943951);
      ec = ec * $sin(w + 2.0943951);
      va <= q15(ea, 400.0); vb <= q15(eb, 400.0); vc <= q15(ec, 400.0);
      ia <= q15(xa, 400.0); ib <= q15(xb, 400.0); ic <= q15(xc, 400.0);
      udc <= q15(xdc, 1000.0);
      @(posedge clk);
      sa = gate[0]; sb = gate[2]; sc = gate[4];
      da  = (ea - 0.5 * xa + (-2.0 * sa + sb + sc) * xdc / 3.0) / 6.0e-3;
      db  = (eb - 0.5 * xb + (sa - 2.0 * sb + sc) * xdc / 3.0) / 6.0e-3;
      dc  = (ec - 0.5 * xc + (sa + sb - 2.0 * sc) * xdc / 3.0) / 6.0e-3;
      ddc = (xa * sa + xb * sb + xc * sc - xdc / 18.0) / 1.0e-3;
      xa += da * DT; xb += db * DT; xc += dc * DT; xdc += ddc * DT;
      if (ce && pll_sync) n_sync++;
      if (ce && i_limit) n_limit++;
      if (pwm_start) sec_seen[sector]++;
      if (n >= NSTEP - 400000) begin        // last two grid periods
        p_acc   += ea * xa + eb * xb + ec * xc;
        va2     += ea * ea + eb * eb + ec * ec;
        ia2     += xa * xa + xb * xb + xc * xc;
        udc_acc += xdc;
        n_win++;
      end
      if (scen == 0 && n % 200000 == 0)
        $display("%s t=%5.3f udc=%6.1f ia=%6.1f pll_err=%7.2f i_ref=%6.1f", name, t, xdc, xa,
                 real'(pll_err) / 65536.0, real'(i_ref) / 65536.0);
    end
    pf = p_acc / $sqrt(va2 * ia2);
    $display("%s: udc %f V, power factor %f, %0d sync pulses, %0d clamped samples, %0d disturbed steps",
             name, udc_acc / n_win, pf, n_sync, n_limit, n_dist);
    check(pll_err < to_fx(5.0) && pll_err > -to_fx(5.0),
          $sformatf("%s: PLL error %f V at the end", name, real'(pll_err) / 65536.0));
    check(udc_acc / n_win > 585.0 && udc_acc / n_win < 615.0,
          $sformatf("%s: DC voltage %f V", name, udc_acc / n_win));
    check(pf > 0.95, $sformatf("%s: power factor %f", name, pf));
    check(n_sync >= 15, $sformatf("%s: %0d PLL sampling pulses", name, n_sync));
    check(n_limit > 0, $sformatf("%s: current clamp never reached", name));
    for (int k = 1; k <= 6; k++)
      check(sec_seen[k] > 0, $sformatf("%s: sector %0d never used", name, k));
    if (scen != 0) check(n_dist > 0, $sformatf("%s: disturbance never applied", name));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(0, "ideal", 0.3);
    run(1, "sag", -0.4);
    run(2, "unbalance", 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
