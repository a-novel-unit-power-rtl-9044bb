// Self-checking testbench for tdpll. A 50 Hz, 311 V three-phase voltage is
// sampled at 100 kHz (ce on every clock) and the loop is run from reset for
// the three scenarios of the original evaluation: ideal voltage, a sag to
// 200 V and an unbalance with phase b at 250 V, both from 0.135 s to 0.23 s.
// Each run starts at a different initial grid phase. Checks: one sampling
// pulse per grid period after 0.1 s (2000 +/- 20 samples apart; not checked
// from 0.135 s to 0.27 s in the disturbed runs), the DDS phase within 0.1 rad
// of the grid phase just before the disturbance, and at the end of the run
// |ud| below 3 V, the phase within 0.02 rad and the frequency word back at
// 32.768 +/- 0.1. The phase error must change only MULT_LAT + 1 = 5 samples
// after a sampling pulse and hold for the rest of the period.
module tb_tdpll;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1;
  logic signed [15:0] ua = 0, ub = 0, uc = 0;
  fx_t sin_theta, cos_theta, ud, freq_word, lf_acc;
  logic [31:0] theta;
  logic sync_pulse;
  int checks = 0, failures = 0;

  tdpll dut (.*);
  always #5 clk = ~clk;

  localparam int NSAMP = 35000;    // 0.35 s at 100 kHz

  initial begin
    repeat (4 * NSAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrap(input real x);
    real y;
    y = x;
    while (y > 3.14159265) y -= 6.2831853;
    while (y < -3.14159265) y += 6.2831853;
    return y;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // scenario 0 ideal, 1 sag, 2 unbalance
  task automatic run(input int scen, input real phi0);
    real t, phi, ma, mb, mc, perr;
    int last_pulse, pulses, bad_period, bad_hold;
    fx_t ud_prev;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    last_pulse = -1; pulses = 0; bad_period = 0; bad_hold = 0; ud_prev = 0;
    for (int n = 0; n < NSAMP; n++) begin
      t   = n * 1.0e-5;
      phi = 314.159265 * t + phi0;
      ma = 311.0; mb = 311.0; mc = 311.0;
      if (t >= 0.135 && t <= 0.23) begin
        if (scen == 1) begin ma = 200.0; mb = 200.0; mc = 200.0; end
        if (scen == 2) mb = 250.0;
      end
      ua = 16'($rtoi(32768.0 / 400.0 * ma * $sin(phi)));
      ub = 16'($rtoi(32768.0 / 400.0 * mb * $sin(phi - 2.0943951)));
      uc = 16'($rtoi(32768.0 / 400.0 * mc * $sin(phi + 2.0943951)));
      @(posedge clk);
      #1;
      if (sync_pulse) begin
        pulses++;
        if (n > 10000 && !(scen != 0 && n > 13500 && n < 27000) && last_pulse >= 0 && (n - last_pulse < 1980 || n - last_pulse > 2020)) begin
          bad_period++;
          $display("scenario %0d: pulse interval %0d at t=%f", scen, n - last_pulse, t);
        end
        last_pulse = n;
      end
      if (ud != ud_prev && !(last_pulse >= 0 && n - last_pulse == 5)) bad_hold++;
      ud_prev = ud;
      perr = wrap(phi - 6.2831853 * real'(theta) / 4294967296.0);
      if (n == 13400)
        check(perr < 0.1 && perr > -0.1,
              $sformatf("scenario %0d t=%f: phase error %f rad before the disturbance", scen, t, perr));
      if (n == NSAMP - 1) begin
        check(ud < to_fx(3.0) && ud > -to_fx(3.0),
              $sformatf("scenario %0d t=%f: |ud| = %f", scen, t, real'(ud) / 65536.0));
        check(perr < 0.02 && perr > -0.02,
              $sformatf("scenario %0d t=%f: phase error %f rad", scen, t, perr));
        check(freq_word > to_fx(32.668) && freq_word < to_fx(32.868),
              $sformatf("scenario %0d t=%f: word %f", scen, t, real'(freq_word) / 65536.0));
      end
    end
    check(bad_period == 0, $sformatf("scenario %0d: %0d bad pulse intervals", scen, bad_period));
    check(bad_hold == 0, $sformatf("scenario %0d: phase error changed %0d times away from the sampling instant", scen, bad_hold));
    check(pulses >= 16 && pulses <= 19, $sformatf("scenario %0d: %0d pulses in 0.35 s", scen, pulses));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(0, 0.3);
    run(1, -0.4);
    run(2, 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
