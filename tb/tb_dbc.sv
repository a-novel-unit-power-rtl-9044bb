// Self-checking testbench for dbc: random dq voltages and currents and a DC
// voltage near, then far below, the 600 V reference are applied, with ce held
// low on some cycles. A real-valued model of the same equations (PI voltage
// loop with clamp, iq* = -I_ref, id* = 0, decoupled PI current loops) is
// stepped alongside and all outputs are compared after every ce-cycle. The
// far-below phase must drive the current reference into its clamp.
module tb_dbc;
  import fx_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  fx_t ud = 0, uq = 0, id = 0, iq = 0, udc = 0, vd_ref, vq_ref, i_ref;
  logic i_limit;
  int checks = 0, failures = 0;

  dbc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * ($urandom % 100000) / 100000.0;
  endfunction
  function automatic real r(input fx_t x);
    return real'(x) / 65536.0;
  endfunction
  function automatic real clampr(input real x, input real l);
    return x > l ? l : (x < -l ? -l : x);
  endfunction
  function automatic bit near(input real a, input real b, input real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  initial begin
    real m_intv, m_iref, m_intd, m_intq, m_vd, m_vq, ev, ivn, irn, ed, eq;
    real xud, xuq, xid, xiq, xudc;
    bit m_lim;
    int limits;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    m_intv = 0; m_iref = 0; m_intd = 0; m_intq = 0; m_vd = 0; m_vq = 0; m_lim = 0;
    limits = 0;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      ud  = fx_t'($rtoi(65536.0 * rnd(-30.0, 30.0)));
      uq  = fx_t'($rtoi(65536.0 * rnd(-320.0, -280.0)));
      id  = fx_t'($rtoi(65536.0 * rnd(-20.0, 20.0)));
      iq  = fx_t'($rtoi(65536.0 * rnd(-60.0, 10.0)));
      udc = fx_t'($rtoi(65536.0 * (n < 600 ? rnd(590.0, 610.0) : rnd(50.0, 150.0))));
      ce  = ($urandom % 5 != 0);
      xud = r(ud); xuq = r(uq); xid = r(id); xiq = r(iq); xudc = r(udc);
      if (ce) begin
        ev  = 600.0 - xudc;
        ivn = clampr(m_intv + 25.0 * 1.0e-5 * ev, 100.0);
        irn = clampr(0.4 * ev + m_intv, 100.0);
        ed  = -xid;
        eq  = -m_iref - xiq;
        m_vd = xud + 1.884 * xiq - (19.0 * ed + m_intd);
        m_vq = xuq - 1.884 * xid - (19.0 * eq + m_intq);
        m_intd += 1600.0 * 1.0e-5 * ed;
        m_intq += 1600.0 * 1.0e-5 * eq;
        m_intv = ivn;
        m_iref = irn;
        m_lim  = (irn >= 100.0 || irn <= -100.0);
      end
      @(posedge clk); #1;
      checks += 4;
      if (!near(r(i_ref), m_iref, 0.01)) begin
        failures++;
        if (failures < 10) $display("n=%0d i_ref %f expected %f", n, r(i_ref), m_iref);
      end
      if (!near(r(vd_ref), m_vd, 0.2)) begin
        failures++;
        if (failures < 10) $display("n=%0d vd* %f expected %f", n, r(vd_ref), m_vd);
      end
      if (!near(r(vq_ref), m_vq, 0.2)) begin
        failures++;
        if (failures < 10) $display("n=%0d vq* %f expected %f", n, r(vq_ref), m_vq);
      end
      if (i_limit != m_lim) begin
        failures++;
        if (failures < 10) $display("n=%0d i_limit %b expected %b", n, i_limit, m_lim);
      end
      if (i_limit) limits++;
    end
    checks++;
    if (limits == 0) begin
      failures++;
      $display("current clamp never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
