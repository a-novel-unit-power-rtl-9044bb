// All-digital controller of a three-phase voltage-source SVPWM rectifier that
// runs at unit power factor by aligning its current with the grid voltage
// phase found by a three-phase digital PLL.
//
// Signal flow: the sampled grid voltages go to the TDPLL, which returns
// sin/cos of the grid phase. Two abc->dq transforms turn the voltages and the
// inductor currents into ud/uq and id/iq. The double closed-loop decoupling
// controller (dbc) regulates the DC-link voltage and the dq currents and
// produces the converter voltage references ud*/uq*, which the inverse
// transform (dq_alphabeta) returns to alpha/beta for the SVPWM modulator that
// drives T1..T6. The grid-side digital filters are not included: samples enter
// the transforms directly, as in the control model this design follows.
//
// Clocking: one clock clk. The control path advances on a clock enable, one
// clk in CE_DIV (100 kHz with the assumed 10 MHz clk and CE_DIV = 100), the
// PLL's sample rate; the PWM carrier counts on every clk (10 kHz by default).
// Sample formats (this design's choice): va..vc, ia..ic are 16-bit signed
// with full scale 400 V / 400 A; udc is 16-bit signed with full scale
// UDC_FS volts. Samples are taken on cycles where ce is high.
module rectifier_ctrl
  import fx_pkg::*;
#(
  parameter real F_CLK    = 10.0e6,
  parameter int  CE_DIV   = 100,
  parameter int  PWM_HALF = 500,
  parameter real UDC_FS   = 1000.0,
  parameter real UDC_REF  = 600.0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] va,
  input  logic signed [15:0] vb,
  input  logic signed [15:0] vc,
  input  logic signed [15:0] ia,
  input  logic signed [15:0] ib,
  input  logic signed [15:0] ic,
  input  logic signed [15:0] udc,
  output logic [5:0]         gate,        // gate[k-1] drives T_k
  output logic               ce,          // control sample strobe
  output fx_t                sin_theta,
  output fx_t                cos_theta,
  output fx_t                pll_err,     // PLL phase-detector output
  output logic               pll_sync,    // PLL sampling pulse
  output logic [31:0]        pll_theta,   // PLL phase, 2^32 = one turn
  output fx_t                pll_freq,    // PLL frequency word
  output fx_t                pll_integ,   // PLL loop-filter integrator
  output fx_t                u_d,
  output fx_t                u_q,
  output fx_t                i_d,
  output fx_t                i_q,
  output fx_t                i_ref,
  output logic               i_limit,
  output logic [2:0]         sector,
  output logic               pwm_start
);
  localparam int  DW    = $clog2(CE_DIV);
  localparam fx_t C_UDC = to_fx(UDC_FS);

  logic [DW-1:0] div;
  fx_t           udc_fx, vd_ref, vq_ref, v_alpha, v_beta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (div == DW'(CE_DIV - 1)) ? '0 : div + 1'b1;
  end
  assign ce = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  udc_fx <= '0;
    else if (ce) udc_fx <= fx_mul(fx_t'(udc) <<< 1, C_UDC);
  end

  tdpll u_pll (
    .clk, .rst_n, .ce, .ua(va), .ub(vb), .uc(vc),
    .sin_theta, .cos_theta, .theta(pll_theta), .ud(pll_err), .freq_word(pll_freq), .lf_acc(pll_integ),
    .sync_pulse(pll_sync)
  );

  abc_dq u_vdq (
    .clk, .rst_n, .ce, .a(va), .b(vb), .c(vc), .sin_theta, .cos_theta,
    .d(u_d), .q(u_q)
  );

  abc_dq u_idq (
    .clk, .rst_n, .ce, .a(ia), .b(ib), .c(ic), .sin_theta, .cos_theta,
    .d(i_d), .q(i_q)
  );

  dbc #(.UDC_REF(UDC_REF), .TS(real'(CE_DIV) / F_CLK)) u_dbc (
    .clk, .rst_n, .ce, .ud(u_d), .uq(u_q), .id(i_d), .iq(i_q), .udc(udc_fx),
    .vd_ref, .vq_ref, .i_ref, .i_limit
  );

  dq_alphabeta u_idq_inv (
    .clk, .rst_n, .ce, .d(vd_ref), .q(vq_ref), .sin_theta, .cos_theta,
    .alpha(v_alpha), .beta(v_beta)
  );

  svpwm #(.PWM_HALF(PWM_HALF), .UDC_NOM(UDC_REF)) u_svpwm (
    .clk, .rst_n, .alpha(v_alpha), .beta(v_beta),
    .gate, .sector, .period_start(pwm_start)
  );
endmodule
