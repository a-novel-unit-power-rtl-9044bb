// Double closed-loop controller with feed-forward decoupling (DBC).
//
// Outer loop: a PI regulator on the DC-link voltage error sets the active
// current amplitude, clamped to +/-I_MAX (the integrator too). In this dq frame
// the grid voltage lies on the negative q axis (uq = -Um at lock), so unit
// power factor means id* = 0 and iq* = -I_ref.
// Inner loops: from the rectifier model in this frame
//   L did/dt = ud + wL*iq - R*id - vd,   L diq/dt = uq - wL*id - R*iq - vq
// the converter voltage references cancel the grid voltage and the cross
// coupling and add a PI current regulator:
//   vd* = ud + wL*iq - PI_i(id* - id),   vq* = uq - wL*id - PI_i(iq* - iq).
// wL = 314 rad/s * 6 mH comes from the original circuit values; the regulator
// gains, the 600 V reference and the clamp are this design's choices (the
// original design names the control strategy but gives no gains). All are
// Q16.16 volts / amperes; integrators use the sample time TS = 1/f_ce.
//
// Timing: one register stage for the current reference, one for the outputs;
// all registers advance on ce.
module dbc
  import fx_pkg::*;
#(
  parameter real UDC_REF = 600.0,
  parameter real KP_V    = 0.4,      // A/V
  parameter real KI_V    = 25.0,     // A/(V s)
  parameter real KP_I    = 19.0,     // V/A
  parameter real KI_I    = 1600.0,   // V/(A s)
  parameter real OMEGA_L = 314.0 * 0.006,
  parameter real I_MAX   = 100.0,
  parameter real TS      = 1.0e-5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  fx_t  ud,
  input  fx_t  uq,
  input  fx_t  id,
  input  fx_t  iq,
  input  fx_t  udc,
  output fx_t  vd_ref,      // ud* of the converter
  output fx_t  vq_ref,      // uq* of the converter
  output fx_t  i_ref,       // active current amplitude from the voltage loop
  output logic i_limit      // voltage-loop output is at the clamp
);
  localparam fx_t C_UREF = to_fx(UDC_REF);
  localparam fx_t C_KPV  = to_fx(KP_V);
  localparam fx_t C_KIV  = to_fx(KI_V * TS * 65536.0);   // extra 16 fraction bits
  localparam fx_t C_KPI  = to_fx(KP_I);
  localparam fx_t C_KII  = to_fx(KI_I * TS);
  localparam fx_t C_WL   = to_fx(OMEGA_L);
  localparam fx_t C_IMAX = to_fx(I_MAX);

  typedef logic signed [W+FRAC-1:0] wide_t;   // Q16.32 integrator
  localparam wide_t WI_MAX = wide_t'(C_IMAX) <<< FRAC;

  wide_t int_v, int_v_n;
  fx_t   ev, iref_n, int_d, int_q, ed, eq;

  function automatic fx_t clamp(input fx_t x, input fx_t lim);
    if (x > lim)  return lim;
    if (x < -lim) return -lim;
    return x;
  endfunction

  always_comb begin
    ev      = C_UREF - udc;
    int_v_n = int_v + wide_t'(fx_mul(ev, C_KIV));
    if (int_v_n > WI_MAX)  int_v_n = WI_MAX;
    if (int_v_n < -WI_MAX) int_v_n = -WI_MAX;
    iref_n  = clamp(fx_mul(ev, C_KPV) + fx_t'(int_v >>> FRAC), C_IMAX);
    ed      = -id;                  // id* = 0
    eq      = -i_ref - iq;          // iq* = -I_ref
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_v   <= '0;
      i_ref   <= '0;
      i_limit <= 1'b0;
      int_d   <= '0;
      int_q   <= '0;
      vd_ref  <= '0;
      vq_ref  <= '0;
    end else if (ce) begin
      int_v   <= int_v_n;
      i_ref   <= iref_n;
      i_limit <= (iref_n == C_IMAX) || (iref_n == -C_IMAX);
      int_d   <= int_d + fx_mul(ed, C_KII);
      int_q   <= int_q + fx_mul(eq, C_KII);
      vd_ref  <= ud + fx_mul(C_WL, iq) - (fx_mul(ed, C_KPI) + int_d);
      vq_ref  <= uq - fx_mul(C_WL, id) - (fx_mul(eq, C_KPI) + int_q);
    end
  end
endmodule
