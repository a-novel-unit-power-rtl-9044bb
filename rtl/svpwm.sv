// Space vector PWM for the three-phase full bridge.
//
// Takes the converter voltage reference (alpha, beta, volts, Q16.16) and
// drives the six IGBTs T1..T6 (T1/T4 leg A, T3/T6 leg B, T5/T2 leg C, upper/
// lower). It uses the carrier-based form of SVPWM: the reference is split into
// phase voltages (with this design's beta = (c - b)/sqrt(3) convention)
//   va = alpha, vb = -alpha/2 - (sqrt3/2)*beta, vc = -alpha/2 + (sqrt3/2)*beta,
// the common-mode term -(max + min)/2 is added, which centres the active
// vectors and splits the zero-vector time equally between 000 and 111 as
// symmetric SVPWM does, and each leg is compared with a triangular carrier.
// The sector (1..6) is the ordering of the three phase voltages, i.e. the 60
// degree sector of the space vector. Duty cycles are normalised to the DC
// voltage UDC_NOM, clipped to [0, 1] (over-modulation saturates), and are
// loaded at the start of each carrier period. The original names SVPWM but gives
// no carrier frequency, normalisation or dead time; the carrier form, the
// 600 V normalisation and no dead time (lower gate = not upper gate) are
// this design's choices.
//
// Timing: the carrier counts 0..PWM_HALF..0 on every clk (period 2*PWM_HALF
// clocks); a leg's upper switch is on while the carrier is below its compare
// value. sector and the compare values update at carrier zero.
module svpwm
  import fx_pkg::*;
#(
  parameter int  PWM_HALF = 500,
  parameter real UDC_NOM  = 600.0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fx_t        alpha,
  input  fx_t        beta,
  output logic [5:0] gate,        // gate[k-1] drives T_k
  output logic [2:0] sector,
  output logic       period_start
);
  localparam int  CW     = $clog2(PWM_HALF + 1);
  localparam fx_t C_S3_2 = to_fx(0.8660254);
  localparam fx_t C_HALF = to_fx(0.5);
  localparam fx_t C_NORM = to_fx(real'(PWM_HALF) / UDC_NOM);
  localparam fx_t C_MID  = fx_t'(PWM_HALF) <<< (FRAC - 1);     // PWM_HALF/2

  logic [CW-1:0] cnt, cmp_a, cmp_b, cmp_c;
  logic          down;
  fx_t           va, vb, vc, vmax, vmin, vz;
  logic [2:0]    sec_n;

  function automatic logic [CW-1:0] to_cmp(input fx_t v);
    fx_t x;
    x = C_MID + fx_mul(v, C_NORM);
    if (x < 0) return '0;
    if ((x >>> FRAC) >= fx_t'(PWM_HALF)) return CW'(PWM_HALF);
    return CW'(x >>> FRAC);
  endfunction

  always_comb begin
    va = alpha;
    vb = -fx_mul(alpha, C_HALF) - fx_mul(beta, C_S3_2);
    vc = -fx_mul(alpha, C_HALF) + fx_mul(beta, C_S3_2);
    vmax = (va >= vb) ? ((va >= vc) ? va : vc) : ((vb >= vc) ? vb : vc);
    vmin = (va <= vb) ? ((va <= vc) ? va : vc) : ((vb <= vc) ? vb : vc);
    vz   = -((vmax + vmin) >>> 1);
    if      (va >= vb && vb >= vc) sec_n = 3'd1;
    else if (vb >= va && va >= vc) sec_n = 3'd2;
    else if (vb >= vc && vc >= va) sec_n = 3'd3;
    else if (vc >= vb && vb >= va) sec_n = 3'd4;
    else if (vc >= va && va >= vb) sec_n = 3'd5;
    else                           sec_n = 3'd6;
  end

  assign period_start = (cnt == '0) && !down;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      down   <= 1'b0;
      cmp_a  <= CW'(PWM_HALF / 2);
      cmp_b  <= CW'(PWM_HALF / 2);
      cmp_c  <= CW'(PWM_HALF / 2);
      sector <= 3'd1;
    end else begin
      if (!down) begin
        if (cnt == CW'(PWM_HALF - 1)) down <= 1'b1;
        cnt <= cnt + 1'b1;
      end else begin
        if (cnt == CW'(1)) down <= 1'b0;
        cnt <= cnt - 1'b1;
      end
      if (period_start) begin
        cmp_a  <= to_cmp(va + vz);
        cmp_b  <= to_cmp(vb + vz);
        cmp_c  <= to_cmp(vc + vz);
        sector <= sec_n;
      end
    end
  end

  always_comb begin
    gate[0] = cnt < cmp_a;    // T1, leg A upper
    gate[3] = !gate[0];       // T4, leg A lower
    gate[2] = cnt < cmp_b;    // T3, leg B upper
    gate[5] = !gate[2];       // T6, leg B lower
    gate[4] = cnt < cmp_c;    // T5, leg C upper
    gate[1] = !gate[4];       // T2, leg C lower
  end
endmodule
