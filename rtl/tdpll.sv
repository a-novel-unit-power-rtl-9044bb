// Three-phase digital PLL (TDPLL).
//
// Locks the phase theta of an internal DDS to the phase phi of a three-phase
// voltage by driving the d-axis component ud = Um*sin(phi - theta) to zero.
// Loop: Clarke transform -> phase detector (sampling registers, two 4-stage
// multipliers, subtractor) -> PI loop filter plus the 32.768 offset -> DDS
// (shift by 16, 32-bit phase accumulator, sine/cosine table). The sampling
// synchronizer turns each upward zero crossing of the DDS sine into a pulse
// that enables the phase detector's four sampling registers and the filter's
// integrator, so the loop takes one phase measurement per grid period. The
// structure and constants follow the original design; word formats are those
// of fx_pkg.
//
// Interface: ua/ub/uc are 16-bit signed samples, full scale = 400 V. All
// registers advance on clk cycles with ce high; ce must run at F_CLK (100 kHz),
// the sample rate the 50 Hz centre frequency is set for. Outputs: sin/cos of
// theta (Q16.16), theta itself (2^32 = one turn), the phase error ud (Q16.16
// volts), the frequency word, the loop-filter integrator and the sampling
// pulse.
module tdpll
  import fx_pkg::*;
#(
  parameter real IN_GAIN    = 400.0,
  parameter int  MULT_LAT   = 4,
  parameter real KP         = 0.2,
  parameter real KI         = 0.05,
  parameter real K_OUT      = 0.1,
  parameter real F_OFFSET   = 32.768,
  parameter int  PHASE_BITS = 12,
  parameter int  SHIFT      = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic signed [15:0] ua,
  input  logic signed [15:0] ub,
  input  logic signed [15:0] uc,
  output fx_t                sin_theta,
  output fx_t                cos_theta,
  output logic [31:0]        theta,
  output fx_t                ud,
  output fx_t                freq_word,
  output fx_t                lf_acc,
  output logic               sync_pulse
);
  fx_t u_alpha, u_beta;

  clarke #(.IN_GAIN(IN_GAIN)) u_clarke (
    .clk, .rst_n, .ce, .ua, .ub, .uc, .u_alpha, .u_beta
  );

  phase_detector #(.MULT_LAT(MULT_LAT)) u_pd (
    .clk, .rst_n, .ce, .en(sync_pulse),
    .u_alpha, .u_beta, .sin_theta, .cos_theta, .ud
  );

  loop_filter #(.KP(KP), .KI(KI), .K_OUT(K_OUT), .F_OFFSET(F_OFFSET)) u_lf (
    .clk, .rst_n, .ce, .en(sync_pulse), .e(ud), .acc(lf_acc), .f(freq_word)
  );

  dds #(.PHASE_BITS(PHASE_BITS), .SHIFT(SHIFT)) u_dds (
    .clk, .rst_n, .ce, .we(1'b1), .f(freq_word),
    .phase(theta), .sin_theta, .cos_theta
  );

  sampling_sync u_sync (
    .clk, .rst_n, .ce, .sin_theta, .pulse(sync_pulse)
  );
endmodule
