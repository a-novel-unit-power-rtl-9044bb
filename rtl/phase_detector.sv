// Digital phase detector of the three-phase PLL.
//
// Four sampling registers capture U_alpha, U_beta (from the Clarke block) and
// cos(theta), sin(theta) (fed back from the DDS) on a cycle where both ce and
// the sampling pulse en are high. Two pipelined multipliers with MULT_LAT = 4
// stages (the z^-4 of the original Mult blocks) form U_alpha*cos and
// U_beta*sin, and a subtractor gives the phase error
//   ud = U_alpha*cos(theta) - U_beta*sin(theta) = Um*sin(phi - theta),
// which is about Um*(phi - theta) near lock. The register, multiplier and
// subtractor structure follows the original diagram; the routing of cos to the
// U_alpha product and sin to the U_beta product follows the phase-detector
// equation. The multiplier pipeline advances on every ce, so ud settles
// MULT_LAT+1 ce-cycles after a sampling pulse and then holds until the next.
module phase_detector
  import fx_pkg::*;
#(
  parameter int MULT_LAT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic en,        // sampling pulse from the sampling synchronizer
  input  fx_t  u_alpha,
  input  fx_t  u_beta,
  input  fx_t  sin_theta,
  input  fx_t  cos_theta,
  output fx_t  ud         // phase error (Q16.16, volts of the alpha/beta frame)
);
  fx_t ra, rb, rs, rc;                       // Register .. Register3
  fx_t pa [MULT_LAT];                        // Mult  pipeline
  fx_t pb [MULT_LAT];                        // Mult1 pipeline

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; rs <= '0; rc <= '0;
    end else if (ce && en) begin
      ra <= u_alpha;
      rb <= u_beta;
      rc <= cos_theta;
      rs <= sin_theta;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MULT_LAT; i++) begin
        pa[i] <= '0;
        pb[i] <= '0;
      end
    end else if (ce) begin
      pa[0] <= fx_mul(ra, rc);
      pb[0] <= fx_mul(rb, rs);
      for (int i = 1; i < MULT_LAT; i++) begin
        pa[i] <= pa[i-1];
        pb[i] <= pb[i-1];
      end
    end
  end

  assign ud = pa[MULT_LAT-1] - pb[MULT_LAT-1];
endmodule
