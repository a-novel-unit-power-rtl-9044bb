// dq -> alpha/beta (inverse Park) transformation of the voltage references.
//
// Inverse of the rotation in abc_dq:
//   alpha = d*cos(theta) - q*sin(theta)
//   beta  = -d*sin(theta) - q*cos(theta)
// so that abc_dq's rotation applied to (alpha, beta) gives back (d, q). It
// turns the controller's ud*, uq* into the ualpha, ubeta the SVPWM takes.
//
// Timing: one register stage advancing on ce.
module dq_alphabeta
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  fx_t  d,
  input  fx_t  q,
  input  fx_t  sin_theta,
  input  fx_t  cos_theta,
  output fx_t  alpha,
  output fx_t  beta
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha <= '0;
      beta  <= '0;
    end else if (ce) begin
      alpha <= fx_mul(d, cos_theta) - fx_mul(q, sin_theta);
      beta  <= -(fx_mul(d, sin_theta) + fx_mul(q, cos_theta));
    end
  end
endmodule
