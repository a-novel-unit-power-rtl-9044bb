// abc -> alpha/beta (Clarke) transformation, as drawn for the PLL input.
//
// Each phase sample is first multiplied by IN_GAIN (400), then
//   U_alpha = 0.667 * (a - 0.5*b - 0.5*c)
//   U_beta  = 0.667 * (-0.8662*b + 0.8662*c)
// using the constants of the original block diagram, including its sign
// convention for beta (c - b), which makes U_beta = Um*cos(phi) when the phase-a
// voltage is Um*sin(phi). The inputs are 16-bit signed samples with 15 fraction
// bits (full scale +/-1.0); with the gain of 400 a full-scale sample stands for
// 400 V (or 400 A), and the outputs are Q16.16 in those units. Input format and
// the single output register are this design's choices.
//
// Timing: one register stage; outputs valid one clock after a cycle with ce=1.
module clarke
  import fx_pkg::*;
#(
  parameter real IN_GAIN = 400.0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic signed [15:0] ua,
  input  logic signed [15:0] ub,
  input  logic signed [15:0] uc,
  output fx_t                u_alpha,
  output fx_t                u_beta
);
  localparam fx_t K_IN   = to_fx(IN_GAIN);
  localparam fx_t K_HALF = to_fx(0.5);
  localparam fx_t K_S3   = to_fx(0.8662);
  localparam fx_t K_23   = to_fx(0.667);

  fx_t a_s, b_s, c_s, alpha_c, beta_c;

  always_comb begin
    // sample << 1 puts the Q1.15 value into Q16.16, then the x400 gain
    a_s     = fx_mul(fx_t'(ua) <<< 1, K_IN);
    b_s     = fx_mul(fx_t'(ub) <<< 1, K_IN);
    c_s     = fx_mul(fx_t'(uc) <<< 1, K_IN);
    alpha_c = fx_mul(a_s - fx_mul(b_s, K_HALF) - fx_mul(c_s, K_HALF), K_23);
    beta_c  = fx_mul(fx_mul(c_s, K_S3) - fx_mul(b_s, K_S3), K_23);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_alpha <= '0;
      u_beta  <= '0;
    end else if (ce) begin
      u_alpha <= alpha_c;
      u_beta  <= beta_c;
    end
  end
endmodule
