// abc -> dq (Park) transformation driven by the PLL's sin/cos.
//
// Used twice in the controller: for the grid voltages (ud, uq) and for the
// inductor currents (id, iq). A Clarke stage (the same gain-400 transform the
// PLL uses) gives alpha/beta, then
//   d =  alpha*cos(theta) - beta*sin(theta)  =  Um*sin(phi - theta)
//   q = -(alpha*sin(theta) + beta*cos(theta)) = -Um*cos(phi - theta)
// which is the dq convention of the original design: at lock the voltage
// vector lies on the negative q axis. The rotation is registered.
//
// Timing: two register stages (Clarke, rotation), both advancing on ce.
module abc_dq
  import fx_pkg::*;
#(
  parameter real IN_GAIN = 400.0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  input  logic signed [15:0] c,
  input  fx_t                sin_theta,
  input  fx_t                cos_theta,
  output fx_t                d,
  output fx_t                q
);
  fx_t alpha, beta;

  clarke #(.IN_GAIN(IN_GAIN)) u_clarke (
    .clk, .rst_n, .ce, .ua(a), .ub(b), .uc(c), .u_alpha(alpha), .u_beta(beta)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0;
      q <= '0;
    end else if (ce) begin
      d <= fx_mul(alpha, cos_theta) - fx_mul(beta, sin_theta);
      q <= -(fx_mul(alpha, sin_theta) + fx_mul(beta, cos_theta));
    end
  end
endmodule
