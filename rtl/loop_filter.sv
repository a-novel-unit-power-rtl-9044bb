// PI loop filter of the three-phase PLL, with the centre-frequency offset.
//
//   f = K_OUT * (KP*e + acc) + F_OFFSET,   acc <= acc + KI*e on each sampling pulse
//
// with KP = 0.2, KI = 0.05, K_OUT = 0.1 and F_OFFSET = 32.768, the gains and
// constant of the original filter. The integrator is an accumulator that only
// adds on a cycle with ce and the sampling pulse en high, so the loop is closed
// once per grid period. f is Q16.16 in "offset-frequency" units: the offset of
// 32.768 is the 50 Hz centre word 5e-4 shifted left by 16 bits, so the DDS,
// which shifts right by 16, runs at 50 Hz when e = 0. The accumulator wraps on
// overflow, like the original accumulator block (saturation is not described).
// Only the accumulator is a register; f follows e and acc combinationally.
module loop_filter
  import fx_pkg::*;
#(
  parameter real KP       = 0.2,
  parameter real KI       = 0.05,
  parameter real K_OUT    = 0.1,
  parameter real F_OFFSET = 32.768
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic en,      // sampling pulse: accumulator enable
  input  fx_t  e,       // phase error from the phase detector
  output fx_t  acc,     // integrator state
  output fx_t  f        // frequency word before the right shift
);
  localparam fx_t C_KP  = to_fx(KP);
  localparam fx_t C_KI  = to_fx(KI);
  localparam fx_t C_OUT = to_fx(K_OUT);
  localparam fx_t C_OFS = to_fx(F_OFFSET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc <= '0;
    else if (ce && en) acc <= acc + fx_mul(e, C_KI);
  end

  assign f = fx_mul(fx_mul(e, C_KP) + acc, C_OUT) + C_OFS;
endmodule
