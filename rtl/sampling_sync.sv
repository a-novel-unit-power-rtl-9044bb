// Sampling synchronizer of the three-phase PLL.
//
// Generates one narrow pulse per period of the DDS sine, at its upward zero
// crossing. As in the original diagram, a registered comparator (sin >= 0,
// z^-1) is followed by a one-sample delay; the xor of the two marks either
// zero crossing and the and with the undelayed comparator output keeps only
// the crossing from negative to non-negative, so the pulse has the period of
// the sine. The pulse (one ce-cycle wide) enables the phase detector's
// sampling registers and the loop filter's accumulator.
//
// Timing: pulse rises on the ce clock edge that registers the first sample
// with sin_theta >= 0 and falls on the next ce edge, so logic enabled by
// ce & pulse acts exactly once per period, one ce after that sample.
module sampling_sync
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  fx_t  sin_theta,
  output logic pulse
);
  logic ge0, ge0_d;   // Relational, Delay1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ge0   <= 1'b1;
      ge0_d <= 1'b1;
    end else if (ce) begin
      ge0   <= (sin_theta >= 0);
      ge0_d <= ge0;
    end
  end

  assign pulse = (ge0 ^ ge0_d) & ge0;
endmodule
