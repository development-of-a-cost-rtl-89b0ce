// fine_timing_unit: the 16-phase sampling register of one TDC edge.
//
// Sixteen flip-flops sample the same toggling signal d_toggle (the coarse
// counter LSB, a 0101... pattern that changes once per coarse period). Each
// flip-flop is clocked on a different phase: q[i] for i < 8 on the rising
// edge of clk_ph[i] (i * 22.5 degrees), q[i] for i >= 8 on the falling edge of
// clk_ph[i-8] (180 + (i-8) * 22.5 degrees). All share one clock enable. For a
// leading-edge unit the enable is the inverted hit, for a trailing-edge unit
// the hit itself: while the enable is high the register keeps tracking the
// toggle, and at the hit edge it freezes with the toggle transition at the
// position of the hit within the coarse period. The frozen pattern is read
// in the coarse clock domain (clk_ph[0]) some cycles later, while the enable
// is still low.
//
// The structure (16 flip-flops, 8 clocks and their inversions, hit on CE,
// 010101 on D) is the document's. Its precision rests on placement and
// routing that equalise the CE and clock skew, which no RTL can express.
// There is no reset: the register holds no state that outlives a coarse
// period while enabled.
module fine_timing_unit
  import tdc_pkg::*;
(
  input  logic [N_PHASE_CLK-1:0] clk_ph,    // phase clocks, clk_ph[0] = coarse clock
  input  logic                   d_toggle,  // coarse counter LSB
  input  logic                   ce,        // sample while high, freeze while low
  output logic [N_PHASE-1:0]     q          // q[i]: sample taken on phase i
);

  for (genvar i = 0; i < N_PHASE_CLK; i++) begin : g_phase
    logic q_rise, q_fall;
    // phase i * 22.5 deg
    always_ff @(posedge clk_ph[i]) begin
      if (ce) q_rise <= d_toggle;
    end
    // phase 180 + i * 22.5 deg
    always_ff @(negedge clk_ph[i]) begin
      if (ce) q_fall <= d_toggle;
    end
    assign q[i]               = q_rise;
    assign q[i + N_PHASE_CLK] = q_fall;
  end

endmodule
