// fine_encoder: 16 frozen phase samples to a 5-bit fine code.
//
// The toggle changes right after the rising edge of phase 0, so the phase-0
// flip-flop always holds the toggle value from before the transition (the
// "old" value) and flip-flops 1..15 hold the new value if their phase came
// before the hit and the old value otherwise. The transition position is
// therefore the number of samples q[15:1] that differ from q[0]; counting
// them instead of searching for the edge makes the code tolerant of
// single-bit bubbles. The polarity of the new toggle value, which is the
// coarse counter LSB of the period the hit fell in, is the inverse of q[0]
// and forms bit 4:
//   code = 16 * ~q[0] + popcount(q[15:1] ^ q[0]).
// The code thus counts the hit time modulo two coarse periods in fine LSBs.
// That a transition pattern and its complement give the same position and
// differ only in a polarity bit worth 16 follows the document; the popcount
// and the choice of q[0] as the reference are this design's own.
// Purely combinational.
module fine_encoder
  import tdc_pkg::*;
(
  input  logic [N_PHASE-1:0] q,
  output logic [FINE_W:0]    code
);

  always_comb begin
    logic [FINE_W:0] pos;
    pos = '0;
    for (int i = 1; i < N_PHASE; i++) begin
      pos = pos + {{FINE_W{1'b0}}, q[i] ^ q[0]};
    end
    code = {~q[0], pos[FINE_W-1:0]};
  end

endmodule
