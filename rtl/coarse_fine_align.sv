// coarse_fine_align: combine a latched coarse count with a fine code.
//
// The fine code counts time modulo 32 fine LSBs (two coarse periods) and is
// exact; the coarse count was latched after a synchroniser and may be late
// by a cycle or so. The fine code is first shifted by the alignment
// constant FINE_ALIGN (modulo 32) so that it lines up with the coarse count
// LSB. The time is then the coarse count times 16 plus the signed 5-bit
// difference (fine - coarse*16) modulo 32, i.e. the value congruent to the
// fine code that lies nearest the coarse estimate. This is the wrap-around
// rule of the alignment plot: a fine bin that would fall outside the coarse
// cycle moves to -1 or 32. Any coarse error within -16..+15 fine LSBs is
// corrected. All timestamps carry the same constant offset, which cancels
// in hit - trigger.
// FINE_ALIGN = 26 is the document's value; the nearest-value rule and the
// widths are this design's. Purely combinational.
module coarse_fine_align
  import tdc_pkg::*;
#(
  parameter int unsigned FINE_ALIGN = 26,
  parameter int unsigned TW         = TIME_W
) (
  input  logic [TW-FINE_W-1:0] coarse,
  input  logic [FINE_W:0]      fine_code,
  output logic [TW-1:0]        t
);

  logic [FINE_W:0] fine_aligned;
  logic [FINE_W:0] diff;
  logic [TW-1:0]   base;

  always_comb begin
    fine_aligned = fine_code + (FINE_W+1)'(FINE_ALIGN);   // modulo 32
    base         = {coarse, {FINE_W{1'b0}}};
    diff         = fine_aligned - base[FINE_W:0];      // modulo 32, read as signed
    t            = base + {{(TW-FINE_W-1){diff[FINE_W]}}, diff};
  end

endmodule
