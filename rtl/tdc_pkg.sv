// tdc_pkg: types and constants shared by the multi-phase clock TDC.
//
// A timestamp is counted in fine LSBs: one fine LSB is 1/16 of the coarse
// clock period (312.5 ps at 200 MHz, 125 ps at 500 MHz). Its upper bits are
// the coarse counter, its lower four bits the position of the hit among the
// 16 clock phases. The 16 phases and the 5-bit fine code (position plus the
// polarity of the toggling coarse LSB) follow the document; the 20-bit
// timestamp width and the word layouts are this design's own choice.
package tdc_pkg;

  localparam int unsigned N_PHASE     = 16;  // sampling phases per coarse period
  localparam int unsigned N_PHASE_CLK = 8;   // phase clocks; the other 8 phases are their inversions
  localparam int unsigned FINE_W      = 4;   // log2(N_PHASE)
  localparam int unsigned TIME_W      = 20;  // timestamp width in fine LSBs
  localparam int unsigned COARSE_W    = TIME_W - FINE_W;
  localparam int unsigned CH_W        = 6;   // 64 channels

  // Timestamp word produced by a channel and carried through the FIFOs.
  typedef struct packed {
    logic [CH_W-1:0]   ch;        // global channel number
    logic              trailing;  // 0: leading edge, 1: trailing edge
    logic [TIME_W-1:0] t;         // time in fine LSBs
  } hit_word_t;

  localparam int unsigned HIT_WORD_W = $bits(hit_word_t);

  // Word leaving a matching filter: either one matched hit or the end of an event.
  typedef struct packed {
    logic              is_end;    // 1: end of event, value holds the event number
    logic [CH_W-1:0]   ch;
    logic              trailing;
    logic [TIME_W-1:0] value;     // hit - trigger + offset, or event number
  } out_word_t;

  localparam int unsigned OUT_WORD_W = $bits(out_word_t);

endpackage
