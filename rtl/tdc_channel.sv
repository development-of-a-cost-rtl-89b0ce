// tdc_channel: one TDC channel (leading edge and, optionally, trailing edge).
//
// The channel owns a copy of the coarse counter, whose LSB drives the D
// inputs of its fine timing units. The leading-edge unit is enabled by the
// inverted hit and freezes at the rising edge; the trailing-edge unit
// (TRAILING = 1) is enabled by the hit and freezes at the falling edge.
// The hit is also passed through a two-flip-flop synchroniser into the
// coarse clock domain (clk_ph[0]); one cycle after the synchronised level
// changes, the frozen pattern of the matching unit and the coarse count are
// registered together (the "copy of the coarse counter" latched by the hit).
// One cycle later the pattern has been encoded, aligned with the coarse
// count and is presented as a timestamp word with a one-cycle valid pulse.
//
// Timing: a hit edge during coarse cycle n (counter value n) gives its
// word at the end of cycle n+4. The captured pattern is only valid while the
// unit is still frozen, so a hit must stay high, and then low, for more
// than three coarse periods (15 ns at 200 MHz). The timestamp is
// 16 * n + phase + FINE_ALIGN (a constant offset shared by every channel).
//
// From the document: leading and trailing fine units per channel, the
// latched counter copy, the register for coarse + fine data. This design's
// choices: the synchroniser depth, the pipeline and the minimum pulse width.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter bit          TRAILING   = 1'b1,
  parameter int unsigned CH_ID      = 0,
  parameter int unsigned FINE_ALIGN = 26
) (
  input  logic [N_PHASE_CLK-1:0] clk_ph,
  input  logic                   rst,     // synchronous to clk_ph[0]
  input  logic                   hit,
  output logic                   valid,
  output hit_word_t              word
);

  logic clk;
  assign clk = clk_ph[0];

  logic [COARSE_W-1:0] count;
  coarse_counter #(.W(COARSE_W)) u_count (.clk(clk), .rst(rst), .count(count));

  logic [N_PHASE-1:0] q_lead, q_trail;
  fine_timing_unit u_lead (.clk_ph(clk_ph), .d_toggle(count[0]), .ce(~hit), .q(q_lead));

  if (TRAILING) begin : g_trail
    fine_timing_unit u_trail (.clk_ph(clk_ph), .d_toggle(count[0]), .ce(hit), .q(q_trail));
  end else begin : g_no_trail
    assign q_trail = '0;
  end

  // hit synchroniser and edge detection
  logic [2:0] hit_s;
  always_ff @(posedge clk) begin
    if (rst) hit_s <= '0;
    else     hit_s <= {hit_s[1:0], hit};
  end
  logic rise, fall;
  assign rise = hit_s[1] & ~hit_s[2];
  assign fall = ~hit_s[1] & hit_s[2] & TRAILING;

  // stage 1: latch coarse count and frozen pattern
  logic                cap_valid, cap_trailing;
  logic [COARSE_W-1:0] cap_coarse;
  logic [N_PHASE-1:0]  cap_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      cap_valid    <= 1'b0;
      cap_trailing <= 1'b0;
      cap_coarse   <= '0;
      cap_q        <= '0;
    end else begin
      cap_valid    <= rise | fall;
      cap_trailing <= fall;
      cap_coarse   <= count;
      cap_q        <= fall ? q_trail : q_lead;
    end
  end

  // stage 2: encode, align with the coarse count, register the word
  logic [FINE_W:0]   code;
  logic [TIME_W-1:0] t;
  fine_encoder u_enc (.q(cap_q), .code(code));
  coarse_fine_align #(.FINE_ALIGN(FINE_ALIGN), .TW(TIME_W)) u_align (
    .coarse(cap_coarse), .fine_code(code), .t(t));

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      word  <= '0;
    end else begin
      valid         <= cap_valid;
      word.ch       <= CH_W'(CH_ID);
      word.trailing <= cap_trailing;
      word.t        <= t;
    end
  end

endmodule
