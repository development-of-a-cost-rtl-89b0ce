// hit_group: eight TDC channels with their FIFOs, mergers and matching filters.
//
// Channels 8*GROUP_ID .. 8*GROUP_ID+7. Each channel writes its timestamp
// words into its own FIFO; the FIFOs of channels 0-3 and of channels 4-7
// are merged, four to one, into two streams, and each stream feeds its own
// matching filter. Both filters receive every trigger timestamp and the
// group's own copy of the coarse count. Output: one valid-ready stream per
// matching filter.
//
// The split into groups of eight channels with two matching filters and
// the four-to-one merge follow the document; the FIFO depth is this
// design's choice.
module hit_group
  import tdc_pkg::*;
#(
  parameter int unsigned GROUP_ID        = 0,
  parameter bit          TRAILING        = 1'b1,
  parameter int unsigned FINE_ALIGN      = 26,
  parameter int unsigned CH_FIFO_DEPTH   = 16,
  parameter int unsigned RING_DEPTH      = 4096,
  parameter int unsigned TRIG_FIFO_DEPTH = 16
) (
  input  logic [N_PHASE_CLK-1:0] clk_ph,
  input  logic                   rst,
  input  logic [7:0]             hit,
  input  logic                   trig_valid,
  input  logic [TIME_W-1:0]      trig_time,
  input  logic [TIME_W-1:0]      win_offset,
  input  logic [TIME_W-1:0]      win_width,
  output logic [1:0]             out_valid,
  input  logic [1:0]             out_ready,
  output out_word_t [1:0]        out_word
);

  logic clk;
  assign clk = clk_ph[0];

  logic [COARSE_W-1:0] now_coarse;
  coarse_counter #(.W(COARSE_W)) u_now (.clk(clk), .rst(rst), .count(now_coarse));

  logic      [7:0] ch_valid, fifo_empty, fifo_full, fifo_pop;
  hit_word_t [7:0] ch_word, fifo_head;

  for (genvar i = 0; i < 8; i++) begin : g_ch
    tdc_channel #(.TRAILING(TRAILING), .CH_ID(GROUP_ID * 8 + i), .FINE_ALIGN(FINE_ALIGN)) u_ch (
      .clk_ph(clk_ph), .rst(rst), .hit(hit[i]), .valid(ch_valid[i]), .word(ch_word[i]));

    sync_fifo #(.W(HIT_WORD_W), .DEPTH(CH_FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst(rst),
      .wr_en(ch_valid[i] && !fifo_full[i]), .din(ch_word[i]),
      .rd_en(fifo_pop[i]), .dout(fifo_head[i]), .empty(fifo_empty[i]), .full(fifo_full[i]));
  end

  for (genvar m = 0; m < 2; m++) begin : g_match
    logic      merged_valid;
    hit_word_t merged_word;

    fifo_merger #(.N_IN(4), .W(HIT_WORD_W)) u_merge (
      .clk(clk), .rst(rst),
      .in_valid(~fifo_empty[4*m +: 4]), .in_data(fifo_head[4*m +: 4]),
      .in_pop(fifo_pop[4*m +: 4]),
      .out_valid(merged_valid), .out_data(merged_word));

    matching_filter #(.RING_DEPTH(RING_DEPTH), .TRIG_FIFO_DEPTH(TRIG_FIFO_DEPTH)) u_filter (
      .clk(clk), .rst(rst),
      .hit_valid(merged_valid), .hit_word(merged_word),
      .trig_valid(trig_valid), .trig_time(trig_time), .now_coarse(now_coarse),
      .win_offset(win_offset), .win_width(win_width),
      .out_valid(out_valid[m]), .out_ready(out_ready[m]), .out_word(out_word[m]));
  end

endmodule
