// tdc64_top: 64-channel multi-phase clock TDC with trigger matching.
//
// Every hit input has a TDC channel that timestamps its leading edge and,
// with TRAILING = 1 (the 312.5 ps LSB configuration), its trailing edge, in
// units of 1/16 of the coarse clock period: a coarse clock counter plus the
// position of the edge among 16 clock phases. One more channel timestamps
// the leading edge of the trigger input. The 64 hit channels form
// N_GROUPS = 8 groups; in each, two matching filters each serve four
// channels, so there are 16 filters. Each filter reports, per trigger, the
// hits in the window [trigger - win_offset, trigger - win_offset +
// win_width) as hit - trigger + win_offset, then an end-of-event word.
//
// Clocks: clk_ph[7:0] are eight copies of the coarse clock (200 MHz for
// 312.5 ps LSB, 500 MHz for 125 ps LSB) shifted by 0, 22.5, ..., 157.5
// degrees, as a clock manager provides them; clk_ph[0] runs all logic
// except the fine sampling flip-flops. rst is synchronous to clk_ph[0].
// Hit and trigger pulses must last, high and low, more than three coarse
// periods. The 16 output streams (valid, ready, word) go to the readout
// link, which is not part of this RTL; win_offset and win_width are
// configuration inputs and must be held stable while triggers are pending.
//
// From the document: 64 hit channels plus one trigger channel, leading and
// trailing edge units, the 16-phase fine timing, 8 groups of 8 channels
// with 2 matching filters, data relative to the window start. This
// design's choices: the timestamp width, the buffers, the output word and
// the registered trigger distribution (one cycle).
module tdc64_top
  import tdc_pkg::*;
#(
  parameter int unsigned N_GROUPS        = 8,
  parameter bit          TRAILING        = 1'b1,
  parameter int unsigned FINE_ALIGN      = 26,
  parameter int unsigned CH_FIFO_DEPTH   = 16,
  parameter int unsigned RING_DEPTH      = 4096,
  parameter int unsigned TRIG_FIFO_DEPTH = 16
) (
  input  logic [N_PHASE_CLK-1:0]   clk_ph,
  input  logic                     rst,
  input  logic [8*N_GROUPS-1:0]    hit,
  input  logic                     trigger,
  input  logic [TIME_W-1:0]        win_offset,
  input  logic [TIME_W-1:0]        win_width,
  output logic [2*N_GROUPS-1:0]    out_valid,
  input  logic [2*N_GROUPS-1:0]    out_ready,
  output out_word_t [2*N_GROUPS-1:0] out_word
);

  logic clk;
  assign clk = clk_ph[0];

  // trigger TDC: leading edge only
  // only the time field of the trigger word is used
  logic      trig_ch_valid;
  hit_word_t trig_ch_word;
  tdc_channel #(.TRAILING(1'b0), .CH_ID(0), .FINE_ALIGN(FINE_ALIGN)) u_trig (
    .clk_ph(clk_ph), .rst(rst), .hit(trigger), .valid(trig_ch_valid), .word(trig_ch_word));

  // registered broadcast of the trigger timestamp to all matching filters
  logic              trig_valid;
  logic [TIME_W-1:0] trig_time;
  always_ff @(posedge clk) begin
    if (rst) begin
      trig_valid <= 1'b0;
      trig_time  <= '0;
    end else begin
      trig_valid <= trig_ch_valid;
      trig_time  <= trig_ch_word.t;
    end
  end

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_group
    hit_group #(
      .GROUP_ID(g), .TRAILING(TRAILING), .FINE_ALIGN(FINE_ALIGN),
      .CH_FIFO_DEPTH(CH_FIFO_DEPTH), .RING_DEPTH(RING_DEPTH), .TRIG_FIFO_DEPTH(TRIG_FIFO_DEPTH)
    ) u_group (
      .clk_ph(clk_ph), .rst(rst), .hit(hit[8*g +: 8]),
      .trig_valid(trig_valid), .trig_time(trig_time),
      .win_offset(win_offset), .win_width(win_width),
      .out_valid(out_valid[2*g +: 2]), .out_ready(out_ready[2*g +: 2]), .out_word(out_word[2*g +: 2]));
  end

endmodule
