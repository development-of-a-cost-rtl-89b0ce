// tb_tdc64_top_rate: hit-rate stress test of the whole design at default
// parameters. Every one of the 64 channels pulses as fast as a channel
// allows: 4 cycles high, 4 cycles low, i.e. 25 MHz per channel at 200 MHz
// with both edges recorded. Each merged stream then carries one word per
// coarse cycle, its full capacity. Six widely spaced triggers; every word in
// every window must arrive, so a word dropped by a full channel FIFO or
// lost in the merge fails the test.
module tb_tdc64_top_rate;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic [7:0]        clk_ph;
  logic              rst, trigger;
  logic [63:0]       hit;
  logic [TIME_W-1:0] win_offset, win_width;
  logic [15:0]       out_valid, out_ready;
  bit                done;
  int                checks, failures;
  out_word_t [15:0]  out_word;

  mmcm_model #(.PERIOD_NS(5.0)) u_clk (.clk_ph(clk_ph));

  tdc64_top dut (
    .clk_ph(clk_ph), .rst(rst), .hit(hit), .trigger(trigger),
    .win_offset(win_offset), .win_width(win_width),
    .out_valid(out_valid), .out_ready(out_ready), .out_word(out_word));

  tdc64_env #(.PERIOD_NS(5.0), .TRAILING(1'b1), .N_GROUPS(8), .N_TRIG(6),
              .GAP_MIN(3), .GAP_MAX(3), .HIGH_MIN(3), .HIGH_MAX(3),
              .TGAP_MIN(2500), .TGAP_MAX(3000)) u_env (
    .clk_ph(clk_ph), .rst(rst), .hit(hit), .trigger(trigger),
    .win_offset(win_offset), .win_width(win_width),
    .out_valid(out_valid), .out_ready(out_ready), .out_word(out_word),
    .done(done), .checks(checks), .failures(failures));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // backstop in case the environment itself hangs
  initial begin
    #150000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
