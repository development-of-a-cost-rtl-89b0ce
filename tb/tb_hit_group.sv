// tb_hit_group: one group of eight channels (group 0) with its two matching
// filters, 200 MHz phase clocks, leading and trailing edges. The trigger
// timestamp comes from a leading-edge-only TDC channel; the shared
// environment drives the hits and the trigger and checks both filters'
// events against its reference model.
module tb_hit_group;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  logic [7:0]        clk_ph;
  logic              rst, trigger, trig_valid;
  logic [7:0]        hit;
  logic [TIME_W-1:0] win_offset, win_width;
  logic [1:0]        out_valid, out_ready;
  bit                done;
  int                checks, failures;
  out_word_t [1:0]   out_word;
  hit_word_t         trig_word;

  mmcm_model #(.PERIOD_NS(5.0)) u_clk (.clk_ph(clk_ph));

  tdc_channel #(.TRAILING(1'b0)) u_trig (
    .clk_ph(clk_ph), .rst(rst), .hit(trigger), .valid(trig_valid), .word(trig_word));

  hit_group #(.GROUP_ID(0)) dut (
    .clk_ph(clk_ph), .rst(rst), .hit(hit),
    .trig_valid(trig_valid), .trig_time(trig_word.t),
    .win_offset(win_offset), .win_width(win_width),
    .out_valid(out_valid), .out_ready(out_ready), .out_word(out_word));

  tdc64_env #(.PERIOD_NS(5.0), .TRAILING(1'b1), .N_GROUPS(1), .N_TRIG(16)) u_env (
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
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
