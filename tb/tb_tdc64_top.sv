// tb_tdc64_top: end-to-end test of the 64-channel TDC with every parameter
// at its default (312.5 ps LSB: 200 MHz phase clocks, leading and trailing
// edges). Random pulses on all 64 hit inputs and 12 triggers; the
// environment checks every event of all 16 matching filters against a
// reference model (see tdc64_env).
module tb_tdc64_top;
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

  tdc64_env #(.PERIOD_NS(5.0), .TRAILING(1'b1), .N_GROUPS(8), .N_TRIG(12)) u_env (
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
    #80000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
