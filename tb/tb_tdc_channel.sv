// tb_tdc_channel: a TDC channel with leading and trailing units at 200 MHz
// (312.5 ps LSB). Pulses start and end at chosen phases of chosen coarse
// cycles; for an edge in the cycle where the channel's coarse counter reads
// n, at m phase steps (plus a fraction) after the phase-0 edge, the
// expected timestamp is 16*n + m + 26 (the alignment constant). Checks the
// word, the edge flag, the channel number and the latency of four coarse
// cycles from the edge to the valid pulse.
module tb_tdc_channel;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  localparam real T    = 5.0;
  localparam real STEP = T / 16.0;

  logic [7:0] clk_ph;
  logic       rst, hit;
  logic       valid;
  hit_word_t  word;
  int checks = 0, failures = 0;
  int n_lead = 0, n_trail = 0;
  int unsigned tb_count;   // mirror of the channel's coarse counter

  always @(posedge clk_ph[0]) tb_count <= rst ? 0 : (tb_count + 1) % (1 << COARSE_W);

  mmcm_model #(.PERIOD_NS(T)) u_clk (.clk_ph(clk_ph));
  tdc_channel #(.TRAILING(1'b1), .CH_ID(37)) dut (
    .clk_ph(clk_ph), .rst(rst), .hit(hit), .valid(valid), .word(word));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // place an edge m phase steps into the next coarse cycle and check its word
  task automatic edge_at(input int m, input logic level, input int hold_cycles);
    int unsigned n, exp_t;
    @(posedge clk_ph[0]);
    #(m * STEP + 0.15);
    n = tb_count;
    hit = level;
    exp_t = (16 * n + m + 26) % (1 << TIME_W);
    for (int c = 1; c <= 4; c++) begin
      @(posedge clk_ph[0]);
      #0.05;
      checks++;
      if (valid !== (c == 4)) begin
        failures++;
        $display("edge m=%0d level=%0d: valid=%0d after %0d cycles", m, level, valid, c);
      end
    end
    checks++;
    if (word.t !== TIME_W'(exp_t) || word.trailing !== ~level || word.ch !== 6'd37) begin
      failures++;
      $display("edge m=%0d level=%0d n=%0d: t=%0d tr=%0d ch=%0d, expected t=%0d", m, level, n,
               word.t, word.trailing, word.ch, exp_t);
    end
    if (level) n_lead++; else n_trail++;
    repeat (hold_cycles) @(posedge clk_ph[0]);
  endtask

  initial begin
    hit = 1'b0;
    rst = 1'b1;
    repeat (4) @(posedge clk_ph[0]);
    #0.5 rst = 1'b0;
    repeat (3) @(posedge clk_ph[0]);
    for (int k = 0; k < 48; k++) begin
      edge_at(k % 16, 1'b1, k % 3);
      edge_at((k * 7 + 3) % 16, 1'b0, (k + 1) % 4);
    end
    checks++;
    if (n_lead != 48 || n_trail != 48) failures++;
    $display("leading %0d trailing %0d", n_lead, n_trail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
