// tb_tdc64_top_codedensity: the two bench measurements of a TDC, with ideal
// clocks, on the whole design at default parameters (312.5 ps LSB).
//
// Part 1, common pulse: the same pulse drives all 64 hit inputs and the
// trigger. Every channel must report exactly one leading word with value
// OFFSET (zero spread; on hardware the spread is set by skew and jitter)
// and one trailing word with OFFSET plus the pulse width in fine LSBs, for
// pulses starting at every one of the 16 phases.
//
// Part 2, code density: hits at random picosecond offsets, uncorrelated
// with the clock, against triggers that always arrive at phase 0. The
// fine bin of each reported leading edge is value mod 16; every bin must
// hold 1/16 of the hits to within 15 % (differential non-linearity), since
// the ideal phases split the period into equal bins.
module tb_tdc64_top_codedensity;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  localparam real T      = 5.0;
  localparam real STEP   = T / 16.0;
  localparam int  OFFSET = 4000;
  localparam int  WIDTH  = 6000;

  logic [7:0]        clk_ph;
  logic              rst, trigger;
  logic [63:0]       hit;
  logic [TIME_W-1:0] win_offset, win_width;
  logic [15:0]       out_valid, out_ready;
  out_word_t [15:0]  out_word;

  mmcm_model #(.PERIOD_NS(T)) u_clk (.clk_ph(clk_ph));

  tdc64_top dut (
    .clk_ph(clk_ph), .rst(rst), .hit(hit), .trigger(trigger),
    .win_offset(win_offset), .win_width(win_width),
    .out_valid(out_valid), .out_ready(out_ready), .out_word(out_word));

  assign win_offset = TIME_W'(OFFSET);
  assign win_width  = TIME_W'(WIDTH);
  assign out_ready  = '1;

  int checks = 0, failures = 0;
  int part = 1;
  int exp_trail;
  int n_lead[64], n_trail[64];
  int events[16];
  int hist[16];
  int n_density = 0;
  bit stop_hits = 0;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect outputs
  always @(negedge clk_ph[0]) begin
    if (!rst) begin
      for (int f = 0; f < 16; f++) begin
        if (out_valid[f]) begin
          if (out_word[f].is_end) begin
            events[f]++;
          end else if (part == 1) begin
            if (!out_word[f].trailing) begin
              n_lead[out_word[f].ch]++;
              checks++;
              if (out_word[f].value !== TIME_W'(OFFSET)) begin
                failures++;
                $display("common pulse: ch %0d leading %0d, expected %0d", out_word[f].ch, out_word[f].value, OFFSET);
              end
            end else begin
              n_trail[out_word[f].ch]++;
              checks++;
              if (out_word[f].value !== TIME_W'(OFFSET + exp_trail)) begin
                failures++;
                $display("common pulse: ch %0d trailing %0d, expected %0d", out_word[f].ch, out_word[f].value, OFFSET + exp_trail);
              end
            end
          end else if (!out_word[f].trailing) begin
            hist[out_word[f].value % 16]++;
            n_density++;
          end
        end
      end
    end
  end

  function automatic int all_events();
    int mn;
    mn = events[0];
    for (int f = 1; f < 16; f++) if (events[f] < mn) mn = events[f];
    return mn;
  endfunction

  // random hits for part 2, one generator per channel
  for (genvar c = 0; c < 64; c++) begin : g_src
    initial begin
      int ps;
      wait (part == 2);
      while (!stop_hits) begin
        repeat ($urandom_range(3, 30)) @(posedge clk_ph[0]);
        // a random picosecond in the period, away from the phase edges
        do ps = int'($urandom_range(0, 4999));
        while ((ps % 625) inside {[311:314], [0:1], [623:624]});
        #(ps * 0.001);
        hit[c] = 1'b1;
        repeat (5) @(posedge clk_ph[0]);
        #0.1;
        hit[c] = 1'b0;
      end
    end
  end

  initial begin
    int m1, m2, w, ok;
    rst = 1'b1;
    hit = '0;
    trigger = 1'b0;
    for (int f = 0; f < 16; f++) events[f] = 0;
    for (int i = 0; i < 16; i++) hist[i] = 0;
    repeat (5) @(posedge clk_ph[0]);
    #0.1 rst = 1'b0;
    repeat (300) @(posedge clk_ph[0]);

    // part 1: common pulse on every hit input and the trigger
    for (int k = 0; k < 16; k++) begin
      for (int c = 0; c < 64; c++) begin n_lead[c] = 0; n_trail[c] = 0; end
      m1 = k;
      m2 = (k * 5 + 3) % 16;
      w  = 4 + k % 3;                       // cycles between the two edges
      exp_trail = 16 * w + m2 - m1;
      @(posedge clk_ph[0]);
      #(m1 * STEP + 0.15);
      hit = '1;
      trigger = 1'b1;
      repeat (w) @(posedge clk_ph[0]);
      #(m2 * STEP + 0.15);
      hit = '0;
      trigger = 1'b0;
      while (all_events() < k + 1) @(posedge clk_ph[0]);
      ok = 1;
      for (int c = 0; c < 64; c++) if (n_lead[c] != 1 || n_trail[c] != 1) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("common pulse %0d: a channel missed its words", k); end
      repeat (400) @(posedge clk_ph[0]);  // keep the next window clear of this pulse
    end

    // part 2: code density
    part = 2;
    repeat (400) @(posedge clk_ph[0]);
    for (int k = 0; k < 12; k++) begin
      @(posedge clk_ph[0]);
      #0.15;
      trigger = 1'b1;
      repeat (5) @(posedge clk_ph[0]);
      trigger = 1'b0;
      repeat ($urandom_range(400, 500)) @(posedge clk_ph[0]);
    end
    stop_hits = 1;
    while (all_events() < 16 + 12) @(posedge clk_ph[0]);
    repeat (10) @(posedge clk_ph[0]);
    $display("code density: %0d leading edges", n_density);
    for (int i = 0; i < 16; i++) begin
      real dnl;
      dnl = real'(hist[i]) * 16.0 / real'(n_density) - 1.0;
      $display("  bin %2d: %0d  DNL %0.3f", i, hist[i], dnl);
      checks++;
      if (dnl > 0.15 || dnl < -0.15) begin failures++; $display("bin %0d outside +-15 %%", i); end
    end
    checks++;
    if (n_density < 5000) begin failures++; $display("too few hits for the code density test"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
