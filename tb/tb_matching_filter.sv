// tb_matching_filter: feeds a merged hit stream (timestamps near the current
// coarse time, up to three cycles out of order) and trigger timestamps into
// the matching filter, with random back-pressure on the output. For every
// trigger the reference is the set of hits sent with
//   (t - (trigger - offset)) mod 2^20 < width,
// reported as t - trigger + offset; the event's words are compared with it
// as a sorted list, and the end-of-event word must carry the event number.
// Counts windows with several hits of one channel (multi-hit), hits
// rejected outside a window, overlapping windows and queued triggers, and
// fails if any of them never happened. Also checks that no event is
// reported before its window has closed.
module tb_matching_filter;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_pkg::*;

  localparam int OFFSET = 200, WIDTH = 300, N_TRIG = 60;

  logic clk = 1'b0, rst;
  logic hit_valid, trig_valid, out_valid, out_ready;
  hit_word_t hit_word;
  out_word_t out_word;
  logic [TIME_W-1:0] trig_time;
  logic [COARSE_W-1:0] now_coarse;
  int checks = 0, failures = 0;

  matching_filter dut (.clk(clk), .rst(rst), .hit_valid(hit_valid), .hit_word(hit_word),
    .trig_valid(trig_valid), .trig_time(trig_time), .now_coarse(now_coarse),
    .win_offset(TIME_W'(OFFSET)), .win_width(TIME_W'(WIDTH)),
    .out_valid(out_valid), .out_ready(out_ready), .out_word(out_word));

  always #2.5 clk = ~clk;
  always_ff @(posedge clk) now_coarse <= rst ? '0 : now_coarse + 1'b1;

  hit_word_t sent[$];
  int unsigned trigs[$];
  int unsigned got[$];
  int n_events = 0, n_multi = 0, n_reject = 0, n_overlap = 0, n_queued = 0, stimulus_done = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired after %0d events", n_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned key(input logic [CH_W-1:0] ch, input logic tr, input int unsigned v);
    return (int'(ch) << 22) | (int'(tr) << 21) | v;
  endfunction

  // stimulus
  initial begin
    int next_trig, last_trig_cycle;
    rst = 1'b1; hit_valid = 0; trig_valid = 0; hit_word = '0; trig_time = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    next_trig = 80;
    last_trig_cycle = -1000;
    for (int k = 0; trigs.size() < N_TRIG; k++) begin
      @(negedge clk);
      hit_valid = ($urandom_range(0, 99) < 30);
      if (hit_valid) begin
        hit_word.ch       = CH_W'($urandom_range(0, 3) + 8);
        hit_word.trailing = 1'($urandom_range(0, 1));
        hit_word.t        = TIME_W'(16 * (int'(now_coarse) - int'($urandom_range(0, 3))) + int'($urandom_range(0, 15)));
        sent.push_back(hit_word);
      end
      trig_valid = (k == next_trig);
      if (trig_valid) begin
        trig_time = TIME_W'(16 * int'(now_coarse) + int'($urandom_range(0, 15)));
        trigs.push_back(int'(trig_time));
        if (trigs.size() - n_events >= 2) n_queued++;
        if (k - last_trig_cycle < (OFFSET + WIDTH) / 16) n_overlap++;
        last_trig_cycle = k;
        // mostly spaced out, sometimes close together
        next_trig = k + (($urandom_range(0, 2) == 0) ? int'($urandom_range(5, 20)) : int'($urandom_range(60, 200)));
      end
    end
    @(negedge clk);
    hit_valid = 0; trig_valid = 0;
    stimulus_done = 1;
  end

  // output side
  initial begin
    int unsigned tt, ws, rel;
    int unsigned expected[$];
    int per_ch[int];
    out_ready = 1'b0;
    @(negedge clk);
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 99) < 70);
      if (out_valid && out_ready) begin
        if (!out_word.is_end) begin
          got.push_back(key(out_word.ch, out_word.trailing, int'(out_word.value)));
        end else begin
          // build the reference for this event
          tt = trigs[n_events];
          ws = (tt - OFFSET) % (1 << TIME_W);
          expected.delete();
          per_ch.delete();
          foreach (sent[i]) begin
            rel = (int'(sent[i].t) - ws) % (1 << TIME_W);
            if (rel < WIDTH) begin
              expected.push_back(key(sent[i].ch, sent[i].trailing, rel));
              per_ch[int'(sent[i].ch)]++;
            end else if (rel < 4 * WIDTH || rel > (1 << TIME_W) - 4 * WIDTH) begin
              n_reject++;
            end
          end
          foreach (per_ch[c]) if (per_ch[c] > 1) n_multi++;
          // the window must have closed before the event is reported
          checks++;
          if (((int'(now_coarse) * 16 - int'(ws) - WIDTH) & ((1 << TIME_W) - 1)) >= (1 << (TIME_W - 1))) begin
            failures++;
            $display("event %0d reported before its window closed", n_events);
          end
          expected.sort();
          got.sort();
          checks++;
          if (expected != got) begin
            failures++;
            $display("event %0d: %0d words, expected %0d", n_events, got.size(), expected.size());
          end
          checks++;
          if (out_word.value !== TIME_W'(n_events)) begin
            failures++;
            $display("event %0d: end word carries %0d", n_events, out_word.value);
          end
          got.delete();
          n_events++;
          if (n_events == N_TRIG) begin
            $display("events %0d multi-hit %0d rejected %0d overlapping %0d queued %0d",
                     n_events, n_multi, n_reject, n_overlap, n_queued);
            checks++;
            if (n_multi == 0 || n_reject == 0 || n_overlap == 0 || n_queued == 0) begin
              failures++;
              $display("a mechanism was never exercised");
            end
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end
endmodule
