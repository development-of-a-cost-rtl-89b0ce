// tdc64_env: stimulus and reference model for end-to-end tests of the TDC.
//
// Not synthesizable. Drives N_GROUPS*8 hit inputs with pulses at random
// phases (each high and low for at least four coarse periods) and a
// trigger input, records the expected timestamp of every edge
// (16 * n + phase + 26, n being the coarse count of the cycle the edge falls
// in), and checks the 2*N_GROUPS output streams of the matching filters:
// for each filter and trigger, the reported words, as a sorted list, must
// equal the recorded edges of the filter's four channels that fall in
// [trigger - OFFSET, trigger - OFFSET + WIDTH), each as t - trigger + OFFSET,
// and the end-of-event word must carry the event number. Out_ready is
// driven at random. It counts how often each mechanism happened (leading
// and trailing edges, several words merged at once, multi-hit windows,
// hits outside a window, overlapping windows, queued triggers, output
// stalls) and counts a failure for any that never did. Raises done, with
// the final checks and failures, when every filter has reported N_TRIG
// events or when its own watchdog expires; the testbench around it then
// prints the result and ends the simulation.
module tdc64_env
  import tdc_pkg::*;
#(
  parameter real PERIOD_NS = 5.0,
  parameter bit  TRAILING  = 1'b1,
  parameter int  N_GROUPS  = 8,
  parameter int  N_TRIG    = 12,
  parameter int  OFFSET    = 4000,
  parameter int  WIDTH     = 6000,
  parameter int  ALIGN     = 26,
  // pulse shape: cycles low before a pulse and high, each plus one cycle
  parameter int  GAP_MIN   = 3,
  parameter int  GAP_MAX   = 60,
  parameter int  HIGH_MIN  = 3,
  parameter int  HIGH_MAX  = 10,
  // trigger spacing in cycles (every fourth trigger follows closely)
  parameter int  TGAP_MIN  = 150,
  parameter int  TGAP_MAX  = 500
) (
  input  logic [7:0]                clk_ph,
  output logic                      rst,
  output logic [8*N_GROUPS-1:0]     hit,
  output logic                      trigger,
  output logic [TIME_W-1:0]         win_offset,
  output logic [TIME_W-1:0]         win_width,
  input  logic [2*N_GROUPS-1:0]     out_valid,
  output logic [2*N_GROUPS-1:0]     out_ready,
  input  out_word_t [2*N_GROUPS-1:0] out_word,
  output bit                        done,
  output int                        checks,
  output int                        failures
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  N_CH = 8 * N_GROUPS;
  localparam int  N_F  = 2 * N_GROUPS;
  localparam real STEP = PERIOD_NS / 16.0;
  localparam int  TMOD = 1 << TIME_W;

  typedef struct {
    int ch;
    bit trailing;
    int unsigned t;
  } rec_t;

  int unsigned tb_count;        // mirror of the coarse counters
  rec_t recs[$];
  int unsigned trigs[$];
  int events_done[N_F];
  int unsigned got[N_F][$];
  bit stop_hits = 0;
  int n_lead = 0, n_trail = 0, n_merge = 0, n_multi = 0, n_reject = 0;
  int n_overlap = 0, n_queued = 0, n_stall = 0, n_words = 0;

  assign win_offset = TIME_W'(OFFSET);
  assign win_width  = TIME_W'(WIDTH);

  always @(posedge clk_ph[0]) tb_count <= rst ? 0 : (tb_count + 1) % (1 << COARSE_W);

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  initial begin
    #(PERIOD_NS * (N_TRIG * (TGAP_MAX + 200) + 5000));
    failures++;
    $display("watchdog expired");
    done = 1'b1;
  end

  function automatic int unsigned stamp(input int unsigned n, input int m);
    return (16 * n + m + ALIGN) % TMOD;
  endfunction

  function automatic int min_events();
    int mn;
    mn = events_done[0];
    for (int f = 1; f < N_F; f++) if (events_done[f] < mn) mn = events_done[f];
    return mn;
  endfunction

  // wait for the next coarse edge, then move into it by m phase steps
  task automatic at_phase(input int m, output int unsigned n);
    @(posedge clk_ph[0]);
    #(m * STEP + 0.48 * STEP);
    n = tb_count;
  endtask

  initial begin
    rst = 1'b1;
    hit = '0;
    trigger = 1'b0;
    repeat (5) @(posedge clk_ph[0]);
    #(0.5 * STEP) rst = 1'b0;
  end

  // one pulse generator per hit channel
  for (genvar c = 0; c < N_CH; c++) begin : g_src
    initial begin
      int unsigned n;
      int m;
      rec_t r;
      @(negedge rst);
      repeat (10 + c % 7) @(posedge clk_ph[0]);
      while (!stop_hits) begin
        repeat ($urandom_range(GAP_MIN, GAP_MAX)) @(posedge clk_ph[0]);
        m = int'($urandom_range(0, 15));
        at_phase(m, n);
        hit[c] = 1'b1;
        r.ch = c; r.trailing = 1'b0; r.t = stamp(n, m);
        recs.push_back(r);
        repeat ($urandom_range(HIGH_MIN, HIGH_MAX)) @(posedge clk_ph[0]);
        m = int'($urandom_range(0, 15));
        at_phase(m, n);
        hit[c] = 1'b0;
        if (TRAILING) begin
          r.ch = c; r.trailing = 1'b1; r.t = stamp(n, m);
          recs.push_back(r);
        end
      end
    end
  end

  // trigger generator
  initial begin
    int unsigned n;
    int m, last;
    @(negedge rst);
    repeat (OFFSET / 16 + 20) @(posedge clk_ph[0]);
    last = -100000;
    for (int k = 0; k < N_TRIG; k++) begin
      m = int'($urandom_range(0, 15));
      at_phase(m, n);
      trigger = 1'b1;
      trigs.push_back(stamp(n, m));
      if (int'(n) - last < (OFFSET + WIDTH) / 16) n_overlap++;
      if (k - min_events() >= 1) n_queued++;
      last = int'(n);
      repeat (4) @(posedge clk_ph[0]);
      #(0.5 * STEP) trigger = 1'b0;
      // mostly spaced, sometimes back to back
      repeat ((k % 4 == 1) ? $urandom_range(6, 20) : $urandom_range(TGAP_MIN, TGAP_MAX)) @(posedge clk_ph[0]);
    end
    repeat ((OFFSET + WIDTH) / 16 + 50) @(posedge clk_ph[0]);
    stop_hits = 1;
  end

  // output side: one word per filter per cycle
  initial begin
    int unsigned tt, ws, rel;
    int unsigned expected[$];
    int per_ch[int];
    int slot[int];
    out_ready = '0;
    forever begin
      @(negedge clk_ph[0]);
      for (int f = 0; f < N_F; f++) out_ready[f] = ($urandom_range(0, 99) < 80);
      if (rst) continue;   // outputs mean nothing before reset
      for (int f = 0; f < N_F; f++) begin
        if (out_valid[f] && !out_ready[f]) n_stall++;
        if (out_valid[f] && out_ready[f]) begin
          if (!out_word[f].is_end) begin
            n_words++;
            if (out_word[f].trailing) n_trail++; else n_lead++;
            got[f].push_back((int'(out_word[f].ch) << 22) | (int'(out_word[f].trailing) << 21) | int'(out_word[f].value));
          end else begin
            tt = trigs[events_done[f]];
            ws = (tt - OFFSET) % TMOD;
            expected.delete();
            per_ch.delete();
            foreach (recs[i]) begin
              if (recs[i].ch / 4 != f) continue;
              rel = (recs[i].t - ws) % TMOD;
              if (rel < WIDTH) begin
                expected.push_back((recs[i].ch << 22) | (int'(recs[i].trailing) << 21) | rel);
                if (!recs[i].trailing) per_ch[recs[i].ch]++;
              end else begin
                n_reject++;
              end
            end
            foreach (per_ch[c]) if (per_ch[c] > 1) n_multi++;
            expected.sort();
            got[f].sort();
            checks++;
            if (expected != got[f]) begin
              failures++;
              $display("filter %0d event %0d: %0d words, expected %0d", f, events_done[f],
                       got[f].size(), expected.size());
            end
            checks++;
            if (out_word[f].value !== TIME_W'(events_done[f])) begin
              failures++;
              $display("filter %0d: end word %0d, expected %0d", f, out_word[f].value, events_done[f]);
            end
            got[f].delete();
            events_done[f]++;
          end
        end
      end
      if (min_events() == N_TRIG) begin
        // several channels of one filter with edges in the same coarse cycle
        slot.delete();
        foreach (recs[i]) slot[(recs[i].ch / 4) * (1 << COARSE_W) + int'(recs[i].t / 16)]++;
        foreach (slot[s]) if (slot[s] > 1) n_merge++;
        $display("words %0d leading %0d trailing %0d merged %0d multi-hit %0d rejected %0d overlap %0d queued %0d stalls %0d",
                 n_words, n_lead, n_trail, n_merge, n_multi, n_reject, n_overlap, n_queued, n_stall);
        checks++;
        if (n_lead == 0 || (TRAILING && n_trail == 0) || n_merge == 0 || n_multi == 0 ||
            n_reject == 0 || n_overlap == 0 || n_queued == 0 || n_stall == 0) begin
          failures++;
          $display("a mechanism was never exercised");
        end
        done = 1'b1;
      end
    end
  end
endmodule
