// matching_filter: trigger matching of one merged hit stream.
//
// Every timestamp word arriving on the merged stream is written into a
// ring buffer of RING_DEPTH words (one write per cycle, never refused).
// Trigger timestamps are queued in a small FIFO. For the trigger at the
// head of the queue the matching window is
//   [trigger - win_offset, trigger - win_offset + win_width)
// in fine LSBs. Once the coarse time now_coarse has passed the end of the
// window by GUARD_CYCLES (so that every hit inside it has reached the
// buffer), the filter scans the buffer backwards, from the newest word
// stored when the window closed (a trigger that waited behind an earlier
// event thus skips what arrived meanwhile), and
// sends out every word whose time lies in the window, with the value
//   hit - trigger + win_offset   (the time from the window start),
// followed by one end-of-event word that carries the event number. The
// scan stops at the first word more than ORDER_SLACK fine LSBs older than
// the window start (the merged stream is ordered in time to within a few
// cycles), at the oldest stored word, or before it could reach a word the
// writer has overwritten meanwhile. Several hits of one channel within a
// window are all reported (multi-hit); windows of different triggers may
// overlap, and a hit is then reported in each.
//
// Timestamps wrap every 2^TIME_W fine LSBs, so all comparisons use the
// signed difference. To keep a stale word from aliasing into a window after
// a long quiet period, the buffer is declared empty when no word has been
// written for PURGE_CYCLES coarse cycles.
//
// Interface: hit_valid/hit_word is the merged stream, trig_valid/trig_time
// a trigger timestamp (one-cycle pulse), out_valid/out_ready/out_word a
// valid-ready output. Each scanned word costs two cycles (read, then
// evaluate), plus stalls on out_ready.
//
// From the document: the matching window, multi-hit capability, data
// relative to the window start (= hit - trigger + offset), and that the
// matching runs on the merged stream of four channels. This design's own
// choices: the ring buffer and its scan, the end-of-event word, the guard
// time, the purge and all sizes.
module matching_filter
  import tdc_pkg::*;
#(
  parameter int unsigned RING_DEPTH      = 4096,
  parameter int unsigned TRIG_FIFO_DEPTH = 16,
  parameter int unsigned GUARD_CYCLES    = 32,
  parameter int unsigned ORDER_SLACK     = 256,
  parameter int unsigned PURGE_CYCLES    = 16384
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                hit_valid,
  input  hit_word_t           hit_word,
  input  logic                trig_valid,
  input  logic [TIME_W-1:0]   trig_time,
  input  logic [COARSE_W-1:0] now_coarse,
  input  logic [TIME_W-1:0]   win_offset,
  input  logic [TIME_W-1:0]   win_width,
  output logic                out_valid,
  input  logic                out_ready,
  output out_word_t           out_word
);

  localparam int unsigned AW = $clog2(RING_DEPTH);

  // ---------------------------------------------------------------- ring
  hit_word_t        ring [RING_DEPTH];
  logic [AW-1:0]    wr_ptr;
  logic [AW:0]      n_stored;
  logic [$clog2(PURGE_CYCLES+1)-1:0] idle_cnt;

  always_ff @(posedge clk) begin
    if (hit_valid) ring[wr_ptr] <= hit_word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      n_stored <= '0;
      idle_cnt <= '0;
    end else if (hit_valid) begin
      wr_ptr   <= wr_ptr + 1'b1;
      idle_cnt <= '0;
      if (n_stored != (AW+1)'(RING_DEPTH)) n_stored <= n_stored + 1'b1;
    end else if (idle_cnt == ($bits(idle_cnt))'(PURGE_CYCLES)) begin
      n_stored <= '0;
    end else begin
      idle_cnt <= idle_cnt + 1'b1;
    end
  end

  // ------------------------------------------------------- trigger queue
  logic              tq_empty, tq_full, tq_pop;
  logic [TIME_W-1:0] tq_head;

  sync_fifo #(.W(TIME_W), .DEPTH(TRIG_FIFO_DEPTH)) u_trig_q (
    .clk(clk), .rst(rst),
    .wr_en(trig_valid && !tq_full), .din(trig_time),
    .rd_en(tq_pop), .dout(tq_head), .empty(tq_empty), .full(tq_full));

  // --------------------------------------------------------------- scan
  typedef enum logic [1:0] {S_IDLE, S_READ, S_EVAL, S_END} state_t;
  state_t state;

  logic [TIME_W-1:0] now_fine, head_end, win_start;
  logic [AW-1:0]     scan_ptr;
  logic [AW:0]       scan_k, scan_limit, wr_since;
  hit_word_t         rd_word;
  logic [TIME_W-1:0] rel;
  logic              too_old, in_window, window_closed, scan_more;
  logic [TIME_W-1:0] evt_cnt;
  // buffer position at the moment the head trigger's window closed
  logic              close_seen;
  logic [AW-1:0]     close_ptr;
  logic [AW:0]       close_n, close_wr;

  assign now_fine      = {now_coarse, {FINE_W{1'b0}}};
  assign head_end      = tq_head - win_offset + win_width;
  assign window_closed = $signed(now_fine - head_end) >= $signed(TIME_W'(GUARD_CYCLES << FINE_W));
  assign tq_pop        = (state == S_IDLE) && !tq_empty && window_closed;

  assign rel       = rd_word.t - win_start;
  assign too_old   = $signed(rel) < -$signed(TIME_W'(ORDER_SLACK));
  assign in_window = rel < win_width;
  assign scan_more = (scan_k < scan_limit) && ((scan_k + wr_since + 1'b1) < (AW+1)'(RING_DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      scan_ptr   <= '0;
      scan_k     <= '0;
      scan_limit <= '0;
      wr_since   <= '0;
      win_start  <= '0;
      rd_word    <= '0;
      evt_cnt    <= '0;
      close_seen <= 1'b0;
      close_ptr  <= '0;
      close_n    <= '0;
      close_wr   <= '0;
    end else begin
      if (hit_valid && state != S_IDLE) wr_since <= wr_since + 1'b1;
      // While an earlier event is still being scanned, note where the
      // buffer stood when the next trigger's window closed, so that its
      // scan can skip the words written after that.
      if (tq_pop) begin
        close_seen <= 1'b0;
      end else if (!tq_empty && window_closed && !close_seen) begin
        close_seen <= 1'b1;
        close_ptr  <= wr_ptr;
        close_n    <= n_stored;
        close_wr   <= {{AW{1'b0}}, hit_valid};
      end else if (close_seen && hit_valid) begin
        close_wr   <= close_wr + 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (tq_pop) begin
            win_start  <= tq_head - win_offset;
            scan_k     <= '0;
            if (close_seen) begin
              scan_ptr   <= close_ptr - 1'b1;
              scan_limit <= close_n;
              wr_since   <= close_wr + {{AW{1'b0}}, hit_valid};
            end else begin
              // a word written in this very cycle is not part of the scan
              scan_ptr   <= wr_ptr - 1'b1;
              scan_limit <= n_stored;
              wr_since   <= {{AW{1'b0}}, hit_valid};
            end
            state      <= S_READ;
          end
        end
        S_READ: begin
          if (scan_more) begin
            rd_word <= ring[scan_ptr];
            state   <= S_EVAL;
          end else begin
            state   <= S_END;
          end
        end
        S_EVAL: begin
          if (too_old) begin
            state <= S_END;
          end else if (!in_window || out_ready) begin
            scan_ptr <= scan_ptr - 1'b1;
            scan_k   <= scan_k + 1'b1;
            state    <= S_READ;
          end
        end
        S_END: begin
          if (out_ready) begin
            evt_cnt <= evt_cnt + 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    out_valid = 1'b0;
    out_word  = '0;
    if (state == S_EVAL && !too_old && in_window) begin
      out_valid         = 1'b1;
      out_word.ch       = rd_word.ch;
      out_word.trailing = rd_word.trailing;
      out_word.value    = rel;
    end else if (state == S_END) begin
      out_valid      = 1'b1;
      out_word.is_end = 1'b1;
      out_word.value = evt_cnt;
    end
  end

  a_trigger_not_lost: assert property (@(posedge clk) disable iff (rst) !(trig_valid && tq_full));
  a_out_stable: assert property (@(posedge clk) disable iff (rst)
                                 out_valid && !out_ready |=> out_valid && $stable(out_word));

endmodule
