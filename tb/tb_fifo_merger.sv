// tb_fifo_merger: four model FIFOs, filled at random rates, feed the merger.
// Checks that every word comes out exactly once, in order per input, at
// most one word per cycle, one cycle after its pop, and that an input with
// data waits at most three cycles while others are busy (round robin).
module tb_fifo_merger;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int W = 27, N = 4;
  logic clk = 1'b0, rst;
  logic [N-1:0] in_valid, in_pop;
  logic [N-1:0][W-1:0] in_data;
  logic out_valid;
  logic [N-1:0] pops;
  logic [W-1:0] out_data;
  logic [W-1:0] q[N][$];
  logic [W-1:0] expect_q[$];
  int wait_cnt[N];
  int checks = 0, failures = 0, contention = 0, sent = 0, received = 0;

  fifo_merger #(.N_IN(N), .W(W)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .in_pop(in_pop), .out_valid(out_valid), .out_data(out_data));

  always #2.5 clk = ~clk;

  // present the heads of the model FIFOs
  task automatic drive();
    for (int i = 0; i < N; i++) begin
      in_valid[i] = q[i].size() > 0;
      in_data[i]  = (q[i].size() > 0) ? q[i][0] : '0;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    drive();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4000; k++) begin
      // sample at the negative edge: pops for the coming edge, output of the last
      if (out_valid) begin
        received++;
        checks++;
        if (expect_q.size() == 0 || out_data !== expect_q[0]) begin
          failures++;
          $display("cycle %0d: unexpected output %h", k, out_data);
        end
        if (expect_q.size() > 0) void'(expect_q.pop_front());
      end
      checks++;
      if ($countones(in_pop) > 1 || (in_pop & ~in_valid) != 0 || (in_valid != 0 && in_pop == 0)) begin
        failures++;
        $display("cycle %0d: bad pop %b for valid %b", k, in_pop, in_valid);
      end
      if ($countones(in_valid) > 1) contention++;
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && !in_pop[i]) wait_cnt[i]++; else wait_cnt[i] = 0;
        checks++;
        if (wait_cnt[i] > N - 1) begin failures++; $display("input %0d starved", i); end
      end
      pops = in_pop;
      @(posedge clk);
      #0.5;
      for (int i = 0; i < N; i++) begin
        if (pops[i]) begin
          expect_q.push_back(q[i][0]);
          void'(q[i].pop_front());
        end
      end
      for (int i = 0; i < N; i++) begin
        if (k < 3000 && $urandom_range(0, 99) < ((k / 500) % 2 == 0 ? 15 : 24)) begin
          q[i].push_back(W'({i[1:0], 25'(sent)}));
          sent++;
        end
      end
      drive();
      @(negedge clk);
    end
    checks++;
    if (received != sent || contention == 0) begin
      failures++;
      $display("sent %0d received %0d contention %0d", sent, received, contention);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
