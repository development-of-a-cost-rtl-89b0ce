// tb_sync_fifo: random pushes and pops against a queue model; checks the
// head word, empty and full flags, and that the FIFO holds exactly DEPTH
// words.
module tb_sync_fifo;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int W = 27, DEPTH = 16;
  logic clk = 1'b0, rst;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] din, dout;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk(clk), .rst(rst), .wr_en(wr_en), .din(din),
    .rd_en(rd_en), .dout(dout), .empty(empty), .full(full));

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_full = 0;
    rst = 1'b1; wr_en = 0; rd_en = 0; din = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      // compare outputs with the model
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH)) begin
        failures++;
        $display("flags: empty=%0d full=%0d size=%0d", empty, full, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("head %h expected %h", dout, model[0]); end
      end
      if (model.size() == DEPTH) n_full++;
      // phases of mostly writing and mostly reading
      wr_en = ($urandom_range(0, 99) < (((k / 200) % 2 == 0) ? 75 : 25)) && (model.size() < DEPTH);
      rd_en = ($urandom_range(0, 99) < (((k / 200) % 2 == 0) ? 25 : 75)) && (model.size() > 0);
      din   = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
