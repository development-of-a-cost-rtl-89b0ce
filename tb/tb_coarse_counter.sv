// tb_coarse_counter: checks reset, increment by one per clock and wrap-around
// of a 4-bit coarse counter against a model count.
module tb_coarse_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst;
  logic [3:0] count;
  int checks = 0, failures = 0;

  coarse_counter #(.W(4)) dut (.clk(clk), .rst(rst), .count(count));

  always #2.5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (count !== 4'd0) begin failures++; $display("count not reset: %0d", count); end
    rst = 1'b0;
    exp = 0;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      exp = (exp + 1) % 16;
      checks++;
      if (count !== 4'(exp)) begin failures++; $display("cycle %0d: count %0d, expected %0d", k, count, exp); end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (count !== 4'd0) begin failures++; $display("count not cleared by reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
