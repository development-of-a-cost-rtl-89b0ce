// mmcm_model: behavioural model of the clock manager that feeds the TDC.
//
// Not synthesizable. Produces eight copies of the coarse clock with period
// PERIOD_NS, copy i delayed by i/16 of the period (0, 22.5, ..., 157.5
// degrees), which together with their inversions give the 16 sampling
// phases. Edges fall on the 1 ps simulation grid, so phase offsets are
// rounded to the picosecond.
module mmcm_model #(
  parameter real PERIOD_NS = 5.0
) (
  output logic [7:0] clk_ph
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar i = 0; i < 8; i++) begin : g_clk
    logic c;
    initial begin
      c = 1'b0;
      #(i * PERIOD_NS / 16.0);
      forever begin
        c = 1'b1;
        #(PERIOD_NS / 2.0);
        c = 1'b0;
        #(PERIOD_NS / 2.0);
      end
    end
    assign clk_ph[i] = c;
  end
endmodule
