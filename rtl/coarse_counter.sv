// coarse_counter: free-running count of coarse clock periods.
//
// Every TDC unit has its own copy of this counter so that the coarse count
// and the toggle fed to the fine flip-flops are local to the unit; all
// copies leave reset in the same cycle and therefore hold the same value.
// The count increments on every rising edge of the coarse clock and wraps.
// Its LSB is the 0101... signal the fine timing unit samples. That a copy of
// the coarse counter sits in each unit and that its LSB pairs with the fine
// code follows the document; the width and the synchronous reset are this
// design's choice.
module coarse_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,    // synchronous, active high
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
