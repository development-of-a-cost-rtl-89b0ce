// fifo_merger: merge N_IN channel FIFOs into one stream.
//
// Each cycle one non-empty input is chosen by round robin, starting after
// the input chosen last; its head word is popped and appears, registered,
// on out_data with out_valid one cycle later. The merged stream has no
// back-pressure: the matching filter behind it accepts a word every cycle.
// With four inputs each delivering at most one word per three coarse
// cycles, the merger never falls behind. Merging four channel FIFOs into one
// follows the document; the round-robin order is this design's choice.
module fifo_merger #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned W    = 27
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [N_IN-1:0]         in_valid,  // input FIFO not empty
  input  logic [N_IN-1:0][W-1:0]  in_data,   // input FIFO heads
  output logic [N_IN-1:0]         in_pop,
  output logic                    out_valid,
  output logic [W-1:0]            out_data
);

  localparam int unsigned SW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [SW-1:0] last;   // input served most recently
  logic [SW-1:0] sel;
  logic          any;

  always_comb begin
    sel = last;
    any = 1'b0;
    for (int k = 1; k <= N_IN; k++) begin
      logic [SW-1:0] idx;
      idx = SW'((int'(last) + k) % N_IN);
      if (!any && in_valid[idx]) begin
        sel = idx;
        any = 1'b1;
      end
    end
    in_pop = '0;
    if (any) in_pop[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last      <= SW'(N_IN - 1);
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= any;
      if (any) begin
        last     <= sel;
        out_data <= in_data[sel];
      end
    end
  end

endmodule
