// tb_fine_timing_unit: drives the 16-phase sampler with 200 MHz phase
// clocks and a toggle that changes on each rising edge of phase 0, raises
// the hit (enable = inverted hit) at a chosen point inside a coarse period
// and checks the frozen pattern: phase 0 holds the value before the
// toggle, phases 1..m the new value, the rest the old value, where m is the
// number of phase edges (after phase 0) that came before the hit. Also
// checks that the pattern stays frozen while the hit is high and tracks
// the toggle again after it falls.
module tb_fine_timing_unit;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real T    = 5.0;
  localparam real STEP = T / 16.0;

  logic [7:0]  clk_ph;
  logic        toggle, hit;
  logic [15:0] q, frozen;
  int checks = 0, failures = 0;

  mmcm_model #(.PERIOD_NS(T)) u_clk (.clk_ph(clk_ph));
  fine_timing_unit dut (.clk_ph(clk_ph), .d_toggle(toggle), .ce(~hit), .q(q));

  initial toggle = 1'b0;
  always @(posedge clk_ph[0]) toggle <= ~toggle;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic new_v;
    logic [15:0] exp;
    hit = 1'b0;
    repeat (4) @(posedge clk_ph[0]);
    for (int rep = 0; rep < 2; rep++) begin
      for (int m = 0; m < 16; m++) begin
        @(posedge clk_ph[0]);
        #(m * STEP + 0.15);
        new_v = toggle;
        hit = 1'b1;
        for (int i = 0; i < 16; i++) exp[i] = (i >= 1 && i <= m) ? new_v : ~new_v;
        repeat (2) @(posedge clk_ph[0]);
        #1;
        checks++;
        if (q !== exp) begin
          failures++;
          $display("m=%0d: q=%b expected %b", m, q, exp);
        end
        frozen = q;
        repeat (3) @(posedge clk_ph[0]);
        #1;
        checks++;
        if (q !== frozen) begin failures++; $display("m=%0d: pattern changed while frozen", m); end
        hit = 1'b0;
        repeat (2) @(posedge clk_ph[0]);
        #(T - 0.1);
        // sampling again: after all phases have passed, every flip-flop
        // except phase 0 holds the current toggle value
        checks++;
        if (q[15:1] !== {15{toggle}}) begin failures++; $display("m=%0d: not tracking after release: %b", m, q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
