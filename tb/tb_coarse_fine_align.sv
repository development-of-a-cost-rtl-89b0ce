// tb_coarse_fine_align: for random true times T (fine LSBs) and coarse
// estimates off by up to about one coarse cycle, feeds fine = T mod 32 and
// checks the output against the value congruent to T + FINE_ALIGN (mod 32)
// that lies in [16*coarse - 16, 16*coarse + 15], found by search. Also
// checks the wrap cases: a coarse estimate one cycle late or early still
// gives T + FINE_ALIGN exactly when the estimate is close enough.
module tb_coarse_fine_align;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int ALIGN = 26;
  logic [15:0] coarse;
  logic [4:0]  fine_code;
  logic [19:0] t;
  int checks = 0, failures = 0;

  coarse_fine_align #(.FINE_ALIGN(ALIGN), .TW(20)) dut (.coarse(coarse), .fine_code(fine_code), .t(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tt, est, exp;
    for (int k = 0; k < 2000; k++) begin
      tt = $urandom_range(0, (1 << 20) - 1);
      // coarse latched two cycles after the hit, sometimes three
      est = (tt / 16 + 2 + (($urandom_range(0, 3) == 0) ? 1 : 0)) % (1 << 16);
      coarse    = 16'(est);
      fine_code = 5'(tt % 32);
      #1;
      exp = 0;
      for (int v = -16; v < 16; v++) begin
        int unsigned cand;
        cand = (est * 16 + v) % (1 << 20);
        if ((cand % 32) == ((tt + ALIGN) % 32)) exp = cand;
      end
      checks++;
      if (t !== 20'(exp)) begin
        failures++;
        $display("T=%0d coarse=%0d fine=%0d: t=%0d expected %0d", tt, est, tt % 32, t, exp);
      end
      // the design's hit timing: with the coarse count two cycles late the
      // result is T + ALIGN
      if (est == (tt / 16 + 2) % (1 << 16)) begin
        checks++;
        if (t !== 20'((tt + ALIGN) % (1 << 20))) begin
          failures++;
          $display("T=%0d: t=%0d, expected T+%0d", tt, t, ALIGN);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
