// tb_fine_encoder: builds the frozen pattern for every polarity and every
// hit position (phase 0 holds the value before the toggle, phases 1..m the
// new value, phases m+1..15 the old one) and checks that the code is
// 16 * new value + m. Also checks that a pattern and its complement give
// the same position, and that a single-bit bubble moves the code by at
// most one.
module tb_fine_encoder;
  timeunit 1ns;
  timeprecision 1ps;

  logic [15:0] q;
  logic [4:0]  code;
  int checks = 0, failures = 0;

  fine_encoder dut (.q(q), .code(code));

  function automatic logic [15:0] pattern(input logic new_v, input int m);
    logic [15:0] p;
    for (int i = 0; i < 16; i++) p[i] = (i >= 1 && i <= m) ? new_v : ~new_v;
    return p;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m2;
    for (int pol = 0; pol < 2; pol++) begin
      for (int m = 0; m < 16; m++) begin
        q = pattern(pol[0], m);
        #1;
        checks++;
        if (code !== 5'(16 * pol + m)) begin
          failures++;
          $display("pol %0d m %0d: pattern %b code %0d", pol, m, q, code);
        end
      end
    end
    // complement: same position, other polarity
    for (int m = 0; m < 16; m++) begin
      q = pattern(1'b0, m);
      #1;
      m2 = int'(code[3:0]);
      q = ~q;
      #1;
      checks++;
      if (int'(code[3:0]) != m2 || code[4] != 1'b1) begin
        failures++;
        $display("complement of m=%0d gives %0d", m, code);
      end
    end
    // bubble: flip one bit inside the run of new values
    for (int m = 3; m < 15; m++) begin
      q = pattern(1'b1, m);
      q[m-1] = ~q[m-1];
      #1;
      checks++;
      if (code[4] !== 1'b1 || int'(code[3:0]) < m - 1 || int'(code[3:0]) > m) begin
        failures++;
        $display("bubble at m=%0d: code %0d", m, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
