// tb_adder_analyzer: self-check of the first-level digit adder and analyzer.
// Every pair of BCD digits (0..9 each) is applied. Checked against integer
// arithmetic: bin_sum = (a1+a2) mod 16; dg = (a1+a2 >= 10); dp is 1 for a
// sum of exactly 9, and for the sums whose 4-bit code has bits 0 and 3 set
// (9, 11, 13, 15); and the decimal carry dg | dp&c equals (a1+a2+c >= 10)
// for both values of an incoming carry c.
module tb_adder_analyzer;
  import bcd_pkg::*;
  bcd_digit_t a1, a2, bin_sum;
  logic dg, dp;
  int checks = 0, failures = 0;
  bit done = 0;

  adder_analyzer dut (.a1(a1), .a2(a2), .bin_sum(bin_sum), .dg(dg), .dp(dp));

  task automatic check(bit ok, string what, int x, int y);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s for %0d + %0d", what, x, y);
    end
  endtask

  initial begin
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++) begin
        int s;
        a1 = 4'(x); a2 = 4'(y);
        #1;
        s = x + y;
        check(bin_sum == 4'(s), "bin_sum", x, y);
        check(dg == (s >= 10), "dg", x, y);
        check(dp == ((s % 16) inside {9, 11, 13, 15}), "dp", x, y);
        if (s < 10) check(dp == (s == 9), "dp below 10", x, y);
        for (int c = 0; c < 2; c++)
          check((dg | (dp & 1'(c))) == (s + c >= 10), "carry equation", x, y);
      end
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
