// tb_digit_correct: self-check of the per-digit correction adder.
// Part 1 applies every legal situation: a first-level sum s = 0..18 of two BCD
// digits (bin_sum = s mod 16) and an incoming decimal carry ci, with
// carry_out = (s + ci >= 10); the result must be the BCD digit (s + ci) mod 10.
// Part 2 applies all 64 raw input combinations and checks that the value
// added is 0, 1, 6 or 7 according to (carry_in, carry_out).
module tb_digit_correct;
  import bcd_pkg::*;
  bcd_digit_t bin_sum, result;
  logic carry_in, carry_out;
  int checks = 0, failures = 0;
  bit done = 0;

  digit_correct dut (.bin_sum(bin_sum), .carry_in(carry_in), .carry_out(carry_out), .result(result));

  initial begin
    for (int s = 0; s <= 18; s++)
      for (int ci = 0; ci < 2; ci++) begin
        bin_sum = 4'(s); carry_in = 1'(ci); carry_out = (s + ci >= 10);
        #1;
        checks++;
        if (result != 4'((s + ci) % 10)) begin
          failures++;
          $display("FAIL s=%0d ci=%0d result=%0d", s, ci, result);
        end
      end
    for (int v = 0; v < 64; v++) begin
      int add;
      {carry_out, carry_in, bin_sum} = 6'(v);
      #1;
      add = (carry_out ? 6 : 0) + (carry_in ? 1 : 0);
      checks++;
      if (result != 4'(int'(bin_sum) + add)) begin
        failures++;
        $display("FAIL raw bin_sum=%0d ci=%b co=%b result=%0d", bin_sum, carry_in, carry_out, result);
      end
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
