// tb_cla4: exhaustive self-check of the 4-bit carry look-ahead adder.
// All 512 combinations of a, b, cin are applied; sum and cout are compared
// with integer addition. A watchdog ends the run with a failure if it hangs.
module tb_cla4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;
  bit done = 0;

  cla4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          int exp_v;
          a = 4'(i); b = 4'(j); cin = 1'(c);
          #1;
          exp_v = i + j + c;
          checks++;
          if ({cout, sum} !== 5'(exp_v)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got %0d", i, j, c, {cout, sum});
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
