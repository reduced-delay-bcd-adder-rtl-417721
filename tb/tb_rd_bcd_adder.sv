// tb_rd_bcd_adder: end-to-end self-check of the full reduced delay BCD adder
// at its default size (16 digits, 64-bit operands, no parameter override).
//
// Each vector n1 + n2 + cin is compared with a digit-serial decimal addition
// computed here (result digits and cout). The adder is combinational, so
// outputs are sampled 1 time unit after the inputs change (zero cycles).
// The testbench also classifies every digit from the operands and counts
// how often each mechanism of the design was exercised:
//   case 1 (digit sum < 9), case 2 (sum > 9, digit generate),
//   case 3 (sum == 9) with and without an incoming carry (digit propagate),
//   each correction value 0, 1, 6, 7, a decimal carry out of the top digit,
//   and a carry that ripples through all 16 digits.
// A mechanism that never occurs counts as a failure.
module tb_rd_bcd_adder;
  localparam int D = bcd_pkg::BCD_DIGITS;
  logic [4*D-1:0] n1, n2, result;
  logic           cin, cout;
  int checks = 0, failures = 0;
  bit done = 0;

  int n_case1 = 0, n_case2 = 0, n_case3_prop = 0, n_case3_kill = 0;
  int n_corr[4] = '{0, 0, 0, 0};   // index: correction value 0, 1, 6, 7
  int n_cout = 0, n_full_ripple = 0;

  rd_bcd_adder dut (.n1(n1), .n2(n2), .cin(cin), .result(result), .cout(cout));

  function automatic logic [4*D-1:0] rand_bcd();
    logic [4*D-1:0] r;
    for (int i = 0; i < D; i++) r[4*i +: 4] = 4'($urandom_range(9));
    return r;
  endfunction

  // Operand pair whose digit sums are all 9, except digit k which is random.
  function automatic void nines_pair(int k, output logic [4*D-1:0] x, output logic [4*D-1:0] y);
    for (int i = 0; i < D; i++) begin
      int a;
      a = $urandom_range(9);
      x[4*i +: 4] = 4'(a);
      y[4*i +: 4] = (i == k) ? 4'($urandom_range(9)) : 4'(9 - a);
    end
  endfunction

  task automatic apply(logic [4*D-1:0] x, logic [4*D-1:0] y, logic c);
    int cc, run;
    logic [4*D-1:0] er;
    logic ec;
    n1 = x; n2 = y; cin = c;
    #1;
    cc = c;
    run = 0;
    for (int i = 0; i < D; i++) begin
      int s, co;
      s = int'(x[4*i +: 4]) + int'(y[4*i +: 4]);
      co = (s + cc >= 10) ? 1 : 0;
      er[4*i +: 4] = 4'((s + cc) % 10);
      if (s < 9) n_case1++;
      else if (s > 9) n_case2++;
      else if (cc == 1) n_case3_prop++;
      else n_case3_kill++;
      n_corr[2*co + cc]++;
      if (cc == 1 && s == 9) run++;
      cc = co;
    end
    ec = 1'(cc);
    if (c && run == D) n_full_ripple++;
    if (ec) n_cout++;
    checks++;
    if (result !== er || cout !== ec) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b_%h, expected %b_%h", x, y, c, cout, result, ec, er);
    end
  endtask

  task automatic require(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("  %-34s %0d", what, count);
  endtask

  initial begin
    logic [4*D-1:0] x, y;
    // Directed: longest carry path, all nines plus carry in.
    apply(64'h9999_9999_9999_9999, 64'h0000_0000_0000_0000, 1'b1);
    apply(64'h1234_5678_9012_3456, 64'h8765_4321_0987_6543, 1'b1);
    apply(64'h9999_9999_9999_9999, 64'h9999_9999_9999_9999, 1'b1);
    apply(64'h0, 64'h0, 1'b0);
    apply(64'h5000_0000_0000_0001, 64'h4999_9999_9999_9999, 1'b0);
    // Random operands.
    for (int n = 0; n < 20000; n++) apply(rand_bcd(), rand_bcd(), 1'($urandom));
    // Long propagate chains broken at a random digit.
    for (int n = 0; n < 2000; n++) begin
      nines_pair($urandom_range(D - 1), x, y);
      apply(x, y, 1'($urandom));
    end
    done = 1;
    $display("Mechanisms exercised (digit events / vectors):");
    require(n_case1, "case 1: digit sum < 9");
    require(n_case2, "case 2: digit sum > 9 (generate)");
    require(n_case3_prop, "case 3: sum 9, carry propagated");
    require(n_case3_kill, "case 3: sum 9, no carry in");
    require(n_corr[0], "correction +0");
    require(n_corr[1], "correction +1");
    require(n_corr[2], "correction +6");
    require(n_corr[3], "correction +7");
    require(n_cout, "decimal carry out (cout)");
    require(n_full_ripple, "carry through all digits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
