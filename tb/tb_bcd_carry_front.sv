// tb_bcd_carry_front: self-check of the first level (16 adder/analyzers plus
// carry network). Random and directed BCD operands are applied; the binary
// digit sums are compared with (a_i + b_i) mod 16 and each decimal carry with
// the carry out of digit i in a digit-serial decimal addition.
module tb_bcd_carry_front;
  localparam int D = 16;
  logic [4*D-1:0] n1, n2, bin_sum;
  logic [D-1:0]   carry;
  logic           cin;
  int checks = 0, failures = 0;
  bit done = 0;

  bcd_carry_front dut (.n1(n1), .n2(n2), .cin(cin), .bin_sum(bin_sum), .carry(carry));

  function automatic logic [4*D-1:0] rand_bcd();
    logic [4*D-1:0] r;
    for (int i = 0; i < D; i++) r[4*i +: 4] = 4'($urandom_range(9));
    return r;
  endfunction

  task automatic apply(logic [4*D-1:0] x, logic [4*D-1:0] y, logic c);
    int cc;
    logic [4*D-1:0] es;
    logic [D-1:0] ec;
    n1 = x; n2 = y; cin = c;
    #1;
    cc = c;
    for (int i = 0; i < D; i++) begin
      int s;
      s = int'(x[4*i +: 4]) + int'(y[4*i +: 4]);
      es[4*i +: 4] = 4'(s);
      cc = (s + cc >= 10) ? 1 : 0;
      ec[i] = 1'(cc);
    end
    checks++;
    if (bin_sum !== es || carry !== ec) begin
      failures++;
      $display("FAIL %h + %h + %b: bin_sum=%h (exp %h) carry=%h (exp %h)", x, y, c, bin_sum, es, carry, ec);
    end
  endtask

  initial begin
    apply(64'h9999_9999_9999_9999, 64'h0, 1'b1);
    apply(64'h4545_4545_4545_4545, 64'h5454_5454_5454_5454, 1'b1);
    apply(64'h9999_9999_9999_9999, 64'h9999_9999_9999_9999, 1'b1);
    apply(64'h0, 64'h0, 1'b0);
    for (int n = 0; n < 3000; n++) apply(rand_bcd(), rand_bcd(), 1'($urandom));
    done = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
