// tb_carry_network: self-check of the Kogge-Stone decimal carry network.
// Two instances are tested: the default 16 digits and 5 digits (a size that
// is not a power of two). Random and directed (dg, dp, cin) vectors are
// compared with a serial evaluation of carry[i] = dg[i] | dp[i]&carry[i-1].
// Directed vectors include an all-propagate chain so a carry in has to travel
// through every digit.
module tb_carry_network;
  localparam int D = 16;
  localparam int D5 = 5;
  logic [D-1:0]  dg, dp, carry;
  logic [D5-1:0] dg5, dp5, carry5;
  logic          cin;
  int checks = 0, failures = 0;
  bit done = 0;

  carry_network dut (.dg(dg), .dp(dp), .cin(cin), .carry(carry));
  carry_network #(.DIGITS(D5)) dut5 (.dg(dg5), .dp(dp5), .cin(cin), .carry(carry5));

  function automatic logic [D-1:0] ref_carry(logic [D-1:0] g, logic [D-1:0] p, logic c);
    logic [D-1:0] r;
    logic cc = c;
    for (int i = 0; i < D; i++) begin
      cc = g[i] | (p[i] & cc);
      r[i] = cc;
    end
    return r;
  endfunction

  task automatic apply(logic [D-1:0] g, logic [D-1:0] p, logic c);
    logic [D-1:0] e;
    dg = g; dp = p; cin = c;
    dg5 = g[D5-1:0]; dp5 = p[D5-1:0];
    #1;
    e = ref_carry(g, p, c);
    checks++;
    if (carry !== e) begin
      failures++;
      $display("FAIL 16: dg=%h dp=%h cin=%b carry=%h exp=%h", g, p, c, carry, e);
    end
    checks++;
    if (carry5 !== e[D5-1:0]) begin
      failures++;
      $display("FAIL 5: dg=%h dp=%h cin=%b carry=%h exp=%h", g[D5-1:0], p[D5-1:0], c, carry5, e[D5-1:0]);
    end
  endtask

  initial begin
    apply('0, '1, 1'b1);          // carry in travels through all digits
    apply('0, '1, 1'b0);
    apply('0, '0, 1'b1);
    apply(16'h0001, 16'hfffe, 1'b0);  // generate at digit 0 propagates to the top
    apply(16'h0100, 16'hfeff, 1'b0);
    apply('1, '0, 1'b0);
    for (int n = 0; n < 4000; n++) begin
      logic [D-1:0] g, p;
      g = 16'($urandom);
      p = 16'($urandom) | 16'($urandom);   // long propagate runs
      if (n % 2 == 0) g = g & 16'($urandom) & 16'($urandom);
      apply(g, p, 1'($urandom));
    end
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
