// cla4: 4-bit binary carry look-ahead adder, sum = a + b + cin.
//
// Bit generate g = a & b and propagate p = a ^ b are formed first; every
// internal carry and the carry out are then written as two-level
// sum-of-products of g, p and cin, so no carry ripples from bit to bit.
// Purely combinational. The document uses this adder by name in both
// levels of the BCD adder; the look-ahead equations are the textbook ones.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);

  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    sum  = p ^ c[3:0];
    cout = c[4];
  end

endmodule
