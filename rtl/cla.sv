// cla: 4-bit carry look-ahead adder.
//
// Each bit position forms a generate term g = x & y and a propagate term
// p = x ^ y. All four carries are then computed in parallel, directly from
// the g/p terms and the carry input, as two-level sum-of-products, instead of
// rippling from bit to bit:
//   c1 = g0 | p0 c0
//   c2 = g1 | p1 g0 | p1 p0 c0
//   c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
//   c4 = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0 | p3 p2 p1 p0 c0
// and each sum bit is p_i ^ c_i. The look-ahead structure follows the
// 4-bit CLA the design is built from; the exact gate mapping is not copied.
//
// Interface: x, y (4 bits), cin -> sum (4 bits), cout. Purely combinational.
module cla (
  input  logic       cin,
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [3:0] sum,
  output logic       cout
);

  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = x & y;
    p = x ^ y;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
         | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
         | (p[3] & p[2] & p[1] & g[0]) | (p[3] & p[2] & p[1] & p[0] & cin);
    sum  = p ^ c[3:0];
    cout = c[4];
  end

endmodule
