// cla_gen4: 4-bit carry look-ahead generator.
//
// From the bit propagate p[3:0], generate g[3:0] and the carry in c0 it forms
// every carry in parallel as a two-level sum of products,
//   c1 = g0 | p0 c0,  c2 = g1 | p1 g0 | p1 p0 c0, ... , c4,
// and the group signals
//   gg = g3 | g2 p3 | g1 p2 p3 | g0 p1 p2 p3,   gp = p0 p1 p2 p3,
// which let a second-level generator look ahead across groups.
// Output c[k] is the carry into bit k (c[0] is c0 itself). Combinational.
module cla_gen4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [4:0] c,
  output logic       gg,
  output logic       gp
);
  always_comb begin
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (g[2] & p[3]) | (g[1] & p[2] & p[3]) | (g[0] & p[1] & p[2] & p[3]);
    gp   = &p;
  end
endmodule
