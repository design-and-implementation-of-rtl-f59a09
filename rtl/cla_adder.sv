// cla_adder: W-bit carry look-ahead adder built from 4-bit groups in two
// levels.
//
// Every bit forms propagate p = a|b and generate g = a&b. Each group of four
// bits has a cla_gen4 that makes the carries inside the group and the group
// generate/propagate. A second level then computes the carry into every group
// directly from the group signals and the carry in,
//   C[k] = G[k-1] | P[k-1] G[k-2] | ... | P[k-1]...P[0] ci,
// so no carry ripples from group to group. Sum bit i is a^b^c[i].
// For W = 8 this is two 4-bit generators under a 2-group generator; the
// Booth multiplier's Wallace tree adder uses W = 13 (groups 4+4+4+1).
// A last group with fewer than four bits is padded with p = 1, g = 0, which
// passes its carry straight through (this design's choice).
// Inputs a, b, ci; outputs s, carry out co and the adder's overall generate
// gg and propagate gp. Combinational.
module cla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co,
  output logic         gg,
  output logic         gp
);
  localparam int unsigned NG = (W + 3) / 4;
  localparam int unsigned WP = 4 * NG;

  logic [WP-1:0] p, g, c;
  logic [NG-1:0] grp_g, grp_p;
  logic [NG:0]   grp_c;

  always_comb begin
    p = '1;
    g = '0;
    p[W-1:0] = a | b;
    g[W-1:0] = a & b;
  end

  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic [4:0] cg;
    cla_gen4 u_gen (
      .p (p[4*k +: 4]),
      .g (g[4*k +: 4]),
      .c0(grp_c[k]),
      .c (cg),
      .gg(grp_g[k]),
      .gp(grp_p[k])
    );
    assign c[4*k +: 4] = cg[3:0];
  end

  // Second level: carry into each group as a sum of products. gen[k] is the
  // carry into group k with ci = 0, prop[k] says ci reaches group k.
  logic [NG:0] gen, prop;
  always_comb begin
    logic term;
    for (int k = 0; k <= NG; k++) begin
      gen[k] = 1'b0;
      for (int j = 0; j < k; j++) begin
        term = grp_g[j];
        for (int m = j + 1; m < k; m++) term = term & grp_p[m];
        gen[k] = gen[k] | term;
      end
      prop[k] = 1'b1;
      for (int m = 0; m < k; m++) prop[k] = prop[k] & grp_p[m];
      grp_c[k] = gen[k] | (prop[k] & ci);
    end
  end

  always_comb begin
    s  = a ^ b ^ c[W-1:0];
    co = grp_c[NG];
    gg = gen[NG];
    gp = prop[NG];
  end
endmodule
