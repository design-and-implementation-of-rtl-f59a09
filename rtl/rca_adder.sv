// rca_adder: W-bit ripple carry adder.
//
// W full adders are chained: the carry out of bit i is the carry in of bit
// i+1, so the delay grows linearly with W. Inputs a, b and carry in ci;
// outputs sum s and carry out co. Combinational.
// W defaults to 8, the width at which the adders were compared; the
// structure does not depend on it.
module rca_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[W];
endmodule
