// full_adder: one-bit full adder, the cell of the ripple carry adder, the
// carry save rows and the Wallace tree adders.
//
// It uses the generate/propagate form: g = a&b, p = a^b, s = p^ci,
// co = g | p&ci. Purely combinational; no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p, g;
  always_comb begin
    g  = a & b;
    p  = a ^ b;
    s  = p ^ ci;
    co = g | (p & ci);
  end
endmodule
