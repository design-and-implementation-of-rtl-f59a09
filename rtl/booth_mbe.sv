// booth_mbe: modified Booth encoder for one radix-4 digit.
//
// Takes three overlapping multiplier bits B(n+1), B(n), B(n-1) (B(-1) = 0 for
// the lowest digit) whose radix-4 value is Z = -2 B(n+1) + B(n) + B(n-1), and
// drives the three selects of the partial product multiplexer:
//   m_n  low when |Z| = 1   (select A),
//   m2_n low when |Z| = 2   (select 2A),
//   m3   high when Z < 0    (select the negated multiple).
// With both m_n and m2_n high the row is zero (patterns 000 and 111).
// This is the Booth encoder table of the 8x8 Booth multiplier. Combinational.
module booth_mbe
  import mult_pkg::*;
(
  input  logic       b_hi,   // B(n+1)
  input  logic       b_mid,  // B(n)
  input  logic       b_lo,   // B(n-1)
  output booth_sel_t sel
);
  always_comb begin
    sel.m_n  = ~(b_mid ^ b_lo);
    sel.m2_n = ~((~b_hi & b_mid & b_lo) | (b_hi & ~b_mid & ~b_lo));
    sel.m3   = b_hi & ~(b_mid & b_lo);
  end
endmodule
