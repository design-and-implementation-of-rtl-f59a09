// booth_sign_corr: sign extension corrector of the Booth multiplier.
//
// Gives the sign bit E of one partial product row. The row is negative when
// the multiplicand's sign a_msb (A7) and the digit's sign B(n+1) differ, and
// E is 0 for a zero digit (B(n+1) B(n) B(n-1) = 000 or 111) whatever A7 is:
//   E = (A7 ^ B(n+1)) & ~(digit is zero) & a_nz.
// a_nz (multiplicand not zero) is this design's addition: without it a zero
// multiplicand under a negative digit would give E = 1 for a row whose value
// is 0, and the product would be off by 2^9 times the row weight.
// Combinational.
module booth_sign_corr (
  input  logic a_msb,  // A7
  input  logic a_nz,   // multiplicand is not zero
  input  logic b_hi,   // B(n+1)
  input  logic b_mid,  // B(n)
  input  logic b_lo,   // B(n-1)
  output logic e
);
  logic zero_digit;
  always_comb begin
    zero_digit = (b_hi & b_mid & b_lo) | (~b_hi & ~b_mid & ~b_lo);
    e          = (a_msb ^ b_hi) & ~zero_digit & a_nz;
  end
endmodule
