// booth_prodgen: product generator of the Booth multiplier.
//
// Forms the five multiples of the W-bit two's complement multiplicand a that
// a radix-4 digit can select, each W+1 bits wide:
//   x0 = 0, x1 = a, xm1 = -a (two's complement), x2 = a shifted left one
//   place, xm2 = -a shifted left one place.
// x1 and xm1 are a sign-extended to W+1 bits. x2 and xm2 drop the top bit,
// so the multiple's sign is not always its own MSB: the sign extension
// corrector supplies the true sign bit of each row. One product generator
// serves all four rows. Combinational; W = 8 for the 8x8 multiplier.
module booth_prodgen #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  output logic [W:0]   x0,
  output logic [W:0]   x1,
  output logic [W:0]   xm1,
  output logic [W:0]   x2,
  output logic [W:0]   xm2
);
  always_comb begin
    x0  = '0;
    x1  = {a[W-1], a};
    xm1 = ~x1 + 1'b1;
    x2  = {a, 1'b0};
    xm2 = {xm1[W-1:0], 1'b0};
  end
endmodule
