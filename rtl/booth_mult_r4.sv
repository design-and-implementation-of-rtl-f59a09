// booth_mult_r4: 8x8 signed radix-4 (modified) Booth multiplier.
//
// The multiplier b, with a 0 appended below its LSB, is cut into four
// overlapping 3-bit groups (b1 b0 0), (b3 b2 b1), (b5 b4 b3), (b7 b6 b5).
// Each group drives a modified Booth encoder (booth_mbe) and a sign extension
// corrector (booth_sign_corr). One product generator (booth_prodgen) forms
// 0, +/-A and +/-2A of the multiplicand a; four 5 to 1 multiplexers
// (booth_pp_mux) pick one 9-bit partial product per group. The four rows and
// their sign bits are summed by the three-stage Wallace tree adder
// (booth_wallace_adder), which ends in a 13-bit carry look-ahead adder.
// Inputs a, b: two's complement, 8 bits. Output yout = a*b, 16 bits two's
// complement (the full product always fits). Purely combinational; the
// longest path is encoder, multiplexer, two adder stages, look-ahead adder.
// The block structure follows the original Booth multiplier architecture;
// the a_nz input of the sign correctors (multiplicand not zero) is this
// design's addition, without which a zero multiplicand under a negative
// digit gives a wrong product.
module booth_mult_r4
  import mult_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] yout
);
  logic [8:0] x0, x1, xm1, x2, xm2;
  booth_prodgen #(.W(8)) u_pg (.a(a), .x0(x0), .x1(x1), .xm1(xm1), .x2(x2), .xm2(xm2));

  logic [8:0] bz;
  assign bz = {b, 1'b0};

  logic       a_nz;
  assign a_nz = |a;

  logic [8:0] pp [4];
  logic [3:0] e;
  for (genvar i = 0; i < 4; i++) begin : g_digit
    booth_sel_t sel;
    booth_mbe u_mbe (.b_hi(bz[2*i+2]), .b_mid(bz[2*i+1]), .b_lo(bz[2*i]), .sel(sel));
    booth_pp_mux #(.W(8)) u_mux (
      .x0(x0), .x1(x1), .xm1(xm1), .x2(x2), .xm2(xm2), .sel(sel), .pp(pp[i])
    );
    booth_sign_corr u_sec (
      .a_msb(a[7]), .a_nz(a_nz),
      .b_hi(bz[2*i+2]), .b_mid(bz[2*i+1]), .b_lo(bz[2*i]), .e(e[i])
    );
  end

  logic [16:0] wsum;
  logic        wcout;
  booth_wallace_adder u_wta (.pp(pp), .e(e), .sum(wsum), .cout(wcout));

  assign yout = wsum[15:0];
endmodule
