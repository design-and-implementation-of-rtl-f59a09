// r4_recoder: one radix-4 recoder cell, built for one of six schemes.
//
// Inputs are the multiplier bits y(2i+1), y(2i) and a third bit y_lo, which
// is y(2i-1) for the parallel schemes and the incoming recoding carry C(i)
// for SERIES_SIGNAL_1. The output bundle ctl drives the partial product row
// generator r4_ppg built for the same scheme; cor is the +1 that completes a
// negated (bit-inverted) row.
//   THREE_SIGNAL_1    neg = y2i+1, one = y2i ^ y2i-1, two, cor = y2i+1.
//                     Digit 111 yields an all-ones row plus cor (no clean zero).
//   THREE_SIGNAL_2    neg = y2i+1 (y2i y2i-1)', two, zero, cor = neg.
//   THREE_SIGNAL_3    neg as above, pos = y2i+1' (y2i + y2i-1),
//                     two = (y2i ^ y2i-1)', cor = neg.
//   FOUR_SIGNAL_1     neg = y2i+1, tmp1 = y2i+1 ^ y2i-1, tmp2 = y2i+1 ^ y2i,
//                     one = y2i ^ y2i-1, two = tmp1 tmp2,
//                     zero = (tmp1 + tmp2)', cor = y2i+1 zero'.
//   SERIES_SIGNAL_1   digits {0, 1, 2, -1}: neg = y2i+1 (y2i + C),
//                     one = y2i ^ C, zero, cor = y2i+1 one, C(i+1) = neg.
//   NEW_THREE_SIGNAL_1 the THREE_SIGNAL_1 signals with neg = y2i+1 (y2i y2i-1)'
//                     and cor = neg, so digit 111 gives a clean zero row.
// with two = y2i+1' y2i y2i-1 + y2i+1 y2i' y2i-1' and
// zero = y2i+1 y2i y2i-1 + y2i+1' y2i' y2i-1' (C in place of y2i-1 for the
// serial scheme). Fields a scheme does not use are 0. c_next is C(i+1) for
// the serial scheme and 0 otherwise. The signals follow the published
// equations and truth tables; where the THREE_SIGNAL_2 drawing wires
// y(2i+1) straight to neg, the equation and table (neg = 0 for 111) are
// followed. Combinational.
module r4_recoder
  import mult_pkg::*;
#(
  parameter recode_scheme_e SCHEME = NEW_THREE_SIGNAL_1
) (
  input  logic        y_hi,   // y(2i+1)
  input  logic        y_mid,  // y(2i)
  input  logic        y_lo,   // y(2i-1), or C(i) for SERIES_SIGNAL_1
  output recode_ctl_t ctl,
  output logic        c_next
);
  logic two_f, zero_f, tmp1, tmp2;
  always_comb begin
    two_f  = (~y_hi & y_mid & y_lo) | (y_hi & ~y_mid & ~y_lo);
    zero_f = (y_hi & y_mid & y_lo) | (~y_hi & ~y_mid & ~y_lo);
    tmp1   = y_hi ^ y_lo;
    tmp2   = y_hi ^ y_mid;
    ctl    = '0;
    c_next = 1'b0;
    case (SCHEME)
      THREE_SIGNAL_1: begin
        ctl.neg = y_hi;
        ctl.one = y_mid ^ y_lo;
        ctl.two = two_f;
        ctl.cor = y_hi;
      end
      THREE_SIGNAL_2: begin
        ctl.neg  = y_hi & ~(y_mid & y_lo);
        ctl.two  = two_f;
        ctl.zero = zero_f;
        ctl.cor  = y_hi & ~(y_mid & y_lo);
      end
      THREE_SIGNAL_3: begin
        ctl.neg = y_hi & ~(y_mid & y_lo);
        ctl.pos = ~y_hi & (y_mid | y_lo);
        ctl.two = ~(y_mid ^ y_lo);
        ctl.cor = y_hi & ~(y_mid & y_lo);
      end
      FOUR_SIGNAL_1: begin
        ctl.neg  = y_hi;
        ctl.one  = y_mid ^ y_lo;
        ctl.two  = tmp1 & tmp2;
        ctl.zero = ~(tmp1 | tmp2);
        ctl.cor  = y_hi & (tmp1 | tmp2);
      end
      SERIES_SIGNAL_1: begin
        ctl.neg  = y_hi & (y_mid | y_lo);
        ctl.one  = y_mid ^ y_lo;
        ctl.zero = zero_f;
        ctl.cor  = y_hi & (y_mid ^ y_lo);
        c_next   = y_hi & (y_mid | y_lo);
      end
      default: begin  // NEW_THREE_SIGNAL_1
        ctl.neg = y_hi & ~(y_mid & y_lo);
        ctl.one = y_mid ^ y_lo;
        ctl.two = two_f;
        ctl.cor = y_hi & ~(y_mid & y_lo);
      end
    endcase
  end
endmodule
