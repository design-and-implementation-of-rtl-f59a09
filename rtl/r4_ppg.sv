// r4_ppg: one radix-4 partial product row, built for one of six schemes.
//
// x is the M-bit two's complement multiplicand; it is sign extended to
// M+1 bits (x(M) = x(M-1)) and x(-1) = 0. Bit j of the M+1 bit row pp is
// formed from x(j), x(j-1) and the recoder controls ctl:
//   THREE_SIGNAL_1, NEW_THREE_SIGNAL_1  pp = neg ^ (one x(j) + two x(j-1))
//   THREE_SIGNAL_2   pp = ((two ? x(j-1) : x(j)) ^ neg) zero'
//   THREE_SIGNAL_3   nx(j) = x(j) ? pos : neg,  pp = two ? nx(j-1) : nx(j)
//   FOUR_SIGNAL_1    nx(j) = x(j) ^ neg,  pp = two ? nx(j-1) : one ? nx(j) : 0
//   SERIES_SIGNAL_1  pp = (neg ? x(j)' : (one ? x(j) : x(j-1))) zero'
// A negative digit gives the bit-inverted multiple; the recoder's cor bit,
// added at the row's LSB by the multiplier, completes the two's complement.
// The row read as an M+1 bit two's complement number is digit*x - cor.
// The per-bit functions follow the published recoder and generator drawings;
// the widths (M+1 bits, x(M) = x(M-1)) are this design's choice.
// Combinational.
module r4_ppg
  import mult_pkg::*;
#(
  parameter recode_scheme_e SCHEME = NEW_THREE_SIGNAL_1,
  parameter int unsigned    M      = 8
) (
  input  logic [M-1:0] x,
  input  recode_ctl_t  ctl,
  output logic [M:0]   pp
);
  logic [M+1:0] xe;  // xe[j+1] = x(j), xe[0] = x(-1) = 0
  assign xe = {x[M-1], x, 1'b0};

  always_comb begin
    logic xj, xjm1, nxj, nxjm1;
    for (int j = 0; j <= M; j++) begin
      xj   = xe[j+1];
      xjm1 = xe[j];
      case (SCHEME)
        THREE_SIGNAL_2: begin
          pp[j] = ((ctl.two ? xjm1 : xj) ^ ctl.neg) & ~ctl.zero;
        end
        THREE_SIGNAL_3: begin
          nxj   = xj   ? ctl.pos : ctl.neg;
          nxjm1 = xjm1 ? ctl.pos : ctl.neg;
          pp[j] = ctl.two ? nxjm1 : nxj;
        end
        FOUR_SIGNAL_1: begin
          nxj   = xj ^ ctl.neg;
          nxjm1 = xjm1 ^ ctl.neg;
          pp[j] = ctl.two ? nxjm1 : (ctl.one ? nxj : 1'b0);
        end
        SERIES_SIGNAL_1: begin
          pp[j] = (ctl.neg ? ~xj : (ctl.one ? xj : xjm1)) & ~ctl.zero;
        end
        default: begin  // THREE_SIGNAL_1 and NEW_THREE_SIGNAL_1
          pp[j] = ctl.neg ^ ((ctl.one & xj) | (ctl.two & xjm1));
        end
      endcase
    end
  end
endmodule
