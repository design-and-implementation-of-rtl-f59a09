// r4_recoded_mult: M x N signed radix-4 multiplier built from the recoder
// and partial product generator of one scheme.
//
// The multiplier y is cut into radix-4 digits, one r4_recoder and one r4_ppg
// row per digit; row i, plus its cor bit at its LSB, has weight 4^i. The
// parallel schemes use N/2 digits from the overlapping groups
// (y(2i+1), y(2i), y(2i-1)) with y(-1) = 0. SERIES_SIGNAL_1 recodes serially,
// passing C(i+1) = neg(i) from digit to digit with C(0) = 0; its digit set
// {0, 1, 2, -1} cannot give the negative top digit of a signed number, so
// y is sign extended by two bits and one more digit (N/2 + 1 rows) is used.
// The rows are sign extended and summed with one M+N bit addition (the
// reduction is not the subject of these schemes).
// Inputs x (M bits), y (N bits, N even), two's complement; output p = x*y
// (M+N bits). Combinational.
module r4_recoded_mult
  import mult_pkg::*;
#(
  parameter recode_scheme_e SCHEME = NEW_THREE_SIGNAL_1,
  parameter int unsigned    M      = 8,
  parameter int unsigned    N      = 8
) (
  input  logic [M-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [M+N-1:0] p
);
  localparam bit          SERIAL = (SCHEME == SERIES_SIGNAL_1);
  localparam int unsigned K      = SERIAL ? N / 2 + 1 : N / 2;
  localparam int unsigned PW     = M + N;

  // ye[k+1] = y(k), ye[0] = y(-1) = 0, sign extended to 2K bits.
  logic [2*K:0] ye;
  always_comb begin
    ye = '0;
    ye[N:1] = y;
    for (int k = N + 1; k <= 2 * K; k++) ye[k] = y[N-1];
  end

  logic [K:0]    carry;   // serial recoding carry C(i)
  logic [M:0]    rows [K];
  logic [K-1:0]  cor;
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < K; i++) begin : g_digit
    recode_ctl_t ctl;
    logic        c_nx;
    r4_recoder #(.SCHEME(SCHEME)) u_rec (
      .y_hi (ye[2*i+2]),
      .y_mid(ye[2*i+1]),
      .y_lo (SERIAL ? carry[i] : ye[2*i]),
      .ctl  (ctl),
      .c_next(c_nx)
    );
    assign carry[i+1] = c_nx;
    assign cor[i]     = ctl.cor;
    r4_ppg #(.SCHEME(SCHEME), .M(M)) u_ppg (.x(x), .ctl(ctl), .pp(rows[i]));
  end

  always_comb begin
    logic [PW-1:0] acc, term;
    acc = '0;
    for (int i = 0; i < K; i++) begin
      term = PW'({{(PW-M-1){rows[i][M]}}, rows[i]} << (2 * i));
      acc  = acc + term + (PW'(cor[i]) << (2 * i));
    end
    p = acc;
  end
endmodule
