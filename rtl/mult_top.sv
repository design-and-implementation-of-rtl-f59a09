// mult_top: the multipliers and adders side by side.
//
// Four independent units, each with its own ports, all combinational:
//   * booth_mult_r4    8x8 signed radix-4 Booth multiplier (the main design):
//                      booth_a * booth_b -> booth_p.
//   * wallace_mult     WAL_N x WAL_N unsigned Wallace tree multiplier:
//                      wal_a * wal_b -> wal_c.
//   * r4_recoded_mult  REC_M x REC_N signed radix-4 multiplier, built once
//                      for each of the six recoding schemes; rec_p[s] is
//                      rec_x * rec_y from scheme s (index = recode_scheme_e
//                      value, NEW_THREE_SIGNAL_1 = 5 is the proposed one).
//   * rca_adder, csla_adder, cla_adder  ADD_W-bit adders on the same
//                      operands add_a + add_b + add_ci.
// Defaults are the 8-bit sizes at which the designs were evaluated. The
// units do not feed each other; placing them in one top, and building the
// recoded multiplier for every scheme, is this design's choice.
module mult_top
  import mult_pkg::*;
#(
  parameter int unsigned WAL_N = 8,
  parameter int unsigned REC_M = 8,
  parameter int unsigned REC_N = 8,
  parameter int unsigned ADD_W = 8
) (
  input  logic [7:0]             booth_a,
  input  logic [7:0]             booth_b,
  output logic [15:0]            booth_p,

  input  logic [WAL_N-1:0]       wal_a,
  input  logic [WAL_N-1:0]       wal_b,
  output logic [2*WAL_N-1:0]     wal_c,

  input  logic [REC_M-1:0]       rec_x,
  input  logic [REC_N-1:0]       rec_y,
  output logic [REC_M+REC_N-1:0] rec_p [NUM_SCHEMES],

  input  logic [ADD_W-1:0]       add_a,
  input  logic [ADD_W-1:0]       add_b,
  input  logic                   add_ci,
  output logic [ADD_W-1:0]       rca_s,
  output logic                   rca_co,
  output logic [ADD_W-1:0]       csla_s,
  output logic                   csla_co,
  output logic [ADD_W-1:0]       cla_s,
  output logic                   cla_co
);
  booth_mult_r4 u_booth (.a(booth_a), .b(booth_b), .yout(booth_p));

  wallace_mult #(.N(WAL_N)) u_wallace (.a(wal_a), .b(wal_b), .c(wal_c));

  for (genvar s = 0; s < NUM_SCHEMES; s++) begin : g_scheme
    r4_recoded_mult #(.SCHEME(recode_scheme_e'(s)), .M(REC_M), .N(REC_N)) u_mult (
      .x(rec_x), .y(rec_y), .p(rec_p[s])
    );
  end

  rca_adder  #(.W(ADD_W)) u_rca  (.a(add_a), .b(add_b), .ci(add_ci), .s(rca_s),  .co(rca_co));
  csla_adder #(.W(ADD_W)) u_csla (.a(add_a), .b(add_b), .ci(add_ci), .s(csla_s), .co(csla_co));

  logic cla_gg, cla_gp;
  cla_adder  #(.W(ADD_W)) u_cla  (
    .a(add_a), .b(add_b), .ci(add_ci), .s(cla_s), .co(cla_co), .gg(cla_gg), .gp(cla_gp)
  );
endmodule
