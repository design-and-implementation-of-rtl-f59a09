// booth_wallace_adder: three-stage Wallace tree adder of the 8x8 Booth
// multiplier.
//
// Inputs are the four 9-bit partial products pp[0..3] (row i has weight 4^i)
// and their sign bits e[0..3]. Sign extension is replaced by constant and
// inverted sign bits (a bar marks inversion):
//   row 0: ~e0 e0 e0 pp0[8:0]   at columns 11..0
//   row 1: 1 ~e1 pp1[8:0]       at columns 12..2
//   row 2: 1 ~e2 pp2[8:0]       at columns 14..4
//   row 3: 1 ~e3 pp3[8:0]       at columns 16..6
// The constants make the column sum equal the product plus 2^17, so the
// 17-bit result sum[16:0] (columns 0..16) is the product modulo 2^17.
//
// Stage 1 first moves pp3[8:6], ~e3 and the top 1 up into row 0, and ~e2 with
// its 1 up into row 1. It then adds rows 0-2 with four half adders (columns
// 2, 3, 13, 14) and nine full adders (columns 4..12); pp3[5:0] waits.
// Stage 2 adds the stage-1 sums and carries with pp3[5:0]: full adders at
// columns 6..11, half adders at 3, 4, 5, 12, 13, 14 and at 15 (~e3 with the
// carry). Stage 3 is a 13-bit carry look-ahead adder over columns 4..16.
// Columns 0 and 1 (pp0[1:0]) and the lone bits of columns 2 and 3 go straight
// to the output. cout is the look-ahead adder's carry out (column 17).
// The placement of every bit and adder follows the original column diagram;
// bringing the carry out as a separate port is this design's choice.
// Combinational.
module booth_wallace_adder (
  input  logic [8:0]  pp [4],
  input  logic [3:0]  e,
  output logic [16:0] sum,
  output logic        cout
);
  // Stage-1 operand rows after the rearrangement, by column.
  logic [16:0] r0, r1, r2;
  always_comb begin
    r0 = '0;
    r1 = '0;
    r2 = '0;
    r0[8:0]   = pp[0];
    r0[9]     = e[0];
    r0[10]    = e[0];
    r0[11]    = ~e[0];
    r0[14:12] = pp[3][8:6];
    r0[15]    = ~e[3];
    r0[16]    = 1'b1;
    r1[10:2]  = pp[1];
    r1[11]    = ~e[1];
    r1[12]    = 1'b1;
    r1[13]    = ~e[2];
    r1[14]    = 1'b1;
    r2[12:4]  = pp[2];
  end

  // Stage 1: s1[c] is the sum in column c, c1[c] the carry into column c.
  logic [16:0] s1, c1;
  half_adder u_s1_ha2  (.a(r0[2]),  .b(r1[2]),  .s(s1[2]),  .co(c1[3]));
  half_adder u_s1_ha3  (.a(r0[3]),  .b(r1[3]),  .s(s1[3]),  .co(c1[4]));
  for (genvar c = 4; c <= 12; c++) begin : g_s1_fa
    full_adder u_fa (.a(r0[c]), .b(r1[c]), .ci(r2[c]), .s(s1[c]), .co(c1[c+1]));
  end
  half_adder u_s1_ha13 (.a(r0[13]), .b(r1[13]), .s(s1[13]), .co(c1[14]));
  half_adder u_s1_ha14 (.a(r0[14]), .b(r1[14]), .s(s1[14]), .co(c1[15]));
  assign s1[1:0]  = '0;
  assign s1[16:15] = '0;
  assign c1[2:0]  = '0;
  assign c1[16]   = 1'b0;

  // Stage 2.
  logic [16:0] s2, c2;
  for (genvar c = 3; c <= 5; c++) begin : g_s2_ha_lo
    half_adder u_ha (.a(s1[c]), .b(c1[c]), .s(s2[c]), .co(c2[c+1]));
  end
  for (genvar c = 6; c <= 11; c++) begin : g_s2_fa
    full_adder u_fa (.a(s1[c]), .b(c1[c]), .ci(pp[3][c-6]), .s(s2[c]), .co(c2[c+1]));
  end
  for (genvar c = 12; c <= 14; c++) begin : g_s2_ha_hi
    half_adder u_ha (.a(s1[c]), .b(c1[c]), .s(s2[c]), .co(c2[c+1]));
  end
  half_adder u_s2_ha15 (.a(r0[15]), .b(c1[15]), .s(s2[15]), .co(c2[16]));
  assign s2[2:0] = '0;
  assign s2[16]  = 1'b0;
  assign c2[3:0] = '0;

  // Stage 3: 13-bit carry look-ahead adder over columns 4..16. Column 16
  // holds the constant 1 of row 3 and the carry out of column 15.
  logic [12:0] d;
  logic        gg, gp;
  cla_adder #(.W(13)) u_cla (
    .a ({r0[16], s2[15:4]}),
    .b (c2[16:4]),
    .ci(1'b0),
    .s (d),
    .co(cout),
    .gg(gg),
    .gp(gp)
  );

  always_comb begin
    sum[1:0]  = pp[0][1:0];
    sum[2]    = s1[2];
    sum[3]    = s2[3];
    sum[16:4] = d;
  end
endmodule
