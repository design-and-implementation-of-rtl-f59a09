// csla_adder: W-bit carry select adder with one level.
//
// The low W/2 bits are added by one ripple carry adder. The high bits are
// added twice in parallel, once with carry in 0 and once with carry in 1;
// the carry out of the low half then selects the right high sum and carry
// out (s = ~c*s0 + c*s1, co = ~c*c0 + c*c1). The delay is about that of one
// half-width ripple adder plus a multiplexer.
// Inputs a, b, ci; outputs s, co. Combinational. W defaults to 8; the low
// half takes floor(W/2) bits.
// The low adder gets the carry in port ci (the block diagram ties it to 0;
// a port keeps the adder general, tie it to 0 to match).
module csla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  localparam int unsigned WL = W / 2;
  localparam int unsigned WH = W - WL;

  logic [WL-1:0] s_lo;
  logic          c_mid;
  logic [WH-1:0] s_hi0, s_hi1;
  logic          c_hi0, c_hi1;

  rca_adder #(.W(WL)) u_lo  (.a(a[WL-1:0]), .b(b[WL-1:0]), .ci(ci),   .s(s_lo),  .co(c_mid));
  rca_adder #(.W(WH)) u_hi0 (.a(a[W-1:WL]), .b(b[W-1:WL]), .ci(1'b0), .s(s_hi0), .co(c_hi0));
  rca_adder #(.W(WH)) u_hi1 (.a(a[W-1:WL]), .b(b[W-1:WL]), .ci(1'b1), .s(s_hi1), .co(c_hi1));

  always_comb begin
    s[WL-1:0] = s_lo;
    s[W-1:WL] = c_mid ? s_hi1 : s_hi0;
    co        = c_mid ? c_hi1 : c_hi0;
  end
endmodule
