// csa_row: W-bit carry save adder.
//
// A row of W independent full adders reduces three equal-weight operands
// x, y, z to a sum word and a carry word with x + y + z = sum + 2*carry.
// No carry moves sideways, so the delay is one full adder whatever W is.
// The caller shifts carry left by one. Combinational.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(sum[i]), .co(carry[i]));
  end
endmodule
