// half_adder: one-bit half adder (s = a^b, co = a&b), used where a column of
// the Wallace trees holds only two bits. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
