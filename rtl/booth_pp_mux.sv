// booth_pp_mux: 5 to 1 partial product multiplexer of the Booth multiplier.
//
// Chooses one of the five multiples from booth_prodgen with the encoder's
// selects: m_n low gives x1 (or xm1 when m3 is high), m2_n low gives x2 (or
// xm2), both high give x0. The encoder never drives m_n and m2_n low
// together. Output pp is the W+1 bit partial product row. Combinational.
module booth_pp_mux
  import mult_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W:0]  x0,
  input  logic [W:0]  x1,
  input  logic [W:0]  xm1,
  input  logic [W:0]  x2,
  input  logic [W:0]  xm2,
  input  booth_sel_t  sel,
  output logic [W:0]  pp
);
  always_comb begin
    if (!sel.m_n)       pp = sel.m3 ? xm1 : x1;
    else if (!sel.m2_n) pp = sel.m3 ? xm2 : x2;
    else                pp = x0;
  end
endmodule
