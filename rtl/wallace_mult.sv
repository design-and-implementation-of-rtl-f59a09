// wallace_mult: generic N x N unsigned Wallace tree multiplier.
//
// The three steps are: form the N rows of bit products a[j]&b[i] (row i
// shifted left by i); reduce the rows with layers of carry save adders, each
// layer taking every group of three rows to two, until two rows are left;
// add those two rows with a carry look-ahead adder. The number of layers grows
// with log1.5(N): for N = 8 the rows go 8 -> 6 -> 4 -> 3 -> 2 through six
// carry save adders in four layers.
// Inputs a, b (unsigned, N bits); output c = a*b (2N bits). Combinational.
// The three steps and the carry save tree follow the original description;
// the final adder there is a carry look-ahead adder (its block diagram shows
// a ripple adder and operand/product flip-flops, which are left out here, as
// the multiplier is described as combinational). The exact placement of
// half adders in the original generic algorithm is not reproduced: this
// tree reduces whole rows, as its block diagram does.
// Rows are kept 2N bits wide; a carry shifted out of the top bit has weight
// 2^(2N) or more and is always zero for a product of two N-bit numbers.
module wallace_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);
  localparam int unsigned W = 2 * N;

  // Rows left after l layers.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned r = N;
    for (int unsigned k = 0; k < l; k++) r = 2 * (r / 3) + (r % 3);
    return r;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned r = N;
    int unsigned l = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + (r % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned L = num_layers();

  // Level l holds the rows left after l layers; each level is its own
  // signal so that no false loop appears between layers.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [W-1:0] rows [N];
    if (l == 0) begin : g_pp
      // Bit product matrix.
      always_comb begin
        for (int i = 0; i < N; i++) begin
          rows[i] = '0;
          for (int j = 0; j < N; j++) rows[i][i+j] = a[j] & b[i];
        end
      end
    end else begin : g_layer
      localparam int unsigned R  = rows_at(l - 1);
      localparam int unsigned NC = R / 3;
      for (genvar k = 0; k < NC; k++) begin : g_csa
        logic [W-1:0] cs_sum, cs_carry;
        csa_row #(.W(W)) u_csa (
          .x(g_lvl[l-1].rows[3*k]), .y(g_lvl[l-1].rows[3*k+1]), .z(g_lvl[l-1].rows[3*k+2]),
          .sum(cs_sum), .carry(cs_carry)
        );
        assign rows[2*k]   = cs_sum;
        assign rows[2*k+1] = {cs_carry[W-2:0], 1'b0};
      end
      for (genvar k = 0; k < R % 3; k++) begin : g_pass
        assign rows[2*NC+k] = g_lvl[l-1].rows[3*NC+k];
      end
      for (genvar k = 2 * NC + R % 3; k < N; k++) begin : g_unused
        assign rows[k] = '0;
      end
    end
  end

  logic co, gg, gp;
  cla_adder #(.W(W)) u_cpa (
    .a(g_lvl[L].rows[0]), .b(g_lvl[L].rows[1]), .ci(1'b0),
    .s(c), .co(co), .gg(gg), .gp(gp)
  );
endmodule
