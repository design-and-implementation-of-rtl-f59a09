// tb_cla_gen4: exhaustive check of the 4-bit carry look-ahead generator
// against a bit-by-bit carry recurrence c(k+1) = g(k) | p(k) c(k); the group
// generate is the carry out with c0 = 0 and the group propagate is AND of p.
module tb_cla_gen4;
  logic [3:0] p, g;
  logic       c0, gg, gp;
  logic [4:0] c, cref;
  logic       ggref;
  int checks = 0, failures = 0;
  cla_gen4 dut (.p(p), .g(g), .c0(c0), .c(c), .gg(gg), .gp(gp));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c0, p, g} = 9'(v);
      cref[0] = c0;
      for (int k = 0; k < 4; k++) cref[k+1] = g[k] | (p[k] & cref[k]);
      ggref = 1'b0;
      for (int k = 0; k < 4; k++) ggref = g[k] | (p[k] & ggref);
      #1;
      checks++;
      if (c != cref || gg != ggref || gp != &p) begin
        failures++;
        $display("FAIL p=%b g=%b c0=%b -> c=%b gg=%b gp=%b", p, g, c0, c, gg, gp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
