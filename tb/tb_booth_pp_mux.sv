// tb_booth_pp_mux: drives random, distinct multiples and each of the select
// codes the encoder produces, and checks that the multiplexer passes the
// multiple named by the code (x0, x1, xm1, x2 or xm2).
module tb_booth_pp_mux;
  import mult_pkg::*;
  logic [8:0] x0, x1, xm1, x2, xm2, pp, exp_pp;
  booth_sel_t sel;
  int checks = 0, failures = 0;
  booth_pp_mux dut (.x0(x0), .x1(x1), .xm1(xm1), .x2(x2), .xm2(xm2), .sel(sel), .pp(pp));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2000; v++) begin
      x0 = 9'($urandom); x1 = 9'($urandom); xm1 = 9'($urandom);
      x2 = 9'($urandom); xm2 = 9'($urandom);
      case (v % 5)
        0: begin sel = '{m_n: 1'b1, m2_n: 1'b1, m3: 1'(v % 2)}; exp_pp = x0;  end
        1: begin sel = '{m_n: 1'b0, m2_n: 1'b1, m3: 1'b0};     exp_pp = x1;  end
        2: begin sel = '{m_n: 1'b0, m2_n: 1'b1, m3: 1'b1};     exp_pp = xm1; end
        3: begin sel = '{m_n: 1'b1, m2_n: 1'b0, m3: 1'b0};     exp_pp = x2;  end
        default: begin sel = '{m_n: 1'b1, m2_n: 1'b0, m3: 1'b1}; exp_pp = xm2; end
      endcase
      #1;
      checks++;
      if (pp != exp_pp) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%b pp=%b expected %b", sel, pp, exp_pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
