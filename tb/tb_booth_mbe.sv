// tb_booth_mbe: checks the modified Booth encoder against its truth table:
// for each 3-bit group B(n+1) B(n) B(n-1) the expected selects
// (M, 2M, 3M) = (m_n, m2_n, m3), with M and 2M active low.
module tb_booth_mbe;
  import mult_pkg::*;
  logic b_hi, b_mid, b_lo;
  booth_sel_t sel;
  int checks = 0, failures = 0;
  booth_mbe dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .sel(sel));

  // Expected {m_n, m2_n, m3} for patterns 000 .. 111.
  localparam logic [2:0] EXP [8] = '{3'b110, 3'b010, 3'b010, 3'b100,
                                     3'b101, 3'b011, 3'b011, 3'b110};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {b_hi, b_mid, b_lo} = 3'(v);
      #1;
      checks++;
      if ({sel.m_n, sel.m2_n, sel.m3} != EXP[v]) begin
        failures++;
        $display("FAIL group %03b -> %b expected %b", 3'(v), {sel.m_n, sel.m2_n, sel.m3}, EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
