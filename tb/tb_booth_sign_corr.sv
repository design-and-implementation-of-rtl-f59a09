// tb_booth_sign_corr: checks the sign extension corrector against its two
// truth tables (A7 = 0 and A7 = 1, all multiplier groups) with a non-zero
// multiplicand, and that a zero multiplicand always gives E = 0.
module tb_booth_sign_corr;
  logic a_msb, a_nz, b_hi, b_mid, b_lo, e;
  int checks = 0, failures = 0;
  booth_sign_corr dut (.a_msb(a_msb), .a_nz(a_nz), .b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .e(e));

  // E for A7 B(n+1) B(n) B(n-1) = 0000 .. 1111.
  localparam logic [15:0] EXP = 16'b0000_0000_0111_0000 | 16'b0000_1110_0000_0000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a_nz, a_msb, b_hi, b_mid, b_lo} = 5'(v);
      #1;
      checks++;
      if (e != (a_nz & EXP[v % 16])) begin
        failures++;
        $display("FAIL a_nz=%b A7=%b B=%b%b%b -> E=%b", a_nz, a_msb, b_hi, b_mid, b_lo, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
