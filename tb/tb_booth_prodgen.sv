// tb_booth_prodgen: for every 8-bit multiplicand a checks the five multiples
// modulo 2^9: 0, a, -a, 2a, -2a. Also the worked example: -2 * 34 gives
// 110111100 and -1 * 34 gives 111011110.
module tb_booth_prodgen;
  logic [7:0] a;
  logic [8:0] x0, x1, xm1, x2, xm2;
  int checks = 0, failures = 0;
  booth_prodgen dut (.a(a), .x0(x0), .x1(x1), .xm1(xm1), .x2(x2), .xm2(xm2));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa;
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      sa = int'($signed(a));
      #1;
      checks++;
      if (x0 != 9'd0 || x1 != 9'(sa) || xm1 != 9'(-sa) || x2 != 9'(2 * sa) || xm2 != 9'(-2 * sa)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d: %b %b %b %b %b", sa, x0, x1, xm1, x2, xm2);
      end
    end
    a = 8'd34;
    #1;
    checks++;
    if (xm2 != 9'b110111100 || xm1 != 9'b111011110 || x2 != 9'b001000100 || x1 != 9'b000100010) begin
      failures++;
      $display("FAIL worked example multiples of 34");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
