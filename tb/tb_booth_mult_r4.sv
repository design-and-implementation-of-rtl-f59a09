// tb_booth_mult_r4: checks the 8x8 Booth multiplier on all 65536 signed
// operand pairs against a*b, on the pairs of the published waveforms
// (122*-1, -1*-42, -1*-1, 34*-42), and on the four partial products of the
// worked example 34 * -42 (-2A, 2A, A, -A).
module tb_booth_mult_r4;
  logic [7:0]  a, b;
  logic [15:0] yout;
  int checks = 0, failures = 0;
  booth_mult_r4 dut (.a(a), .b(b), .yout(yout));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic try_pair(input int x, input int y, input int expect_p);
    a = 8'(x);
    b = 8'(y);
    #1 check($signed(yout) == 16'(expect_p), $sformatf("%0d*%0d -> %0d", x, y, $signed(yout)));
  endtask

  initial begin
    try_pair(122, -1, -122);
    try_pair(-1, -42, 42);
    try_pair(-1, -1, 1);
    try_pair(34, -42, -1428);
    check(yout == 16'b1111101001101100, "34*-42 bit pattern");
    check(dut.pp[0] == 9'b110111100 && dut.pp[1] == 9'b001000100 &&
          dut.pp[2] == 9'b000100010 && dut.pp[3] == 9'b111011110, "34*-42 partial products");
    for (int v = 0; v < (1 << 16); v++) begin
      {a, b} = 16'(v);
      #1;
      check($signed(yout) == 16'($signed(a) * $signed(b)),
            $sformatf("%0d*%0d -> %0d", $signed(a), $signed(b), $signed(yout)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
