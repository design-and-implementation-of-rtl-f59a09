// tb_rca_adder: checks rca_adder exhaustively at its default width of
// 8 bits (all a, b and carry in) and, with random operands, at an odd width
// of 5 bits, against the arithmetic sum {co, s} = a + b + ci.
module tb_rca_adder;
  logic [7:0] a8, b8, s8;
  logic [4:0] a5, b5, s5;
  logic       ci, co8, co5;
  int checks = 0, failures = 0;

  rca_adder         dut8 (.a(a8), .b(b8), .ci(ci), .s(s8), .co(co8));
  rca_adder #(.W(5)) dut5 (.a(a5), .b(b5), .ci(ci), .s(s5), .co(co5));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {ci, a8, b8} = 17'(v);
      a5 = 5'($urandom);
      b5 = 5'($urandom);
      #1;
      checks++;
      if ({co8, s8} != 9'(a8) + 9'(b8) + 9'(ci)) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d -> %0d", a8, b8, ci, {co8, s8});
      end
      checks++;
      if ({co5, s5} != 6'(a5) + 6'(b5) + 6'(ci)) begin
        failures++;
        if (failures < 10) $display("FAIL W=5 %0d+%0d+%0d -> %0d", a5, b5, ci, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
