// tb_full_adder: exhaustive check of full_adder against the arithmetic sum
// {co, s} = a + b + ci over all eight input combinations.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

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
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a) + 2'(b) + 2'(ci)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
