// tb_half_adder: exhaustive check of half_adder, {co, s} = a + b.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;
  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(a) + 2'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> co=%0b s=%0b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
