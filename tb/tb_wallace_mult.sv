// tb_wallace_mult: checks the Wallace tree multiplier exhaustively at its
// default size 8x8, on the operand pairs of the published waveforms
// (122*42 = 5124, 34*85 = 2890), and with random operands at 5x5 and 16x16.
module tb_wallace_mult;
  logic [7:0]  a8, b8;
  logic [15:0] c8;
  logic [4:0]  a5, b5;
  logic [9:0]  c5;
  logic [15:0] a16, b16;
  logic [31:0] c16;
  int checks = 0, failures = 0;

  wallace_mult           dut8  (.a(a8),  .b(b8),  .c(c8));
  wallace_mult #(.N(5))  dut5  (.a(a5),  .b(b5),  .c(c5));
  wallace_mult #(.N(16)) dut16 (.a(a16), .b(b16), .c(c16));

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

  initial begin
    a8 = 8'd122; b8 = 8'd42; a5 = '0; b5 = '0; a16 = '0; b16 = '0;
    #1 check(c8 == 16'd5124 && c8 == 16'b0001010000000100, "122*42");
    a8 = 8'd34; b8 = 8'd85;
    #1 check(c8 == 16'd2890, "34*85");
    for (int v = 0; v < (1 << 16); v++) begin
      {a8, b8} = 16'(v);
      a5 = 5'($urandom);  b5 = 5'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (v == 1) begin a16 = '1; b16 = '1; end
      #1;
      check(c8 == 16'(a8) * 16'(b8), $sformatf("8x8 %0d*%0d -> %0d", a8, b8, c8));
      check(c5 == 10'(a5) * 10'(b5), $sformatf("5x5 %0d*%0d -> %0d", a5, b5, c5));
      check(c16 == 32'(a16) * 32'(b16), $sformatf("16x16 %0d*%0d -> %0d", a16, b16, c16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
