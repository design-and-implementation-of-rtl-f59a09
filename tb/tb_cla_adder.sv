// tb_cla_adder: checks cla_adder exhaustively at its default width of 8 bits
// and with random operands at 13 bits (the width used in the Booth
// multiplier's last stage) and 18 bits (five groups), against a + b + ci.
// The adder's group generate must equal the carry out of a + b, and its
// group propagate must equal AND of (a | b).
module tb_cla_adder;
  logic [7:0]  a8, b8, s8;
  logic [12:0] a13, b13, s13;
  logic [17:0] a18, b18, s18;
  logic ci, co8, co13, co18, gg8, gp8, gg13, gp13, gg18, gp18;
  int checks = 0, failures = 0;

  cla_adder           dut8  (.a(a8),  .b(b8),  .ci(ci), .s(s8),  .co(co8),  .gg(gg8),  .gp(gp8));
  cla_adder #(.W(13)) dut13 (.a(a13), .b(b13), .ci(ci), .s(s13), .co(co13), .gg(gg13), .gp(gp13));
  cla_adder #(.W(18)) dut18 (.a(a18), .b(b18), .ci(ci), .s(s18), .co(co18), .gg(gg18), .gp(gp18));

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
    logic [8:0] r8;
    logic [13:0] r13;
    logic [18:0] r18;
    for (int v = 0; v < (1 << 17); v++) begin
      {ci, a8, b8} = 17'(v);
      a13 = 13'($urandom);
      b13 = 13'($urandom);
      a18 = 18'($urandom);
      b18 = 18'($urandom);
      if (v % 1000 == 0) begin  // long carry chains
        a13 = '1; b13 = 13'(v & 1); a18 = '1; b18 = 18'(v & 1);
      end
      #1;
      r8  = 9'(a8) + 9'(b8) + 9'(ci);
      r13 = 14'(a13) + 14'(b13) + 14'(ci);
      r18 = 19'(a18) + 19'(b18) + 19'(ci);
      check({co8, s8} == r8, $sformatf("W=8 %0d+%0d+%0d -> %0d", a8, b8, ci, {co8, s8}));
      check(gg8 == (9'(a8) + 9'(b8)) >> 8 && gp8 == &(a8 | b8), "W=8 group g/p");
      check({co13, s13} == r13, $sformatf("W=13 %0d+%0d+%0d", a13, b13, ci));
      check(gg13 == (14'(a13) + 14'(b13)) >> 13 && gp13 == &(a13 | b13), "W=13 group g/p");
      check({co18, s18} == r18, $sformatf("W=18 %0d+%0d+%0d", a18, b18, ci));
      check(gg18 == (19'(a18) + 19'(b18)) >> 18 && gp18 == &(a18 | b18), "W=18 group g/p");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
