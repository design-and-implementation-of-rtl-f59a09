// tb_booth_wallace_adder: random partial products and sign bits. The
// reference adds the four rows at their weights together with the sign
// encoding bits (~e0 e0 e0 above row 0, 1 ~ei above rows 1..3) as plain
// integers; the 17-bit sum must equal that total modulo 2^17 and cout must
// be its bit 17. Also checks the worked example rows of 34 * -42.
module tb_booth_wallace_adder;
  logic [8:0]  pp [4];
  logic [3:0]  e;
  logic [16:0] sum;
  logic        cout;
  int checks = 0, failures = 0;
  booth_wallace_adder dut (.pp(pp), .e(e), .sum(sum), .cout(cout));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [17:0] ref_sum(input logic [8:0] r [4], input logic [3:0] s);
    logic [19:0] t;
    logic [3:0]  ns;
    ns = ~s;
    t = 20'(r[0]) + (20'(s[0]) << 9) + (20'(s[0]) << 10) + (20'(ns[0]) << 11);
    for (int i = 1; i < 4; i++)
      t += (20'(r[i]) + (20'(ns[i]) << 9) + (20'd1 << 10)) << (2 * i);
    return t[17:0];
  endfunction

  initial begin
    logic [17:0] r;
    for (int v = 0; v < 50000; v++) begin
      for (int i = 0; i < 4; i++) pp[i] = 9'($urandom);
      e = 4'($urandom);
      if (v == 0) begin
        pp[0] = 9'b110111100; pp[1] = 9'b001000100;
        pp[2] = 9'b000100010; pp[3] = 9'b111011110; e = 4'b1001;
      end
      #1;
      r = ref_sum(pp, e);
      checks++;
      if ({cout, sum} != r) begin
        failures++;
        if (failures < 10) $display("FAIL got %b expected %b", {cout, sum}, r);
      end
      if (v == 0) begin
        checks++;
        if (sum[15:0] != 16'(-1428)) begin
          failures++;
          $display("FAIL worked example: %0d", $signed(sum[15:0]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
