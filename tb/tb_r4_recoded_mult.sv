// tb_r4_recoded_mult: checks the radix-4 recoded multiplier for each of the
// six schemes on all 65536 signed 8x8 operand pairs against x*y, and at the
// odd shapes 6x4 and 9x10 and at 16x16 with random operands.
module tb_r4_recoded_mult;
  import mult_pkg::*;
  logic [7:0]  x, y;
  logic [15:0] p [NUM_SCHEMES];
  logic [5:0]  xs;
  logic [3:0]  ys;
  logic [9:0]  ps [NUM_SCHEMES];
  logic [8:0]  xl;
  logic [9:0]  yl;
  logic [18:0] pl [NUM_SCHEMES];
  logic [15:0] xw, yw;
  logic [31:0] pw [NUM_SCHEMES];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NUM_SCHEMES; s++) begin : g_s
    r4_recoded_mult #(.SCHEME(recode_scheme_e'(s)))                dut   (.x(x),  .y(y),  .p(p[s]));
    r4_recoded_mult #(.SCHEME(recode_scheme_e'(s)), .M(6), .N(4))  dut_s (.x(xs), .y(ys), .p(ps[s]));
    r4_recoded_mult #(.SCHEME(recode_scheme_e'(s)), .M(9), .N(10)) dut_l (.x(xl), .y(yl), .p(pl[s]));
    r4_recoded_mult #(.SCHEME(recode_scheme_e'(s)), .M(16), .N(16)) dut_w (.x(xw), .y(yw), .p(pw[s]));
  end

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
    for (int v = 0; v < (1 << 16); v++) begin
      {x, y} = 16'(v);
      xs = 6'($urandom); ys = 4'($urandom);
      xl = 9'($urandom); yl = 10'($urandom);
      xw = 16'($urandom); yw = 16'($urandom);
      if (v == 1) begin xw = 16'h8000; yw = 16'h8000; end
      #1;
      for (int s = 0; s < NUM_SCHEMES; s++) begin
        check(p[s] == 16'($signed(x) * $signed(y)),
              $sformatf("scheme %0d %0d*%0d -> %0d", s, $signed(x), $signed(y), $signed(p[s])));
        check(ps[s] == 10'($signed(xs) * $signed(ys)), $sformatf("6x4 scheme %0d", s));
        check(pl[s] == 19'($signed(xl) * $signed(yl)), $sformatf("9x10 scheme %0d", s));
        check(pw[s] == 32'($signed(xw) * $signed(yw)), $sformatf("16x16 scheme %0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
