// tb_r4_ppg: for each of the six schemes, drives a partial product row
// generator (8-bit and 5-bit multiplicands) with the controls of every digit
// pattern and with random multiplicands. The digit value is worked out here
// from the pattern: d = -2 y(2i+1) + y(2i) + y(2i-1) for the parallel
// schemes, d = 2 y(2i+1) + y(2i) + C - 4 C(i+1) for the serial one. The row
// plus its cor bit must equal d*x modulo 2^(M+1); schemes with zero
// handling must also give an all-zero row for a zero digit.
module tb_r4_ppg;
  import mult_pkg::*;
  logic        y_hi, y_mid, y_lo;
  logic [7:0]  x8;
  logic [4:0]  x5;
  recode_ctl_t ctl [NUM_SCHEMES];
  logic        cn  [NUM_SCHEMES];
  logic [8:0]  pp8 [NUM_SCHEMES];
  logic [5:0]  pp5 [NUM_SCHEMES];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NUM_SCHEMES; s++) begin : g_s
    r4_recoder #(.SCHEME(recode_scheme_e'(s))) u_rec (
      .y_hi(y_hi), .y_mid(y_mid), .y_lo(y_lo), .ctl(ctl[s]), .c_next(cn[s])
    );
    r4_ppg #(.SCHEME(recode_scheme_e'(s)), .M(8)) dut8 (.x(x8), .ctl(ctl[s]), .pp(pp8[s]));
    r4_ppg #(.SCHEME(recode_scheme_e'(s)), .M(5)) dut5 (.x(x5), .ctl(ctl[s]), .pp(pp5[s]));
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
    int d;
    for (int n = 0; n < 4000; n++) begin
      {y_hi, y_mid, y_lo} = 3'(n % 8);
      x8 = 8'($urandom);
      x5 = 5'($urandom);
      if (n < 64) begin x8 = (n / 8 % 2) ? 8'h80 : 8'h00; x5 = (n / 8 % 2) ? 5'h10 : 5'h1f; end
      #1;
      for (int s = 0; s < NUM_SCHEMES; s++) begin
        if (recode_scheme_e'(s) == SERIES_SIGNAL_1)
          d = 2 * y_hi + y_mid + y_lo - 4 * int'(y_hi & (y_mid | y_lo));
        else
          d = -2 * y_hi + y_mid + y_lo;
        check(9'(pp8[s] + 9'(ctl[s].cor)) == 9'(d * int'($signed(x8))),
              $sformatf("scheme %0d pattern %03b x=%0d row=%b cor=%b", s, {y_hi, y_mid, y_lo},
                        $signed(x8), pp8[s], ctl[s].cor));
        check(6'(pp5[s] + 6'(ctl[s].cor)) == 6'(d * int'($signed(x5))),
              $sformatf("M=5 scheme %0d pattern %03b x=%0d", s, {y_hi, y_mid, y_lo}, $signed(x5)));
        if (d == 0 && recode_scheme_e'(s) != THREE_SIGNAL_1)
          check(pp8[s] == '0 && !ctl[s].cor, $sformatf("scheme %0d zero digit not clean", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
