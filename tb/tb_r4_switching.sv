// tb_r4_switching: switching-activity comparison of the six recoding schemes.
//
// The scheme comparison is about power, and the power of a recoded
// multiplier is dominated by its partial product rows. This bench feeds
// the same stream of 8x8 signed operand pairs to one recoded multiplier per
// scheme and counts, per scheme, how many partial product row bits and cor
// bits change from one pair to the next (a switching-activity proxy for
// dynamic power). Every product is checked against x*y. The operand stream
// comes from a 32-bit LFSR with fixed seed, so the counts repeat run to run.
// The stream biases y toward runs of ones (digit pattern 111) so that zero
// handling is exercised. The parallel schemes with a clean zero row all
// produce the same rows and so switch alike; they differ in recoder and row
// generator gates, which this count does not see.
// Checks: all products correct; the proposed NEW_THREE_SIGNAL_1 scheme
// switches fewer row bits than THREE_SIGNAL_1, whose row generator it
// shares, and fewer than the serial scheme.
module tb_r4_switching;
  import mult_pkg::*;
  localparam int unsigned PAIRS = 20000;
  logic [7:0]  x, y;
  logic [15:0] p [NUM_SCHEMES];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NUM_SCHEMES; s++) begin : g_s
    r4_recoded_mult #(.SCHEME(recode_scheme_e'(s))) dut (.x(x), .y(y), .p(p[s]));
  end

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Row and cor bits of one scheme's multiplier, flattened (5 rows max).
  function automatic logic [49:0] row_bits(input int s);
    logic [49:0] v = '0;
    case (s)
      0: for (int i = 0; i < 4; i++) v[10*i +: 10] = {g_s[0].dut.cor[i], g_s[0].dut.rows[i]};
      1: for (int i = 0; i < 4; i++) v[10*i +: 10] = {g_s[1].dut.cor[i], g_s[1].dut.rows[i]};
      2: for (int i = 0; i < 4; i++) v[10*i +: 10] = {g_s[2].dut.cor[i], g_s[2].dut.rows[i]};
      3: for (int i = 0; i < 4; i++) v[10*i +: 10] = {g_s[3].dut.cor[i], g_s[3].dut.rows[i]};
      4: for (int i = 0; i < 5; i++) v[10*i +: 10] = {g_s[4].dut.cor[i], g_s[4].dut.rows[i]};
      default: for (int i = 0; i < 4; i++) v[10*i +: 10] = {g_s[5].dut.cor[i], g_s[5].dut.rows[i]};
    endcase
    return v;
  endfunction

  initial begin
    logic [31:0] lfsr = 32'hACE1_2468;
    logic [49:0] prev [NUM_SCHEMES];
    logic [49:0] cur;
    longint unsigned toggles [NUM_SCHEMES];
    for (int s = 0; s < NUM_SCHEMES; s++) toggles[s] = 0;
    for (int n = 0; n < PAIRS; n++) begin
      for (int k = 0; k < 16; k++) lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      x = lfsr[7:0];
      y = lfsr[15:8] | (lfsr[16] ? 8'hf0 : 8'h00) | (lfsr[17] ? 8'h0e : 8'h00);
      #1;
      for (int s = 0; s < NUM_SCHEMES; s++) begin
        checks++;
        if (p[s] != 16'($signed(x) * $signed(y))) begin
          failures++;
          if (failures < 10) $display("FAIL scheme %0d %0d*%0d", s, $signed(x), $signed(y));
        end
        cur = row_bits(s);
        if (n > 0) toggles[s] += $countones(cur ^ prev[s]);
        prev[s] = cur;
      end
    end
    for (int s = 0; s < NUM_SCHEMES; s++)
      $display("COUNT %s row-bit toggles = %0d (%0.2f per product)", recode_scheme_e'(s),
               toggles[s], real'(toggles[s]) / real'(PAIRS - 1));
    checks++;
    if (toggles[NEW_THREE_SIGNAL_1] >= toggles[THREE_SIGNAL_1]) begin
      failures++;
      $display("FAIL NEW_THREE_SIGNAL_1 does not switch less than THREE_SIGNAL_1");
    end
    checks++;
    if (toggles[NEW_THREE_SIGNAL_1] >= toggles[SERIES_SIGNAL_1]) begin
      failures++;
      $display("FAIL NEW_THREE_SIGNAL_1 does not switch less than SERIES_SIGNAL_1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
