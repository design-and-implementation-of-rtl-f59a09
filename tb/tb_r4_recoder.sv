// tb_r4_recoder: builds the recoder for each of the six schemes and checks
// all eight input patterns against the scheme's recoding table.
module tb_r4_recoder;
  import mult_pkg::*;
  logic        y_hi, y_mid, y_lo;
  recode_ctl_t ctl [NUM_SCHEMES];
  logic        cn  [NUM_SCHEMES];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NUM_SCHEMES; s++) begin : g_s
    r4_recoder #(.SCHEME(recode_scheme_e'(s))) dut (
      .y_hi(y_hi), .y_mid(y_mid), .y_lo(y_lo), .ctl(ctl[s]), .c_next(cn[s])
    );
  end

  // Table rows, patterns 000 .. 111, fields {neg, one, two, zero, pos, cor, c_next}.
  function automatic logic [6:0] expected(input int s, input int v);
    logic [3:0] t1 [8] = '{4'b0000, 4'b0010, 4'b0010, 4'b0100, 4'b1101, 4'b1011, 4'b1011, 4'b1001}; // neg two one cor
    logic [3:0] t2 [8] = '{4'b0010, 4'b0000, 4'b0000, 4'b0100, 4'b1101, 4'b1001, 4'b1001, 4'b0010}; // neg two zero cor
    logic [3:0] t3 [8] = '{4'b0010, 4'b0100, 4'b0100, 4'b0110, 4'b1011, 4'b1001, 4'b1001, 4'b0010}; // neg pos two cor
    logic [4:0] f1 [8] = '{5'b00010, 5'b00100, 5'b00100, 5'b01000, 5'b11001, 5'b10101, 5'b10101, 5'b10010}; // neg two one zero cor
    logic [4:0] s1 [8] = '{5'b00100, 5'b01000, 5'b01000, 5'b00000, 5'b00000, 5'b11011, 5'b11011, 5'b10101}; // neg one zero cor cnext
    logic [3:0] n1 [8] = '{4'b0000, 4'b0010, 4'b0010, 4'b0100, 4'b1101, 4'b1011, 4'b1011, 4'b0000}; // neg two one cor
    case (s)
      0: return {t1[v][3], t1[v][1], t1[v][2], 1'b0, 1'b0, t1[v][0], 1'b0};
      1: return {t2[v][3], 1'b0, t2[v][2], t2[v][1], 1'b0, t2[v][0], 1'b0};
      2: return {t3[v][3], 1'b0, t3[v][1], 1'b0, t3[v][2], t3[v][0], 1'b0};
      3: return {f1[v][4], f1[v][2], f1[v][3], f1[v][1], 1'b0, f1[v][0], 1'b0};
      4: return {s1[v][4], s1[v][3], 1'b0, s1[v][2], 1'b0, s1[v][1], s1[v][0]};
      default: return {n1[v][3], n1[v][1], n1[v][2], 1'b0, 1'b0, n1[v][0], 1'b0};
    endcase
  endfunction

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] got;
    for (int v = 0; v < 8; v++) begin
      {y_hi, y_mid, y_lo} = 3'(v);
      #1;
      for (int s = 0; s < NUM_SCHEMES; s++) begin
        got = {ctl[s].neg, ctl[s].one, ctl[s].two, ctl[s].zero, ctl[s].pos, ctl[s].cor, cn[s]};
        checks++;
        if (got != expected(s, v)) begin
          failures++;
          $display("FAIL scheme %0d pattern %03b: got %b expected %b", s, 3'(v), got, expected(s, v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
