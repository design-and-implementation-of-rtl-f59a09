// tb_mult_top: end-to-end test of mult_top at its default parameters.
//
// Sweeps all 65536 8-bit operand pairs through every unit at once: the Booth
// multiplier, the Wallace tree multiplier, the six recoded multipliers and
// the three adders (carry in alternating), and checks each result against
// plain arithmetic. It starts with the operand pairs of the published
// waveforms. It also counts how often each mechanism occurred:
//   Booth digits 0, +1, -1, +2, -2; a zero multiplicand under a negative
//   digit (sign bit suppressed); a 111 digit (the clean-zero case of
//   the proposed recoder); a serial recoding carry C(i+1) = 1; the carry
//   select adder taking its carry-in-1 and its carry-in-0 upper sums;
//   an adder carry out.
// A mechanism that never occurred counts as a failure.
module tb_mult_top;
  import mult_pkg::*;
  logic [7:0]  booth_a, booth_b, wal_a, wal_b, rec_x, rec_y, add_a, add_b;
  logic [15:0] booth_p, wal_c;
  logic [15:0] rec_p [NUM_SCHEMES];
  logic        add_ci, rca_co, csla_co, cla_co;
  logic [7:0]  rca_s, csla_s, cla_s;
  int checks = 0, failures = 0;

  mult_top dut (
    .booth_a(booth_a), .booth_b(booth_b), .booth_p(booth_p),
    .wal_a(wal_a), .wal_b(wal_b), .wal_c(wal_c),
    .rec_x(rec_x), .rec_y(rec_y), .rec_p(rec_p),
    .add_a(add_a), .add_b(add_b), .add_ci(add_ci),
    .rca_s(rca_s), .rca_co(rca_co), .csla_s(csla_s), .csla_co(csla_co),
    .cla_s(cla_s), .cla_co(cla_co)
  );

  typedef enum int {
    EV_DIGIT_0, EV_DIGIT_P1, EV_DIGIT_M1, EV_DIGIT_P2, EV_DIGIT_M2,
    EV_ZERO_A_NEG_DIGIT, EV_DIGIT_111, EV_SERIAL_CARRY,
    EV_CSLA_SEL1, EV_CSLA_SEL0, EV_ADD_COUT, EV_COUNT
  } event_e;
  int unsigned seen [EV_COUNT];

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  task automatic apply(input logic [7:0] a, input logic [7:0] b, input logic ci);
    logic [8:0] bz;
    logic       c;
    int         d;
    booth_a = a; booth_b = b;
    wal_a = a;   wal_b = b;
    rec_x = a;   rec_y = b;
    add_a = a;   add_b = b;   add_ci = ci;
    #1;
    check($signed(booth_p) == 16'($signed(a) * $signed(b)),
          $sformatf("booth %0d*%0d -> %0d", $signed(a), $signed(b), $signed(booth_p)));
    check(wal_c == 16'(a) * 16'(b), $sformatf("wallace %0d*%0d -> %0d", a, b, wal_c));
    for (int s = 0; s < NUM_SCHEMES; s++)
      check(rec_p[s] == 16'($signed(a) * $signed(b)),
            $sformatf("scheme %0d %0d*%0d -> %0d", s, $signed(a), $signed(b), $signed(rec_p[s])));
    check({rca_co, rca_s} == 9'(a) + 9'(b) + 9'(ci), "rca");
    check({csla_co, csla_s} == 9'(a) + 9'(b) + 9'(ci), "csla");
    check({cla_co, cla_s} == 9'(a) + 9'(b) + 9'(ci), "cla");

    // Mechanism counts, worked out from the operands.
    bz = {b, 1'b0};
    for (int i = 0; i < 4; i++) begin
      d = -2 * bz[2*i+2] + bz[2*i+1] + bz[2*i];
      case (d)
        0:  seen[EV_DIGIT_0]++;
        1:  seen[EV_DIGIT_P1]++;
        -1: seen[EV_DIGIT_M1]++;
        2:  seen[EV_DIGIT_P2]++;
        default: seen[EV_DIGIT_M2]++;
      endcase
      if (d < 0 && a == 8'd0) seen[EV_ZERO_A_NEG_DIGIT]++;
      if (bz[2*i+2 -: 3] == 3'b111) seen[EV_DIGIT_111]++;
    end
    c = 1'b0;
    for (int i = 0; i < 4; i++) begin
      c = b[2*i+1] & (b[2*i] | c);
      if (c) seen[EV_SERIAL_CARRY]++;
    end
    if ((5'(a[3:0]) + 5'(b[3:0]) + 5'(ci)) >> 4) seen[EV_CSLA_SEL1]++;
    else seen[EV_CSLA_SEL0]++;
    if ((9'(a) + 9'(b) + 9'(ci)) >> 8) seen[EV_ADD_COUT]++;
  endtask

  initial begin
    // Operand pairs of the published waveforms.
    apply(8'd122, 8'hff, 1'b0);  // 122 * -1
    apply(8'hff, 8'(-42), 1'b0); // -1 * -42
    apply(8'hff, 8'hff, 1'b0);   // -1 * -1
    apply(8'd34, 8'(-42), 1'b0); // 34 * -42 = -1428
    check(booth_p == 16'b1111101001101100, "booth 34*-42 bit pattern");
    apply(8'd122, 8'd42, 1'b0);  // Wallace: 5124
    check(wal_c == 16'd5124, "wallace 122*42");
    apply(8'd34, 8'd85, 1'b0);   // Wallace: 2890
    check(wal_c == 16'd2890, "wallace 34*85");

    for (int v = 0; v < (1 << 16); v++) apply(8'(v >> 8), 8'(v), 1'(v >> 3));

    for (int e = 0; e < EV_COUNT; e++) begin
      $display("COUNT %s = %0d", event_e'(e), seen[e]);
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", event_e'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
