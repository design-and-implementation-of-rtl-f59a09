// tb_csa_row: random check of the carry save row: bitwise sum = x^y^z,
// carry = majority(x, y, z), and x + y + z = sum + 2*carry.
module tb_csa_row;
  logic [15:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;
  csa_row dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 20000; v++) begin
      x = 16'($urandom);
      y = 16'($urandom);
      z = 16'($urandom);
      #1;
      checks++;
      if (sum != (x ^ y ^ z) || carry != ((x & y) | (x & z) | (y & z)) ||
          18'(x) + 18'(y) + 18'(z) != 18'(sum) + (18'(carry) << 1)) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h -> %h %h", x, y, z, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
