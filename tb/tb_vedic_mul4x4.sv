// tb_vedic_mul4x4: self-checking test of the 4x4 Vedic multiplier.
// First the two worked examples 14 x 10 = 140 and 14 x 5 = 70 with their
// expected products written out, then all 256 operand pairs against the
// integer product a * b. The operand cases that make the first two adders
// carry out (ca1: aH*bL + aL*bH >= 16; ca2: no ca1 but that sum plus
// (aL*bL >> 2) >= 16) are counted from the operands; each must occur at
// least once, so both carry paths into the last adder are exercised.
// A watchdog ends a stalled run.
module tb_vedic_mul4x4;
  logic [3:0] a, b;
  logic [7:0] s;
  int         checks = 0, failures = 0, n_ca1 = 0, n_ca2 = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [3:0] x, input logic [3:0] y, input logic [7:0] expected);
    a = x;
    b = y;
    #1;
    checks++;
    begin
      int xsum = int'(x[3:2]) * int'(y[1:0]) + int'(x[1:0]) * int'(y[3:2]);
      int low   = int'(x[1:0]) * int'(y[1:0]);
      if (xsum >= 16) n_ca1++;
      else if (xsum + (low >> 2) >= 16) n_ca2++;
    end
    if (s !== expected) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d, expected %0d", x, y, s, expected);
    end
  endtask

  initial begin
    check(4'd14, 4'd10, 8'b1000_1100);  // 140
    check(4'd14, 4'd5,  8'b0100_0110);  // 70
    for (int v = 0; v < 256; v++)
      check(4'(v >> 4), 4'(v), 8'((v >> 4) * (v & 15)));
    checks++;
    if (n_ca1 == 0 || n_ca2 == 0) begin
      failures++;
      $display("FAIL carry paths not exercised: ca1=%0d ca2=%0d", n_ca1, n_ca2);
    end
    $display("carry events: ca1=%0d ca2=%0d", n_ca1, n_ca2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
