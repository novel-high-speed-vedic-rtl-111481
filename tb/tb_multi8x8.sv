// tb_multi8x8: end-to-end self-checking test of the 8x8 Vedic multiplier
// at its only size (no parameters).
// First the two worked examples 102 x 195 = 19890 and 174 x 211 = 36714
// with their expected products written out, then all 65,536 operand pairs
// against the integer product a * b.
// Mechanisms counted from the operands, each of which must occur at least
// once:
//   - carry out of the top-level first adder, ca1 (AH*BL + AL*BH >= 256),
//   - carry out of the top-level second adder, ca2 (no ca1, but that sum
//     plus (AL*BL >> 4) >= 256),
//   - the same two carries inside the 4x4 sub-multiplier for AH*BH, so both
//     levels of the tree exercise both carry paths into their last adder.
// A watchdog ends a stalled run.
module tb_multi8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0, failures = 0;
  int          n_ca1 = 0, n_ca2 = 0, n_sub_ca1 = 0, n_sub_ca2 = 0;

  multi8x8 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [7:0] x, input logic [7:0] y, input logic [15:0] expected);
    a = x;
    b = y;
    #1;
    checks++;
    begin
      int xsum = int'(x[7:4]) * int'(y[3:0]) + int'(x[3:0]) * int'(y[7:4]);
      int low   = int'(x[3:0]) * int'(y[3:0]);
      int sub_xsum   = int'(x[7:6]) * int'(y[5:4]) + int'(x[5:4]) * int'(y[7:6]);
      int sub_low  = int'(x[5:4]) * int'(y[5:4]);
      if (xsum >= 256) n_ca1++;
      else if (xsum + (low >> 4) >= 256) n_ca2++;
      if (sub_xsum >= 16) n_sub_ca1++;
      else if (sub_xsum + (sub_low >> 2) >= 16) n_sub_ca2++;
    end
    if (p !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d * %0d -> %0d, expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    check(8'd102, 8'd195, 16'd19890);
    check(8'd174, 8'd211, 16'd36714);
    for (int v = 0; v < 65536; v++)
      check(8'(v >> 8), 8'(v), 16'((v >> 8) * (v & 255)));
    checks++;
    if (n_ca1 == 0 || n_ca2 == 0 || n_sub_ca1 == 0 || n_sub_ca2 == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("carry events: ca1=%0d ca2=%0d sub ca1=%0d sub ca2=%0d",
             n_ca1, n_ca2, n_sub_ca1, n_sub_ca2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
