// tb_vedic_mul2x2: exhaustive self-checking test of the 2x2 Vedic
// multiplier. All sixteen operand pairs are applied and the 4-bit product
// is compared with the integer product a * b. A watchdog ends a stalled run.
module tb_vedic_mul2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int         checks = 0, failures = 0;

  vedic_mul2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if (q !== 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
