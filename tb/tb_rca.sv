// tb_rca: self-checking test of the ripple-carry adder at both sizes the
// multipliers use. The 4-bit adder is tested exhaustively (all a, b, ci);
// the 8-bit adder exhaustively as well (2**17 vectors). Each result
// {co, s} is compared with the integer sum a + b + ci. Carry-out events
// are counted and must occur. A watchdog ends the run if it stalls.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [7:0] a8, b8, s8;
  logic       ci8, co8;
  int         checks = 0, failures = 0, carries4 = 0, carries8 = 0;

  rca #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  rca #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .ci(ci8), .s(s8), .co(co8));

  initial begin
    for (int v = 0; v < (1 << 9); v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      checks++;
      if (co4) carries4++;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++;
        $display("FAIL rca4 %0d + %0d + %0d -> %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      #1;
      checks++;
      if (co8) carries8++;
      if ({co8, s8} !== 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        if (failures < 10)
          $display("FAIL rca8 %0d + %0d + %0d -> %0d", a8, b8, ci8, {co8, s8});
      end
    end
    checks++;
    if (carries4 == 0 || carries8 == 0) begin
      failures++;
      $display("FAIL carry out never seen");
    end
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
