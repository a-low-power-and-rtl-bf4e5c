// vedic_mul4_rca_tb: exhaustive check of the 4x4 multiplier structure vedic_mul4_rca.
//
// All 256 operand pairs, twice (rising and falling order), against the
// product computed with integer arithmetic, plus the worked example
// 1011b x 0110b = 01000010b (11 x 6 = 66).
module vedic_mul4_rca_tb;

  logic [3:0] a, b;
  logic [7:0] p;
  logic       s8;
  int         checks = 0, failures = 0;

  vedic_mul4_rca dut (.a(a), .b(b), .p(p), .s8(s8));

  task automatic check(input int x, input int y);
    a = 4'(x); b = 4'(y);
    #1;
    checks++;
    if (p !== 8'(x * y) || s8 !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d -> p=%0d s8=%b", x, y, p, s8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin

    check(4'b1011, 4'b0110);
    checks++;
    if (p !== 8'b0100_0010) begin
      failures++;
      $display("FAIL worked example: p=%b", p);
    end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) check(x, y);
    for (int x = 15; x >= 0; x--)
      for (int y = 15; y >= 0; y--) check(x, y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
