// vedic_mul2_tb: exhaustive check of the 2x2 Vedic multiplier.
//
// All 16 operand pairs; p must equal a * b. 3 x 3 = 9 = 1001b is the one
// case where the crosswise carry reaches p[3].
module vedic_mul2_tb;

  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0, failures = 0;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int x = 0; x < 4; x++)
        for (int y = 0; y < 4; y++) begin
          a = 2'(x); b = 2'(y);
          #1;
          checks++;
          if (p !== 4'(x * y)) begin
            failures++;
            $display("FAIL %0d * %0d -> %0d", x, y, p);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
