// vedic_mul4_full_tb: one complete run of the top at its default
// configuration (no parameter overrides).
//
// Multiplies all 256 operand pairs and the 20 ns squaring sweep of the
// transient test, and checks every product and s8 against integer
// arithmetic.
module vedic_mul4_full_tb;

  logic [3:0] a, b;
  logic [7:0] p;
  logic       s8;
  int         checks = 0, failures = 0;

  vedic_mul4 dut (.a(a), .b(b), .p(p), .s8(s8));

  task automatic apply(input logic [3:0] x, input logic [3:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== 8'(int'(x) * int'(y)) || s8 !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d s8=%b", x, y, p, s8);
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
    for (int t = 0; t < 20; t++)
      apply({1'(t % 2), 1'((t / 2) % 2), 1'((t / 4) % 2), 1'((t / 8) % 2)},
            {1'(t % 2), 1'((t / 2) % 2), 1'((t / 4) % 2), 1'((t / 8) % 2)});
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) apply(4'(x), 4'(y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
