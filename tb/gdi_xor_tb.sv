// gdi_xor_tb: exhaustive check of the 2-input GDI XOR gate.
//
// Walks the inputs through 00, 01, 10, 11 (the same sweep as a
// two-pulse transient run) several times in both directions, so that every
// input transition is seen, and compares y with a ^ b.
module gdi_xor_tb;

  logic a, b, y;
  int   checks = 0, failures = 0;

  gdi_xor dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {a, b} = (rep % 2 == 0) ? 2'(v) : 2'(3 - v);
        #1;
        checks++;
        if (y !== (a ^ b)) begin
          failures++;
          $display("FAIL a=%b b=%b y=%b", a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
