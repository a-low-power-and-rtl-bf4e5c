// full_adder_tb: exhaustive check of the full adder.
//
// For every (a, b, c) the 2-bit result {carry, sum} must equal a + b + c.
module full_adder_tb;

  logic a, b, c, sum, carry;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {a, b, c} = 3'(v);
        #1;
        checks++;
        if ({carry, sum} !== 2'(int'(a) + int'(b) + int'(c))) begin
          failures++;
          $display("FAIL a=%b b=%b c=%b -> carry=%b sum=%b", a, b, c, carry, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
