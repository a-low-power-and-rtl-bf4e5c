// half_adder_tb: exhaustive check of the half adder.
//
// For every (a, b) the 2-bit result {carry, sum} must equal a + b.
module half_adder_tb;

  logic a, b, sum, carry;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        #1;
        checks++;
        if ({carry, sum} !== 2'(int'(a) + int'(b))) begin
          failures++;
          $display("FAIL a=%b b=%b -> carry=%b sum=%b", a, b, carry, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
