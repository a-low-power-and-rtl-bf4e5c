// rca_tb: exhaustive check of the 4-bit ripple carry adder.
//
// All 16 x 16 x 2 combinations of a, b and cin; {cout, s} must equal
// a + b + cin computed with integer arithmetic. Counts how many additions
// produced a carry out so a chain that never carries cannot pass.
module rca_tb;

  localparam int unsigned W = 4;

  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int           checks = 0, failures = 0, couts = 0;

  rca #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << W); x++)
      for (int y = 0; y < (1 << W); y++)
        for (int ci = 0; ci < 2; ci++) begin
          a = W'(x); b = W'(y); cin = 1'(ci);
          #1;
          checks++;
          if ({cout, s} !== (W+1)'(x + y + ci)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> cout=%b s=%0d", x, y, ci, cout, s);
          end
          if (cout) couts++;
        end
    checks++;
    if (couts == 0) begin
      failures++;
      $display("FAIL no carry out seen");
    end
    $display("carry out seen %0d times", couts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
