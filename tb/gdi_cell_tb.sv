// gdi_cell_tb: exhaustive check of the GDI cell.
//
// Applies all eight (g, p, n) combinations and compares y with the cell's
// selector rule (g low passes p, g high passes n). It then ties p and n to
// constants and to a second input and checks the six functions the cell
// is known for: F1 = ~A&B, F2 = ~A|B, OR, AND, MUX and NOT.
module gdi_cell_tb;

  logic g, p, n, y;
  int   checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .y(y));

  task automatic check(input logic exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b y=%b expected %b", what, g, p, n, y, exp);
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
    logic A, B, C;
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1 check((g == 1'b0) ? p : n, "selector");
    end
    // function table of the cell
    for (int v = 0; v < 8; v++) begin
      {A, B, C} = 3'(v);
      g = A;
      n = 1'b0; p = B;    #1 check(~A & B, "F1");
      n = B;    p = 1'b1; #1 check(~A | B, "F2");
      n = 1'b1; p = B;    #1 check(A | B, "OR");
      n = B;    p = 1'b0; #1 check(A & B, "AND");
      n = C;    p = B;    #1 check((~A & B) | (A & C), "MUX");
      n = 1'b0; p = 1'b1; #1 check(~A, "NOT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
