// vedic_mul4_tb: end-to-end test of the 4-bit Vedic multiplier top.
//
// Builds the top in both structures (the default 2x2-blocks-plus-RCA one
// and the AND/FA/HA array) on the same operands and checks both products
// against integer multiplication for:
//   - the worked example 1011b x 0110b = 01000010b;
//   - the squaring sweep of the transient test, where a and b carry the
//     same pulse trains (bit 3 toggling every 1 ns, bit 2 every 2 ns,
//     bit 1 every 4 ns, bit 0 every 8 ns) for 20 ns;
//   - all 256 operand pairs;
//   - 2000 random pairs with random settling gaps.
// It also counts how often each internal event of the default structure
// happens (carry c1 out of the first adder, carry c2 out of the second,
// the merged carry into the third adder, a carry rippling out of the
// third adder's low half) and fails if any of them never happens, or if
// c1 and c2 are ever set together, or if s8 is ever set.
module vedic_mul4_tb;

  import vedic_pkg::*;

  logic [3:0] a, b;
  logic [7:0] p_rca, p_arr;
  logic       s8_rca, s8_arr;
  int         checks = 0, failures = 0;
  int         n_c1 = 0, n_c2 = 0, n_c = 0, n_hi_carry = 0, n_both = 0;

  vedic_mul4 #(.STRUCTURE(MUL4_VEDIC_RCA)) dut_rca (
    .a(a), .b(b), .p(p_rca), .s8(s8_rca)
  );
  vedic_mul4 #(.STRUCTURE(MUL4_FA_HA)) dut_arr (
    .a(a), .b(b), .p(p_arr), .s8(s8_arr)
  );

  task automatic apply(input logic [3:0] x, input logic [3:0] y, input int gap);
    logic [7:0] exp;
    a = x; b = y;
    #(gap);
    exp = 8'(int'(x) * int'(y));
    checks++;
    if (p_rca !== exp || s8_rca !== 1'b0) begin
      failures++;
      $display("FAIL rca   %0d * %0d -> %0d s8=%b", x, y, p_rca, s8_rca);
    end
    checks++;
    if (p_arr !== exp || s8_arr !== 1'b0) begin
      failures++;
      $display("FAIL array %0d * %0d -> %0d s8=%b", x, y, p_arr, s8_arr);
    end
    // events inside the default structure
    if (dut_rca.g_rca.u_mul.c1) n_c1++;
    if (dut_rca.g_rca.u_mul.c2) n_c2++;
    if (dut_rca.g_rca.u_mul.c)  n_c++;
    if (dut_rca.g_rca.u_mul.c1 && dut_rca.g_rca.u_mul.c2) n_both++;
    if (dut_rca.g_rca.u_mul.u_add3.c[2]) n_hi_carry++;
  endtask

  task automatic require(input int count, input string what);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL never seen: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] v;
    apply(4'b1011, 4'b0110, 1);
    checks++;
    if (p_rca !== 8'b0100_0010) begin
      failures++;
      $display("FAIL worked example p=%b", p_rca);
    end
    // squaring sweep, 1 ns steps over 20 ns
    for (int t = 0; t < 20; t++) begin
      v = {1'((t / 8) % 2), 1'((t / 4) % 2), 1'((t / 2) % 2), 1'(t % 2)};
      v = {v[0], v[1], v[2], v[3]};  // bit 0 is the slowest train
      apply(v, v, 1);
    end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) apply(4'(x), 4'(y), 1);
    for (int i = 0; i < 2000; i++)
      apply(4'($urandom), 4'($urandom), 1 + int'($urandom_range(0, 3)));

    require(n_c1, "carry c1 out of first adder");
    require(n_c2, "carry c2 out of second adder");
    require(n_c, "merged carry into third adder");
    require(n_hi_carry, "carry inside third adder (bit 1 -> 2)");
    checks++;
    if (n_both != 0) begin
      failures++;
      $display("FAIL c1 and c2 set together %0d times", n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
