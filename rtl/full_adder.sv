// full_adder: 1-bit full adder built from GDI gates.
//
// The sum is the three-input XOR of a, b and c, formed as two chained
// 2-input GDI XORs. The carry is the majority function, formed as the OR
// of the three pairwise ANDs (a&b, b&c, a&c); the three-input OR is two
// chained 2-input GDI ORs.
//
// Interface: a, b, c in; sum, carry out. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic ab_x;
  logic ab, bc, ac, ab_or_bc;

  gdi_xor u_xor0 (.a(a),    .b(b), .y(ab_x));
  gdi_xor u_xor1 (.a(ab_x), .b(c), .y(sum));

  gdi_and u_and_ab (.a(a), .b(b), .y(ab));
  gdi_and u_and_bc (.a(b), .b(c), .y(bc));
  gdi_and u_and_ac (.a(a), .b(c), .y(ac));

  gdi_or  u_or0 (.a(ab),       .b(bc), .y(ab_or_bc));
  gdi_or  u_or1 (.a(ab_or_bc), .b(ac), .y(carry));

endmodule
