// vedic_mul2: 2x2-bit Vedic (Urdhva Tiryakbhyam, "vertically and
// crosswise") multiplier.
//
// The vertical products give the outer bits and the crosswise products
// the middle column:
//   p[0]        = a0 b0                      (vertical, right)
//   p[1], k     = HA(a1 b0, a0 b1)           (crosswise)
//   p[2], p[3]  = HA(a1 b1, k)               (vertical, left, plus carry)
// Four GDI AND gates and two GDI half adders.
//
// Interface: a, b [1:0] in; p [3:0] out = a * b. Combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a0b0, a1b0, a0b1, a1b1;
  logic k;

  gdi_and u_and00 (.a(a[0]), .b(b[0]), .y(a0b0));
  gdi_and u_and10 (.a(a[1]), .b(b[0]), .y(a1b0));
  gdi_and u_and01 (.a(a[0]), .b(b[1]), .y(a0b1));
  gdi_and u_and11 (.a(a[1]), .b(b[1]), .y(a1b1));

  assign p[0] = a0b0;

  half_adder u_ha0 (.a(a1b0), .b(a0b1), .sum(p[1]), .carry(k));
  half_adder u_ha1 (.a(a1b1), .b(k),    .sum(p[2]), .carry(p[3]));

endmodule
