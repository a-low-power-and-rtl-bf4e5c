// half_adder: 1-bit half adder built from a GDI XOR and a GDI AND.
//
// sum = a ^ b, carry = a & b. Six transistors in GDI form.
//
// Interface: a, b in; sum, carry out. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  gdi_xor u_xor (.a(a), .b(b), .y(sum));
  gdi_and u_and (.a(a), .b(b), .y(carry));

endmodule
