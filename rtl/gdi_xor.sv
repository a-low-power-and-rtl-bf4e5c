// gdi_xor: 2-input XOR gate made of two GDI cells (four transistors).
//
// The first cell is a GDI inverter (P high, N low) that forms ~a. The
// second cell is gated by b: when b is high its NMOS passes ~a, when b is
// low its PMOS passes a, so y = b ? ~a : a = a ^ b. This is the
// inverter-plus-pass-pair arrangement of the four-transistor XOR.
//
// Interface: a, b in; y out. Combinational.
module gdi_xor (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n;

  gdi_cell u_inv (.g(a), .p(1'b1), .n(1'b0), .y(a_n));
  gdi_cell u_sel (.g(b), .p(a),    .n(a_n),  .y(y));

endmodule
