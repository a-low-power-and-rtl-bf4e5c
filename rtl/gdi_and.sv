// gdi_and: 2-input AND gate made of a single GDI cell (two transistors).
//
// With G = a, N = b and P tied low, the cell passes b when a is high and
// 0 when a is low, which is a & b.
//
// Interface: a, b in; y out. Combinational.
module gdi_and (
  input  logic a,
  input  logic b,
  output logic y
);

  gdi_cell u_cell (.g(a), .p(1'b0), .n(b), .y(y));

endmodule
