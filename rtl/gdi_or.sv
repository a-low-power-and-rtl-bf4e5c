// gdi_or: 2-input OR gate made of a single GDI cell (two transistors).
//
// With G = a, N tied high and P = b, the cell passes 1 when a is high and
// b when a is low, which is a | b.
//
// Interface: a, b in; y out. Combinational.
module gdi_or (
  input  logic a,
  input  logic b,
  output logic y
);

  gdi_cell u_cell (.g(a), .p(b), .n(1'b1), .y(y));

endmodule
