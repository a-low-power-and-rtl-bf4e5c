// gdi_cell: logic model of the basic Gate Diffusion Input (GDI) cell.
//
// The cell is one PMOS and one NMOS transistor sharing the gate input G.
// Unlike a CMOS inverter, the PMOS source (P) and the NMOS source (N) are
// free inputs instead of supply rails, so the pair acts as a 2:1 selector:
// G = 0 turns the PMOS on and passes P, G = 1 turns the NMOS on and passes
// N. Tying P and N to constants or to other signals gives AND, OR, NOT,
// MUX and the two functions F1 = ~A&B and F2 = ~A|B with two transistors.
//
// Interface: g, p, n in; y out. Purely combinational, no clock.
// The selector function follows the cell's published truth table; the
// reduced output swing of a real GDI pass transistor is not modelled.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic y
);

  always_comb y = g ? n : p;

endmodule
