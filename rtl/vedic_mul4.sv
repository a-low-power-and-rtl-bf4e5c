// vedic_mul4: top of the 4-bit Vedic multiplier.
//
// Multiplies two unsigned 4-bit operands into an 8-bit product with pure
// combinational logic made of GDI gates. The parameter STRUCTURE picks
// the internal structure:
//   MUL4_VEDIC_RCA (default): four 2x2 Vedic multipliers whose partial
//     products are summed by three 4-bit ripple carry adders and an OR
//     gate (vedic_mul4_rca). This is the structure built and counted at
//     transistor level (4 x 20 + 3 x 40 = 200 transistors in GDI form).
//   MUL4_FA_HA: the same product drawn as an array of 16 AND gates,
//     8 full adders and 4 half adders (vedic_mul4_array).
// Both give p = a * b for every input pair.
//
// Interface: a, b [3:0] in; p [7:0] out; s8 out is the carry out of the
// last ripple carry adder (always 0 for 4-bit operands, and tied 0 in the
// array structure, which has no such adder). No clock and no reset: the
// product is valid one combinational delay after the operands settle.
module vedic_mul4
  import vedic_pkg::*;
#(
  parameter mul4_struct_e STRUCTURE = MUL4_VEDIC_RCA
) (
  input  logic [OPW-1:0] a,
  input  logic [OPW-1:0] b,
  output logic [PW-1:0]  p,
  output logic           s8
);

  if (STRUCTURE == MUL4_VEDIC_RCA) begin : g_rca
    vedic_mul4_rca u_mul (.a(a), .b(b), .p(p), .s8(s8));
  end else begin : g_array
    vedic_mul4_array u_mul (.a(a), .b(b), .p(p));
    assign s8 = 1'b0;
  end

endmodule
