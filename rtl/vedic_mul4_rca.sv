// vedic_mul4_rca: 4x4-bit Vedic multiplier built from four 2x2 Vedic
// multipliers and three 4-bit ripple carry adders.
//
// Splitting each operand into 2-bit halves (aH, aL, bH, bL), the
// vertically-and-crosswise rule gives
//   a*b = (aH bH) << 4  +  (aH bL + aL bH) << 2  +  aL bL.
// The four 2x2 products come from vedic_mul2 blocks. Then:
//   RCA 1:  aH bL + aL bH                         -> 4-bit sum, carry c1
//   RCA 2:  that sum + {00, (aL bL)[3:2]}          -> s2, carry c2
//   OR:     c = c1 | c2
//   RCA 3:  aH bH + {0, c, s2[3:2]}                -> p[7:4], carry s8
// and the product is the concatenation {p[7:4], s2[1:0], (aL bL)[1:0]}.
// The middle column sum aH bL + aL bH + (aL bL)[3:2] is at most
// 9 + 9 + 2 = 20, so c1 and c2 are never both set and the OR combines them
// without loss; for the same reason s8 is always 0 for 4-bit operands. It
// is still brought out because the structure has it.
// The 2x2 blocks, the three RCAs with carry in tied low and the OR that
// merges c1 and c2 follow the published block diagram; which RCA operand
// each signal drives is this design's reading of it.
//
// Interface: a, b [3:0] in; p [7:0] = a * b, s8 out. Combinational; the
// longest path runs through a 2x2 block and the three RCAs in series.
module vedic_mul4_rca
  import vedic_pkg::*;
(
  input  logic [OPW-1:0] a,
  input  logic [OPW-1:0] b,
  output logic [PW-1:0]  p,
  output logic           s8
);

  logic [3:0] q_ll, q_hl, q_lh, q_hh;  // aL*bL, aH*bL, aL*bH, aH*bH
  logic [3:0] mid, s2;
  logic       c1, c2, c;

  vedic_mul2 u_mul_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  vedic_mul2 u_mul_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  vedic_mul2 u_mul_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  vedic_mul2 u_mul_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  rca #(.WIDTH(4)) u_add1 (
    .a(q_hl), .b(q_lh), .cin(1'b0), .s(mid), .cout(c1)
  );

  rca #(.WIDTH(4)) u_add2 (
    .a(mid), .b({2'b00, q_ll[3:2]}), .cin(1'b0), .s(s2), .cout(c2)
  );

  gdi_or u_or (.a(c1), .b(c2), .y(c));

  rca #(.WIDTH(4)) u_add3 (
    .a(q_hh), .b({1'b0, c, s2[3:2]}), .cin(1'b0), .s(p[7:4]), .cout(s8)
  );

  assign p[3:0] = {s2[1:0], q_ll[1:0]};

endmodule
