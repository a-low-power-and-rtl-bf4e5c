// vedic_mul4_array: 4x4-bit Vedic multiplier drawn as a flat array of
// AND gates, full adders (FA) and half adders (HA).
//
// The 16 partial products a[i]&b[j] (GDI AND gates) are summed column by
// column, as the vertically-and-crosswise rule does, in three rows:
//   row 1: one HA and four FAs compress columns 1 to 5
//          (column 5 also takes the carry of the column-4 FA);
//   row 2: two HAs clean up columns 3 and 4;
//   row 3: one HA and four FAs form a ripple chain over columns 2 to 6,
//          the last FA giving p[6] and p[7].
// The adder counts per row (1 HA + 4 FA, 2 HA, 1 HA + 4 FA: 8 FA and
// 4 HA in all) and the outputs p0..p7 follow the published drawing;
// which partial product goes to which adder input is this design's own
// assignment, since the drawing's wiring cannot be read reliably.
//
// Interface: a, b [3:0] in; p [7:0] = a * b out. Combinational.
module vedic_mul4_array
  import vedic_pkg::*;
(
  input  logic [OPW-1:0] a,
  input  logic [OPW-1:0] b,
  output logic [PW-1:0]  p
);

  // pp[i][j] = a[i] & b[j], weight 2**(i+j)
  logic [3:0][3:0] pp;

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      gdi_and u_and (.a(a[i]), .b(b[j]), .y(pp[i][j]));
    end
  end

  // row 1
  logic k2, s2, k3, s3, k4, s4, k5, s5, k6;
  half_adder u_r1_ha1 (.a(pp[1][0]), .b(pp[0][1]), .sum(p[1]), .carry(k2));
  full_adder u_r1_fa2 (.a(pp[2][0]), .b(pp[1][1]), .c(pp[0][2]), .sum(s2), .carry(k3));
  full_adder u_r1_fa3 (.a(pp[3][0]), .b(pp[2][1]), .c(pp[1][2]), .sum(s3), .carry(k4));
  full_adder u_r1_fa4 (.a(pp[3][1]), .b(pp[2][2]), .c(pp[1][3]), .sum(s4), .carry(k5));
  full_adder u_r1_fa5 (.a(pp[3][2]), .b(pp[2][3]), .c(k5),       .sum(s5), .carry(k6));

  // row 2
  logic t3, m4, t4, m5;
  half_adder u_r2_ha3 (.a(s3), .b(pp[0][3]), .sum(t3), .carry(m4));
  half_adder u_r2_ha4 (.a(s4), .b(k4),       .sum(t4), .carry(m5));

  // row 3: ripple chain
  logic r3, r4, r5, r6;
  half_adder u_r3_ha2 (.a(s2), .b(k2), .sum(p[2]), .carry(r3));
  full_adder u_r3_fa3 (.a(t3), .b(k3), .c(r3), .sum(p[3]), .carry(r4));
  full_adder u_r3_fa4 (.a(t4), .b(m4), .c(r4), .sum(p[4]), .carry(r5));
  full_adder u_r3_fa5 (.a(s5), .b(m5), .c(r5), .sum(p[5]), .carry(r6));
  full_adder u_r3_fa6 (.a(pp[3][3]), .b(k6), .c(r6), .sum(p[6]), .carry(p[7]));

  assign p[0] = pp[0][0];

endmodule
