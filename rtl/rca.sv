// rca: WIDTH-bit ripple carry adder (default 4 bits).
//
// A chain of WIDTH full adders; the carry out of stage i is the carry in
// of stage i+1. s = a + b + cin, with the carry out of the top stage
// brought out as cout. The 4-bit default is the adder the 4-bit Vedic
// multiplier uses three times; there the carry in is tied low.
//
// Interface: a, b [WIDTH-1:0], cin in; s [WIDTH-1:0], cout out.
// Combinational; the worst-case path ripples through all WIDTH stages.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .c    (c[i]),
      .sum  (s[i]),
      .carry(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
