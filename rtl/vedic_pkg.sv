// vedic_pkg: types and constants shared by the 4-bit Vedic multiplier.
//
// OPW is the operand width of the multiplier (4 bits) and PW the width of
// the full product (8 bits). mul4_struct_e selects which of the two 4-bit
// structures the top instantiates: the one built from 2-bit Vedic
// multipliers and ripple carry adders (the structure that is laid out and
// counted transistor by transistor), or the flat array of AND gates, full
// adders and half adders that the same method can also be drawn as.
package vedic_pkg;

  localparam int unsigned OPW = 4;
  localparam int unsigned PW  = 2 * OPW;

  typedef enum logic {
    MUL4_VEDIC_RCA = 1'b0,  // four 2x2 Vedic blocks + three 4-bit RCAs
    MUL4_FA_HA     = 1'b1   // AND array reduced by full and half adders
  } mul4_struct_e;

endpackage
