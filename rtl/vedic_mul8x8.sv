// vedic_mul8x8: unsigned 8x8 Urdhva Tiryakbhyam (vertically and
// crosswise) multiplier.
//
// Four 4x4 Vedic multipliers form the vertical products AL*BL and AH*BH
// and the crosswise products AL*BH and AH*BL of the operand halves; the
// carry-save stage vedic_combine adds them into the 16-bit product.
// Building each level from four multipliers of half the width is the
// design's hierarchy (2x2 -> 4x4 -> 8x8 -> 16x16). Purely combinational.
module vedic_mul8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  logic [7:0] p_ll, p_lh, p_hl, p_hh;

  vedic_mul4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(p_ll));
  vedic_mul4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(p_lh));
  vedic_mul4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(p_hl));
  vedic_mul4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(p_hh));

  vedic_combine #(.N(8)) u_add (.p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .p(p));
endmodule
