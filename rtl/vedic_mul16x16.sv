// vedic_mul16x16: unsigned 16x16 Urdhva Tiryakbhyam (vertically and
// crosswise) multiplier.
//
// Four 8x8 Vedic multipliers form the vertical products AL*BL and AH*BH
// and the crosswise products AL*BH and AH*BL of the operand halves; the
// carry-save stage vedic_combine adds them into the 32-bit product.
// Building each level from four multipliers of half the width is the
// design's hierarchy (2x2 -> 4x4 -> 8x8 -> 16x16). Purely combinational.
module vedic_mul16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] p_ll, p_lh, p_hl, p_hh;

  vedic_mul8x8 u_ll (.a(a[7:0]), .b(b[7:0]), .p(p_ll));
  vedic_mul8x8 u_lh (.a(a[7:0]), .b(b[15:8]), .p(p_lh));
  vedic_mul8x8 u_hl (.a(a[15:8]), .b(b[7:0]), .p(p_hl));
  vedic_mul8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(p_hh));

  vedic_combine #(.N(16)) u_add (.p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .p(p));
endmodule
