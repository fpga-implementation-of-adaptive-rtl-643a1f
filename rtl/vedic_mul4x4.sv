// vedic_mul4x4: unsigned 4x4 Urdhva Tiryakbhyam (vertically and
// crosswise) multiplier.
//
// Four 2x2 Vedic multipliers form the vertical products AL*BL and AH*BH
// and the crosswise products AL*BH and AH*BL of the operand halves; the
// carry-save stage vedic_combine adds them into the 8-bit product.
// Building each level from four multipliers of half the width is the
// design's hierarchy (2x2 -> 4x4 -> 8x8 -> 16x16). Purely combinational.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] p_ll, p_lh, p_hl, p_hh;

  vedic_mul2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(p_ll));
  vedic_mul2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(p_lh));
  vedic_mul2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(p_hl));
  vedic_mul2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(p_hh));

  vedic_combine #(.N(4)) u_add (.p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .p(p));
endmodule
