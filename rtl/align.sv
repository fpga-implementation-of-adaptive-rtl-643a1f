// align: alignment of the two products in the adder window.
//
// The bigger product (by magnitude, ab_gt_cd) is placed with its leading one
// at bit WIN-2 of a WIN-bit window, leaving bit WIN-1 free for the carry of an
// addition. The smaller product starts at the same place and is shifted
// right by the exponent difference; bits that fall below bit 0 are dropped
// here and collected by the sticky block. The swap-and-shift function is the
// design's; the window width is this implementation's. Combinational.
module align
  import fdp_pkg::*;
#(
  parameter int unsigned W = WIN
) (
  input  logic [PROD_W-1:0] ab_sig,
  input  logic [PROD_W-1:0] cd_sig,
  input  logic              ab_gt_cd,
  input  logic [PEXP_W-1:0] shift,
  output logic [PROD_W-1:0] small_sig,
  output logic [W-1:0]      big_win,
  output logic [W-1:0]      small_win
);
  logic [PROD_W-1:0] big_sig;

  always_comb begin
    big_sig   = ab_gt_cd ? ab_sig : cd_sig;
    small_sig = ab_gt_cd ? cd_sig : ab_sig;
    big_win   = {1'b0, big_sig, {(W-1-PROD_W){1'b0}}};
    small_win = (32'(shift) >= W) ? '0 : ({1'b0, small_sig, {(W-1-PROD_W){1'b0}}} >> shift);
  end
endmodule
