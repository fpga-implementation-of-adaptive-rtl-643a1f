// mag_compare: magnitude comparator of the two normalised products.
//
// ab_gt_cd is high when |A*B| > |C*D|: a larger biased exponent wins, equal
// exponents are decided by the significands. A zero product carries exponent
// 0 and significand 0, so it never wins. The comparator block and its
// A*B > C*D output are the design's; comparing the complete magnitude
// (rather than the exponents alone) is this implementation's choice, so the
// later subtraction big - small is never negative. Purely combinational.
module mag_compare
  import fdp_pkg::*;
(
  input  logic [PEXP_W-1:0] ab_exp,
  input  logic [PROD_W-1:0] ab_sig,
  input  logic [PEXP_W-1:0] cd_exp,
  input  logic [PROD_W-1:0] cd_sig,
  output logic              ab_gt_cd
);
  always_comb ab_gt_cd = {ab_exp, ab_sig} > {cd_exp, cd_sig};
endmodule
