// exp_comp: exponent compare circuit of the fused dot-product unit.
//
// For each product an adder sums the two operand exponents, a second adder
// applies the product normalisation (the overflow bit: +1 when the raw
// product has its leading one at bit 21, i.e. lz = 0) and a subtracter
// re-biases from two binary16 biases to the binary32 bias:
//   exp = ea + eb - lz + (127 + 1 - 2*15).
// A zero product gets exponent 0. Two 2:1 muxes steered by A*B > C*D pick the
// bigger and smaller exponent; their difference is the alignment shift. The
// result exponent is the bigger exponent minus the adjust reported by the
// normaliser/rounder. The adder/mux/subtracter arrangement follows the
// design; folding the subnormal normalisation shift into the overflow adder
// is this implementation's. Purely combinational.
module exp_comp
  import fdp_pkg::*;
(
  input  logic [H_EXP_W-1:0]   a_exp,      // effective exponents (1 for subnormals)
  input  logic [H_EXP_W-1:0]   b_exp,
  input  logic [H_EXP_W-1:0]   c_exp,
  input  logic [H_EXP_W-1:0]   d_exp,
  input  logic [4:0]           ab_lz,
  input  logic [4:0]           cd_lz,
  input  logic                 ab_zero,
  input  logic                 cd_zero,
  input  logic                 ab_gt_cd,
  input  logic signed [6:0]    exp_adjust,
  output logic [PEXP_W-1:0]    ab_exp,
  output logic [PEXP_W-1:0]    cd_exp,
  output logic [PEXP_W-1:0]    big_exp,
  output logic [PEXP_W-1:0]    align_shift,
  output logic signed [9:0]    result_exp
);
  logic [PEXP_W-1:0] small_exp;

  always_comb begin
    ab_exp      = ab_zero ? '0 : PEXP_W'(a_exp) + PEXP_W'(b_exp) - PEXP_W'(ab_lz) + PEXP_W'(PROD_EXP_OFS);
    cd_exp      = cd_zero ? '0 : PEXP_W'(c_exp) + PEXP_W'(d_exp) - PEXP_W'(cd_lz) + PEXP_W'(PROD_EXP_OFS);
    big_exp     = ab_gt_cd ? ab_exp : cd_exp;
    small_exp   = ab_gt_cd ? cd_exp : ab_exp;
    align_shift = big_exp - small_exp;
    result_exp  = $signed({1'b0, big_exp}) - 10'(exp_adjust);
  end
endmodule
