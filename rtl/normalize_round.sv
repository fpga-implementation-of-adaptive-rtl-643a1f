// normalize_round: normalisation, rounding and post-normalisation.
//
// The non-negative WIN-bit sum is shifted left until its leading one reaches
// bit WIN-1. For an effective subtraction the shift is the LZA count, plus
// one when the LZA came out one short (bit WIN-1 still zero after the
// shift); for an addition it is the leading-zero count of the sum. The top
// 24 bits form the significand, the next bit is the guard bit and the OR of
// the rest the sticky bit; rounding is to nearest, ties to even. A carry out
// of the rounding increment (significand 1.111.. rounding up to 10.000..)
// is the post-normalisation. exp_adjust = shift - 1 - round_carry is
// subtracted from the bigger product exponent by the exponent compare block.
// The normalise/round/post-normalise chain is the design's; the rounding
// mode is this implementation's. Combinational.
module normalize_round
  import fdp_pkg::*;
#(
  parameter int unsigned W  = WIN,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]          sum,
  input  logic                  sub,
  input  logic [CW-1:0]         lza_shift,
  output logic [S_FRAC_W-1:0]   frac,
  output logic signed [6:0]     exp_adjust,
  output logic                  is_zero
);
  logic [CW-1:0]       add_shift, shift;
  logic [W-1:0]        n1, n;
  logic [S_FRAC_W:0]   mant;
  logic [S_FRAC_W+1:0] rounded;
  logic                guard, st, up, rcarry;

  lzd #(.W(W)) u_lzd (.y(sum), .count(add_shift));

  always_comb begin
    is_zero = (sum == '0);
    n1      = sum << (sub ? lza_shift : add_shift);
    shift   = sub ? lza_shift : add_shift;
    n       = n1;
    if (!n1[W-1] && !is_zero) begin
      n     = n1 << 1;
      shift = shift + 1'b1;
    end
    mant       = n[W-1 -: S_FRAC_W+1];
    guard      = n[W-2-S_FRAC_W];
    st         = |n[W-3-S_FRAC_W:0];
    up         = guard & (st | mant[0]);
    rounded    = {1'b0, mant} + (S_FRAC_W+2)'(up);
    rcarry     = rounded[S_FRAC_W+1];
    frac       = rcarry ? '0 : rounded[S_FRAC_W-1:0];
    exp_adjust = 7'(shift) - 7'sd1 - 7'(rcarry);
  end
endmodule
