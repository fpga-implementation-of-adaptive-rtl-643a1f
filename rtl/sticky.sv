// sticky: sticky-bit generation for the aligned smaller product.
//
// The smaller product is shifted right by the same amount as in the align
// block, into an extension of PROD_W bits below the window; the OR of
// everything that lands there (or further, for very large shifts) is the
// sticky bit, which is ORed into bit 0 of the aligned window word. The
// rounder later sees it as "something non-zero below the round bit". The
// function is the design's; the placement at the window LSB is this
// implementation's. Combinational.
module sticky
  import fdp_pkg::*;
#(
  parameter int unsigned W = WIN
) (
  input  logic [PROD_W-1:0] small_sig,
  input  logic [PEXP_W-1:0] shift,
  input  logic [W-1:0]      small_win,
  output logic [W-1:0]      small_st,
  output logic              sticky_bit
);
  localparam int unsigned XW = W + PROD_W;
  logic [XW-1:0]     ext;
  logic [PEXP_W-1:0] s_c;

  always_comb begin
    s_c        = (32'(shift) > W - 1) ? PEXP_W'(W - 1) : shift;
    ext        = {1'b0, small_sig, {(XW-1-PROD_W){1'b0}}} >> s_c;
    sticky_bit = |ext[PROD_W-1:0];
    small_st   = small_win | W'(sticky_bit);
  end
endmodule
