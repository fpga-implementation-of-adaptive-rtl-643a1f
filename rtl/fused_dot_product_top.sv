// fused_dot_product_top: aging-aware floating-point fused two-term dot product.
//
// Computes fmma_result = A*B + C*D (op = 0) or A*B - C*D (op = 1) from four
// IEEE-754 binary16 operands and returns an IEEE-754 binary32 result rounded
// once (round to nearest, ties to even); the products themselves are never
// rounded. The two 11x11-bit significand products are formed by two
// variable-latency Vedic multipliers (vedic_ahl_unit), each with its own
// adaptive hold logic and Razor output register. The floating-point part
// follows the fused dot-product datapath: exponent compare, magnitude
// compare, alignment with sticky bit, two's complement of the smaller
// product on effective subtraction, 4:2 carry-save compressor and adder,
// leading-zero anticipation, normalisation and rounding.
//
// Two bypass paths, as in the original, let the unit stand in for a plain
// adder or a plain multiplier. When |B| = |D| = 1.0 the multipliers are not
// started: multiplexers pass the significands of A and C on as the products
// (adder use). When one product is zero (A or B = 0, or C or D = 0) and the
// other is not, the other product is forwarded straight to the result,
// around alignment, addition and normalisation (it is exact in binary32).
//
// Interface and timing: operands are taken on a clk edge with in_valid and
// in_ready high. The multipliers start at that edge and deliver after 2 or
// 3 edges (one-cycle or two-cycle pattern, or Razor recovery). In the cycle
// in which both products are available the result is computed and
// registered: out_valid is high for one cycle with fmma_result, 2 or 3 edges
// after the accepting edge, or 1 edge in adder use. in_ready is low from
// acceptance until out_valid. dclk is
// the delayed clock of the Razor shadow latches: high for a short time after
// each rising clk edge. razor_error, two_cycle and aging report, per
// multiplier (bit 0: A*B, bit 1: C*D), what happened in the last operation
// (both zero after adder use).
//
// The block structure is the design's. The number formats, the handshake,
// the IEEE special-value rules (NaN, infinities, signed zero) and the
// comparison of full product magnitudes (so the difference is never
// negative and no result complement is needed) are this implementation's.
module fused_dot_product_top
  import fdp_pkg::*;
#(
  parameter int unsigned N_ZEROS       = 8,
  parameter int unsigned AGE_WINDOW    = 64,
  parameter int unsigned AGE_THRESHOLD = 4
) (
  input  logic        clk,
  input  logic        dclk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [15:0] c,
  input  logic [15:0] d,
  input  logic        op,
  output logic        out_valid,
  output logic [31:0] fmma_result,
  output logic [1:0]  razor_error,
  output logic [1:0]  two_cycle,
  output logic [1:0]  aging
);
  localparam int unsigned CW = $clog2(WIN + 1);

  typedef enum logic {S_IDLE, S_WAIT} state_t;
  state_t state;

  half_t  a_r, b_r, c_r, d_r;
  logic   op_r, add_use, byp_r;
  logic [1:0]  unit_two;
  logic   accept, ab_ready, cd_ready, ab_done, cd_done, ab_have, cd_have, both;
  logic   ab_rz, cd_rz;
  logic [31:0] ab_p, cd_p;

  // ---------------------------------------------------------------- input
  function automatic logic [15:0] sig16(half_t h);
    return 16'({h.exp != '0, h.frac});
  endfunction

  function automatic logic [H_EXP_W-1:0] eff_exp(half_t h);
    return (h.exp == '0) ? H_EXP_W'(1) : h.exp;
  endfunction

  always_comb begin
    in_ready = (state == S_IDLE) && ab_ready && cd_ready;
    accept   = in_valid && in_ready;
    add_use  = (b[14:0] == 15'h3C00) && (d[14:0] == 15'h3C00);
  end

  // --------------------------------------------------------- multipliers
  vedic_ahl_unit #(.N_ZEROS(N_ZEROS), .AGE_WINDOW(AGE_WINDOW),
                   .AGE_THRESHOLD(AGE_THRESHOLD)) u_ab (
    .clk(clk), .dclk(dclk), .rst_n(rst_n), .start(accept && !add_use), .ready(ab_ready),
    .a(sig16(a)), .b(sig16(b)), .done(ab_done), .product(ab_p),
    .razor_err(ab_rz), .two_cycle(unit_two[0]), .aging(aging[0]));

  vedic_ahl_unit #(.N_ZEROS(N_ZEROS), .AGE_WINDOW(AGE_WINDOW),
                   .AGE_THRESHOLD(AGE_THRESHOLD)) u_cd (
    .clk(clk), .dclk(dclk), .rst_n(rst_n), .start(accept && !add_use), .ready(cd_ready),
    .a(sig16(c)), .b(sig16(d)), .done(cd_done), .product(cd_p),
    .razor_err(cd_rz), .two_cycle(unit_two[1]), .aging(aging[1]));

  // Adder-use bypass: a significand times 1.0 is the significand shifted by
  // the 10 fraction bits of the 1.0 operand, exactly what the multiplier
  // would deliver.
  logic [31:0] ab_prod, cd_prod;
  always_comb begin
    ab_prod   = byp_r ? {6'd0, sig16(a_r), 10'd0} : ab_p;
    cd_prod   = byp_r ? {6'd0, sig16(c_r), 10'd0} : cd_p;
    two_cycle = byp_r ? 2'b00 : unit_two;
    both = (state == S_WAIT) &&
           (byp_r || ((ab_have || ab_done) && (cd_have || cd_done)));
  end

  // ------------------------------------------------------- FP datapath
  logic [PROD_W-1:0] ab_sig, cd_sig, small_sig;
  logic [4:0]        ab_lz, cd_lz;
  logic              ab_zero, cd_zero, ab_gt_cd;
  logic [PEXP_W-1:0] ab_exp, cd_exp, big_exp, align_shift;
  logic signed [9:0] result_exp;
  logic signed [6:0] exp_adjust;
  logic [WIN-1:0]    big_win, small_win, small_st, cpl_x, cpl_one, sum;
  logic [CW-1:0]     lza_shift;
  logic [S_FRAC_W-1:0] frac;
  logic              sticky_bit, sum_zero, s_ab, s_cd, sub;

  prod_normalize #(.PW(PROD_W)) u_nab (.raw(ab_prod[PROD_W-1:0]), .sig(ab_sig), .lz(ab_lz), .zero(ab_zero));
  prod_normalize #(.PW(PROD_W)) u_ncd (.raw(cd_prod[PROD_W-1:0]), .sig(cd_sig), .lz(cd_lz), .zero(cd_zero));

  exp_comp u_exp (
    .a_exp(eff_exp(a_r)), .b_exp(eff_exp(b_r)), .c_exp(eff_exp(c_r)), .d_exp(eff_exp(d_r)),
    .ab_lz(ab_lz), .cd_lz(cd_lz), .ab_zero(ab_zero), .cd_zero(cd_zero),
    .ab_gt_cd(ab_gt_cd), .exp_adjust(exp_adjust),
    .ab_exp(ab_exp), .cd_exp(cd_exp), .big_exp(big_exp), .align_shift(align_shift),
    .result_exp(result_exp));

  mag_compare u_cmp (.ab_exp(ab_exp), .ab_sig(ab_sig), .cd_exp(cd_exp), .cd_sig(cd_sig),
                     .ab_gt_cd(ab_gt_cd));

  always_comb begin
    s_ab = a_r.sign ^ b_r.sign;
    s_cd = c_r.sign ^ d_r.sign ^ op_r;
    sub  = s_ab ^ s_cd;
  end

  align #(.W(WIN)) u_align (.ab_sig(ab_sig), .cd_sig(cd_sig), .ab_gt_cd(ab_gt_cd),
    .shift(align_shift), .small_sig(small_sig), .big_win(big_win), .small_win(small_win));

  sticky #(.W(WIN)) u_sticky (.small_sig(small_sig), .shift(align_shift),
    .small_win(small_win), .small_st(small_st), .sticky_bit(sticky_bit));

  comp_2s #(.W(WIN)) u_c2s (.x(small_st), .sub(sub), .x_out(cpl_x), .one_out(cpl_one));

  // The products arrive as complete words, so the fourth compressor row is
  // unused.
  csa_4_2 #(.W(WIN)) u_csa (.in0(big_win), .in1(cpl_x), .in2(cpl_one), .in3('0), .sum(sum));

  lza #(.W(WIN)) u_lza (.a(big_win), .b(small_st), .shift(lza_shift));

  normalize_round #(.W(WIN)) u_norm (.sum(sum), .sub(sub), .lza_shift(lza_shift),
    .frac(frac), .exp_adjust(exp_adjust), .is_zero(sum_zero));

  // ------------------------------------------------- special values, pack
  logic        a_nan, b_nan, c_nan, d_nan, a_inf, b_inf, c_inf, d_inf;
  logic        a_z, b_z, c_z, d_z, ab_inf, cd_inf, res_nan, fwd_ab, fwd_cd;
  logic [31:0] result;

  always_comb begin
    a_nan = (a_r.exp == '1) && (a_r.frac != '0);
    b_nan = (b_r.exp == '1) && (b_r.frac != '0);
    c_nan = (c_r.exp == '1) && (c_r.frac != '0);
    d_nan = (d_r.exp == '1) && (d_r.frac != '0);
    a_inf = (a_r.exp == '1) && (a_r.frac == '0);
    b_inf = (b_r.exp == '1) && (b_r.frac == '0);
    c_inf = (c_r.exp == '1) && (c_r.frac == '0);
    d_inf = (d_r.exp == '1) && (d_r.frac == '0);
    a_z   = ({a_r.exp, a_r.frac} == '0);
    b_z   = ({b_r.exp, b_r.frac} == '0);
    c_z   = ({c_r.exp, c_r.frac} == '0);
    d_z   = ({d_r.exp, d_r.frac} == '0);
    ab_inf  = a_inf || b_inf;
    cd_inf  = c_inf || d_inf;
    res_nan = a_nan || b_nan || c_nan || d_nan
           || (a_inf && b_z) || (b_inf && a_z) || (c_inf && d_z) || (d_inf && c_z)
           || (ab_inf && cd_inf && sub);
    // Single-multiply forwarding: a product normalised to bit PROD_W-1 with
    // its binary32 exponent is already a binary32 number.
    fwd_ab = cd_zero && !ab_zero;
    fwd_cd = ab_zero && !cd_zero;
    if (res_nan)
      result = QNAN32;
    else if (ab_inf)
      result = {s_ab, 8'hFF, 23'd0};
    else if (cd_inf)
      result = {s_cd, 8'hFF, 23'd0};
    else if (fwd_ab)
      result = {s_ab, ab_exp[7:0], ab_sig[PROD_W-2:0], (S_FRAC_W-PROD_W+1)'(0)};
    else if (fwd_cd)
      result = {s_cd, cd_exp[7:0], cd_sig[PROD_W-2:0], (S_FRAC_W-PROD_W+1)'(0)};
    else if (sum_zero)
      result = {ab_zero && cd_zero && s_ab && s_cd, 31'd0};
    else
      result = {ab_gt_cd ? s_ab : s_cd, result_exp[7:0], frac};
  end

  // ------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ab_have     <= 1'b0;
      cd_have     <= 1'b0;
      out_valid   <= 1'b0;
      fmma_result <= '0;
      razor_error <= '0;
      a_r <= '0; b_r <= '0; c_r <= '0; d_r <= '0; op_r <= 1'b0;
      byp_r       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (accept) begin
        a_r <= a; b_r <= b; c_r <= c; d_r <= d; op_r <= op;
        byp_r       <= add_use;
        state       <= S_WAIT;
        ab_have     <= 1'b0;
        cd_have     <= 1'b0;
        razor_error <= '0;
      end else if (state == S_WAIT) begin
        if (ab_done) ab_have <= 1'b1;
        if (cd_done) cd_have <= 1'b1;
        if (ab_rz)   razor_error[0] <= 1'b1;
        if (cd_rz)   razor_error[1] <= 1'b1;
        if (both) begin
          fmma_result <= result;
          out_valid   <= 1'b1;
          state       <= S_IDLE;
        end
      end
    end
  end

  // The rounded result of finite operands always fits binary32 normal range.
  assert property (@(posedge clk) disable iff (!rst_n)
    both && !res_nan && !ab_inf && !cd_inf && !sum_zero && !fwd_ab && !fwd_cd |-> result_exp > 0 && result_exp < 255);
endmodule
