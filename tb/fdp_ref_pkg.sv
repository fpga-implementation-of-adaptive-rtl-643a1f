// fdp_ref_pkg: reference model for the testbenches.
//
// ref_fdp computes A*B + C*D (or A*B - C*D) of binary16 operands exactly in
// 128-bit integer arithmetic and rounds the exact value once to binary32,
// nearest-even. It shares no code or method with the RTL datapath: the two
// products are scaled to a common exponent, added as signed integers, and
// the sum is rounded from its integer bit pattern.
package fdp_ref_pkg;
  typedef logic signed [127:0] big_t;

  function automatic logic is_nan16(logic [15:0] h);
    return h[14:10] == 5'h1F && h[9:0] != 0;
  endfunction
  function automatic logic is_inf16(logic [15:0] h);
    return h[14:10] == 5'h1F && h[9:0] == 0;
  endfunction
  function automatic logic is_zero16(logic [15:0] h);
    return h[14:0] == 0;
  endfunction

  function automatic logic [31:0] ref_fdp(logic [15:0] a, logic [15:0] b,
                                          logic [15:0] c, logic [15:0] d, logic op);
    logic sab, scd;
    int   ea, eb, ec, ed, eab, ecd, emin, k, sh;
    big_t ma, mb, mc, md, pab, pcd, s, m, rem, half, mant;
    logic sign;
    sab = a[15] ^ b[15];
    scd = c[15] ^ d[15] ^ op;
    if (is_nan16(a) || is_nan16(b) || is_nan16(c) || is_nan16(d)) return 32'h7FC00000;
    if ((is_inf16(a) && is_zero16(b)) || (is_inf16(b) && is_zero16(a)) ||
        (is_inf16(c) && is_zero16(d)) || (is_inf16(d) && is_zero16(c))) return 32'h7FC00000;
    if ((is_inf16(a) || is_inf16(b)) && (is_inf16(c) || is_inf16(d)) && sab != scd) return 32'h7FC00000;
    if (is_inf16(a) || is_inf16(b)) return {sab, 8'hFF, 23'd0};
    if (is_inf16(c) || is_inf16(d)) return {scd, 8'hFF, 23'd0};
    ma = big_t'({a[14:10] != 0, a[9:0]});  ea = (a[14:10] == 0) ? 1 : int'(a[14:10]);
    mb = big_t'({b[14:10] != 0, b[9:0]});  eb = (b[14:10] == 0) ? 1 : int'(b[14:10]);
    mc = big_t'({c[14:10] != 0, c[9:0]});  ec = (c[14:10] == 0) ? 1 : int'(c[14:10]);
    md = big_t'({d[14:10] != 0, d[9:0]});  ed = (d[14:10] == 0) ? 1 : int'(d[14:10]);
    pab = ma * mb;  eab = ea + eb - 50;     // value = pab * 2^eab
    pcd = mc * md;  ecd = ec + ed - 50;
    emin = (eab < ecd) ? eab : ecd;
    s = (sab ? -(pab <<< (eab - emin)) : (pab <<< (eab - emin)))
      + (scd ? -(pcd <<< (ecd - emin)) : (pcd <<< (ecd - emin)));
    if (s == 0) return {(pab == 0) && (pcd == 0) && sab && scd, 31'd0};
    sign = s < 0;
    m = sign ? -s : s;
    k = 0;
    for (int i = 0; i < 127; i++) if (m[i]) k = i;
    if (k > 23) begin
      sh   = k - 23;
      mant = m >>> sh;
      rem  = m - (mant <<< sh);
      half = big_t'(1) <<< (sh - 1);
      if (rem > half || (rem == half && mant[0])) mant = mant + 1;
      if (mant == (big_t'(1) <<< 24)) begin
        mant = mant >>> 1;
        k = k + 1;
      end
    end else begin
      mant = m <<< (23 - k);
    end
    return {sign, 8'(k + emin + 127), mant[22:0]};
  endfunction
endpackage
