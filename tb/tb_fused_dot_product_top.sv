// tb_fused_dot_product_top: end-to-end test of the fused dot-product unit at
// its default parameters.
//
// Random binary16 operand sets (normal, subnormal, zero, infinity, NaN,
// near-cancelling pairs, B = D = 1 so that the unit acts as an adder, and
// A = 0 so that it acts as a single multiplier), with both operations, are compared with an exact
// integer reference rounded once to binary32. The latency of each operation
// is checked: 2 clk edges from acceptance to out_valid when both multipliers
// finish in one cycle, 3 when either takes two cycles or recovers from a
// Razor error, 1 in adder use (|B| = |D| = 1, multipliers bypassed). The
// forwarding of a single nonzero product around the adder is counted too.
//
// Aging is emulated by making some multiplier paths too slow: after a
// number of operations, a one-cycle operation whose multiplier operand has
// at most N_ZEROS+1 zeros gets a wrong product at the sampling clk edge
// (forced on the multiplier output around that edge only), while the
// delayed-clock shadow latches see the settled value. The Razor registers
// must detect and repair this, the aging indicator must trip, and the
// stricter judging block must then stop the errors. The test counts how
// often each mechanism occurred and fails if one never did.
module tb_fused_dot_product_top;
  import fdp_ref_pkg::*;

  localparam int N_OPS   = 3000;
  localparam int AGE_AT  = 400;     // operations before paths start to slow
  localparam int N_ZEROS = 8;       // default of the top

  logic clk = 1'b0, dclk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, op = 1'b0, out_valid;
  logic [15:0] a = '0, b = '0, c = '0, d = '0;
  logic [31:0] fmma_result;
  logic [1:0]  razor_error, two_cycle, aging;

  fused_dot_product_top dut (.*);

  // clk period 10; the delayed clock is high from 2 to 5 after each rise.
  always #5 clk = ~clk;
  always @(posedge clk) begin
    #2 dclk = 1'b1;
    #3 dclk = 1'b0;
  end

  int checks = 0, failures = 0, cycle = 0, n_done = 0;
  int n_one = 0, n_two = 0, n_rz = 0, n_inj = 0, n_sub = 0, n_cancel = 0, n_carry = 0;
  int n_round_up = 0, n_special = 0, n_zero = 0, n_abgt = 0, n_cdgt = 0, n_sticky = 0;
  int n_addmode = 0, n_mulmode = 0, n_byp = 0, n_fwd = 0;
  int n_aging_ab = 0, n_aging_cd = 0, n_err_after_aging = 0;
  bit aged = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int zeros16(logic [15:0] v);
    int z = 0;
    for (int i = 0; i < 16; i++) z += int'(!v[i]);
    return z;
  endfunction

  // ---- emulated slow multiplier paths (aging)
  task automatic inject_ab();
    logic [31:0] good;
    #4;
    good = dut.u_ab.mul_p;
    force dut.u_ab.mul_p = good ^ (32'h1 << $urandom_range(21, 0));
    #2;
    force dut.u_ab.mul_p = good;    // the late value settles before dclk
    release dut.u_ab.mul_p;
  endtask
  task automatic inject_cd();
    logic [31:0] good;
    #4;
    good = dut.u_cd.mul_p;
    force dut.u_cd.mul_p = good ^ (32'h1 << $urandom_range(21, 0));
    #2;
    force dut.u_cd.mul_p = good;
    release dut.u_cd.mul_p;
  endtask

  always @(negedge clk) begin
    if (aged && dut.u_ab.state == 2'd1 && !dut.u_ab.two_cycle &&
        zeros16(dut.u_ab.b_q) <= N_ZEROS + 1) begin
      n_inj++;
      if (dut.u_ab.aging) n_err_after_aging++;
      fork inject_ab(); join_none
    end
    if (aged && dut.u_cd.state == 2'd1 && !dut.u_cd.two_cycle &&
        zeros16(dut.u_cd.b_q) <= N_ZEROS + 1) begin
      n_inj++;
      if (dut.u_cd.aging) n_err_after_aging++;
      fork inject_cd(); join_none
    end
  end

  // ---- mechanism counters, sampled when a result is formed
  always @(posedge clk) begin
    if (rst_n && dut.both) begin
      if (dut.sub) n_sub++;
      if (dut.sub && !dut.sum_zero && dut.exp_adjust > 1) n_cancel++;
      if (!dut.sub && dut.sum[47]) n_carry++;
      if (dut.u_norm.up) n_round_up++;
      if (dut.sticky_bit) n_sticky++;
      if (dut.ab_gt_cd) n_abgt++; else n_cdgt++;
      if (dut.byp_r) n_byp++;
      if ((dut.fwd_ab || dut.fwd_cd) && !dut.res_nan && !dut.ab_inf && !dut.cd_inf) n_fwd++;
    end
  end

  // ---- operand generation
  function automatic logic [15:0] rand_half();
    int k = $urandom_range(99, 0);
    logic [15:0] h = 16'($urandom);
    if (k < 4)       h[14:0] = 15'd0;                               // zero
    else if (k < 10) h[14:10] = 5'd0;                               // subnormal
    else if (k < 12) h[14:0] = {5'h1F, 10'd0};                      // infinity
    else if (k == 12) h[14:0] = {5'h1F, 10'($urandom_range(1023, 1))}; // NaN
    else if (k < 70) h[14:10] = 5'($urandom_range(22, 8));          // moderate range
    else             h[14:10] = 5'($urandom_range(30, 1));          // any normal
    return h;
  endfunction

  initial begin
    logic [15:0] ta, tb_, tc, td;
    logic top;
    logic [31:0] exp_r;
    int t0, lat, exp_lat;
    bit byp;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < N_OPS; n++) begin
      ta = rand_half(); tb_ = rand_half(); tc = rand_half(); td = rand_half(); top = 1'($urandom);
      case ($urandom_range(11, 0))
        10: begin tb_ = 16'h3C00; td = 16'h3C00 | (td & 16'h8000); end         // B = D = +/-1: adder use
        11: begin ta = 16'h0000; end                                           // A = 0: single multiply of C*D
        0: begin tc = ta; td = tb_ ^ 16'h8000; top = 1'b0; end                 // exact cancellation
        1: begin tc = ta; td = tb_ + 16'(($urandom_range(1, 0) == 1) ? 1 : -1); top = 1'b1; end // near cancellation
        2: begin tc = ta; td = tb_ >> $urandom_range(3, 1); end
        default: ;
      endcase
      if (n == 0) begin
        // the operand bit patterns of the published simulation run
        ta = 16'd52; tb_ = 16'd104; tc = 16'd2; td = 16'd4; top = 1'b0;
      end
      if (n >= AGE_AT) aged = 1'b1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      a = ta; b = tb_; c = tc; d = td; op = top; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      t0 = cycle;
      while (!out_valid) @(negedge clk);
      lat = cycle - t0;
      exp_r = ref_fdp(ta, tb_, tc, td, top);
      check(fmma_result == exp_r, $sformatf("%h*%h %s %h*%h = %h, expected %h", ta, tb_,
            top ? "-" : "+", tc, td, fmma_result, exp_r));
      byp = (tb_[14:0] == 15'h3C00) && (td[14:0] == 15'h3C00);
      exp_lat = byp ? 1 : 2 + int'(|(two_cycle | razor_error));
      check(lat == exp_lat, $sformatf("latency %0d, expected %0d", lat, exp_lat));
      if (byp) n_addmode++;
      if (ta == 16'h0000) n_mulmode++;
      if (exp_r[30:23] == 8'hFF) n_special++;
      if (exp_r[30:0] == 0) n_zero++;
      if (!byp) begin
        n_two += int'(two_cycle[0]) + int'(two_cycle[1]);
        n_one += 2 - int'(two_cycle[0]) - int'(two_cycle[1]);
      end
      n_rz  += int'(razor_error[0]) + int'(razor_error[1]);
      n_done++;
    end
    n_aging_ab = int'(aging[0]);
    n_aging_cd = int'(aging[1]);
    $display("ops=%0d one-cycle=%0d two-cycle=%0d razor-errors=%0d injected=%0d after-aging=%0d",
             n_done, n_one, n_two, n_rz, n_inj, n_err_after_aging);
    $display("sub=%0d cancel=%0d add-carry=%0d round-up=%0d sticky=%0d special=%0d zero=%0d ab>cd=%0d cd>=ab=%0d aging=%b",
             n_sub, n_cancel, n_carry, n_round_up, n_sticky, n_special, n_zero, n_abgt, n_cdgt, aging);
    check(n_one > 0, "one-cycle operation never happened");
    check(n_two > 0, "two-cycle operation never happened");
    check(n_rz > 0 && n_rz == n_inj, "Razor errors not all detected");
    check(aging == 2'b11, "aging indicator never tripped");
    check(n_err_after_aging == 0, "errors continued after aging switch");
    check(n_sub > 0 && n_cancel > 0 && n_carry > 0 && n_round_up > 0 && n_sticky > 0,
          "datapath mechanism never exercised");
    $display("adder-use=%0d multiply-only=%0d bypassed=%0d forwarded=%0d",
             n_addmode, n_mulmode, n_byp, n_fwd);
    check(n_addmode > 0 && n_mulmode > 0, "adder or single-multiplier use never exercised");
    check(n_byp == n_addmode && n_fwd > 0, "bypass or forwarding path never used");
    check(n_special > 0 && n_zero > 0 && n_abgt > 0 && n_cdgt > 0, "special case never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N_OPS * 80 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
