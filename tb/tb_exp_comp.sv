// tb_exp_comp: product exponents, alignment shift and result exponent of
// the exponent compare circuit for random operand exponents, product
// normalisation shifts and rounder adjustments. Expected values come from
// the value of a product: ea + eb - 30 + 127 + 1 - lz in binary32 bias.
module tb_exp_comp;
  logic [4:0] a_exp, b_exp, c_exp, d_exp, ab_lz, cd_lz;
  logic ab_zero, cd_zero, ab_gt_cd;
  logic signed [6:0] exp_adjust;
  logic [8:0] ab_exp, cd_exp, big_exp, align_shift;
  logic signed [9:0] result_exp;
  exp_comp dut (.*);
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eab, ecd, big, sml;
    for (int i = 0; i < 20000; i++) begin
      a_exp = 5'($urandom_range(30, 1)); b_exp = 5'($urandom_range(30, 1));
      c_exp = 5'($urandom_range(30, 1)); d_exp = 5'($urandom_range(30, 1));
      ab_lz = 5'((i % 3 == 0) ? $urandom_range(21, 0) : $urandom_range(1, 0));
      cd_lz = 5'((i % 5 == 0) ? $urandom_range(21, 0) : $urandom_range(1, 0));
      ab_zero = (i % 11 == 0); cd_zero = (i % 13 == 0);
      exp_adjust = 7'($urandom_range(48, 0) - 2);
      eab = ab_zero ? 0 : int'(a_exp) + int'(b_exp) - 30 + 128 - int'(ab_lz);
      ecd = cd_zero ? 0 : int'(c_exp) + int'(d_exp) - 30 + 128 - int'(cd_lz);
      ab_gt_cd = (eab > ecd) ? 1'b1 : (eab < ecd) ? 1'b0 : 1'($urandom);
      big   = ab_gt_cd ? eab : ecd;
      sml = ab_gt_cd ? ecd : eab;
      #1;
      check(int'(ab_exp) == eab && int'(cd_exp) == ecd, $sformatf("product exponents %0d %0d, expected %0d %0d", ab_exp, cd_exp, eab, ecd));
      check(int'(align_shift) == big - sml, $sformatf("shift %0d expected %0d", align_shift, big - sml));
      check(int'(result_exp) == big - int'(exp_adjust), $sformatf("result exponent %0d expected %0d", result_exp, big - int'(exp_adjust)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
