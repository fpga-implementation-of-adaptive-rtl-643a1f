// tb_normalize_round: normalisation and round-to-nearest-even of random
// window sums with any number of leading zeros. For subtractions the LZA
// count given is either exact or one short, as the LZA delivers it.
// Expected fraction and exponent adjust come from rounding the integer
// value: keep 24 bits from the leading one, round on the remainder.
module tb_normalize_round;
  logic [47:0] sum;
  logic sub, is_zero;
  logic [5:0] lza_shift;
  logic [22:0] frac;
  logic signed [6:0] exp_adjust;
  normalize_round #(.W(48)) dut (.*);
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
    logic [127:0] m, mant, rem, half;
    int k, lz, sh;
    for (int i = 0; i < 30000; i++) begin
      sum = {16'($urandom), 32'($urandom)} >> $urandom_range(47, 0);
      if (i % 7 == 0) sum = sum | 48'hFFFF_FF00_0000 >> $urandom_range(8, 0);  // round-up carries
      if (i % 11 == 0) sum = {sum[47:24], 1'b1, 23'd0} >> $urandom_range(3, 0);    // ties
      sub = 1'($urandom);
      lz = 48;
      for (int j = 0; j < 48; j++) if (sum[j]) lz = 47 - j;
      lza_shift = 6'((lz > 0 && $urandom_range(1, 0) == 1) ? lz - 1 : lz);
      #1;
      if (sum == 0) begin
        check(is_zero, "zero");
        continue;
      end
      m = 128'(sum);
      k = 47 - lz;
      if (k > 23) begin
        sh = k - 23;
        mant = m >> sh;
        rem  = m - (mant << sh);
        half = 128'(1) << (sh - 1);
        if (rem > half || (rem == half && mant[0])) mant = mant + 1;
        if (mant == (128'(1) << 24)) begin mant = mant >> 1; k++; end
      end else mant = m << (23 - k);
      check(!is_zero && frac == mant[22:0] && int'(exp_adjust) == 46 - k,
            $sformatf("sum %h sub %b -> frac %h adj %0d, expected %h %0d", sum, sub, frac, exp_adjust, mant[22:0], 46 - k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
