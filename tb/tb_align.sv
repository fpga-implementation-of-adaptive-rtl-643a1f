// tb_align: swap and right shift of the alignment block. The bigger
// product must sit with bit 21 at window bit 46 and the smaller one must be
// the same word shifted right by the alignment shift (all of it gone for
// shifts of 48 and more).
module tb_align;
  logic [21:0] ab_sig, cd_sig, small_sig;
  logic ab_gt_cd;
  logic [8:0] shift;
  logic [47:0] big_win, small_win;
  align dut (.*);
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
    logic [127:0] eb, es;
    for (int i = 0; i < 20000; i++) begin
      ab_sig = 22'($urandom) | 22'h20_0000; cd_sig = 22'($urandom) | 22'h20_0000;
      ab_gt_cd = 1'($urandom);
      shift = 9'((i % 4 == 0) ? $urandom_range(120, 0) : $urandom_range(30, 0));
      #1;
      eb = 128'(ab_gt_cd ? ab_sig : cd_sig) << 25;
      es = (128'(ab_gt_cd ? cd_sig : ab_sig) << 25) >> shift;
      check(big_win == eb[47:0], $sformatf("big %h", big_win));
      check(small_win == es[47:0], $sformatf("small %h shift %0d expected %h", small_win, shift, es[47:0]));
      check(small_sig == (ab_gt_cd ? cd_sig : ab_sig), "small_sig");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
