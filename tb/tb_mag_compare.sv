// tb_mag_compare: A*B > C*D decision of the product magnitude comparator,
// checked against the real-valued magnitudes sig * 2^exp of random and
// nearly equal normalised products (zero products included).
module tb_mag_compare;
  logic [8:0]  ab_exp, cd_exp;
  logic [21:0] ab_sig, cd_sig;
  logic        ab_gt_cd;
  mag_compare dut (.*);
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

  function automatic logic [21:0] rsig();
    return 22'($urandom) | 22'h20_0000;
  endfunction

  initial begin
    real va, vc;
    for (int i = 0; i < 20000; i++) begin
      ab_exp = 9'($urandom_range(160, 70)); ab_sig = rsig();
      case (i % 4)
        0: begin cd_exp = 9'($urandom_range(160, 70)); cd_sig = rsig(); end
        1: begin cd_exp = ab_exp; cd_sig = rsig(); end
        2: begin cd_exp = ab_exp; cd_sig = ab_sig + 22'($urandom_range(2, 0)) - 22'd1; end
        default: begin cd_exp = '0; cd_sig = '0; end
      endcase
      if (i % 8 == 7) begin ab_exp = '0; ab_sig = '0; end
      #1;
      va = real'(ab_sig) * (2.0 ** real'(ab_exp));
      vc = real'(cd_sig) * (2.0 ** real'(cd_exp));
      check(ab_gt_cd == (va > vc), $sformatf("%0d:%h vs %0d:%h -> %b", ab_exp, ab_sig, cd_exp, cd_sig, ab_gt_cd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
