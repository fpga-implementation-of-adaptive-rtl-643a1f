// tb_sticky: the sticky bit must be set exactly when a one of the smaller
// product falls below the window (bit 0) after the right shift, and must be
// ORed into bit 0 of the aligned word.
module tb_sticky;
  logic [21:0] small_sig;
  logic [8:0] shift;
  logic [47:0] small_win, small_st;
  logic sticky_bit;
  sticky dut (.*);
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
    logic [255:0] full, lost;
    bit exp_st;
    for (int i = 0; i < 20000; i++) begin
      small_sig = (i % 5 == 0) ? 22'(1) << $urandom_range(21, 0) : 22'($urandom);
      if (i % 17 == 0) small_sig = '0;
      shift = 9'((i % 3 == 0) ? $urandom_range(200, 0) : $urandom_range(50, 20));
      small_win = 48'($urandom) << 8;
      full = 256'(small_sig) << 25;           // window bits are full[47:0]
      lost = (shift >= 200) ? full : (full & ((256'(1) << shift) - 1));
      exp_st = (lost != 0);
      #1;
      check(sticky_bit == exp_st, $sformatf("sig %h shift %0d sticky %b", small_sig, shift, sticky_bit));
      check(small_st == (small_win | 48'(exp_st)), "sticky ORed into bit 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
