// tb_lza: for a >= b the anticipated shift must equal the number of leading
// zeros of a - b or be one less; both cases must occur. Operand pairs are
// drawn close together (heavy cancellation) and far apart.
module tb_lza;
  logic [47:0] a, b;
  logic [5:0] shift;
  lza #(.W(48)) dut (.*);
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
    logic [47:0] t, diff;
    int lz, n_exact = 0, n_short = 0;
    for (int i = 0; i < 20000; i++) begin
      a = {16'($urandom), 32'($urandom)} >> $urandom_range(20, 0);
      case (i % 3)
        0: b = a - 48'($urandom_range(1000, 0));
        1: b = a - ({16'($urandom), 32'($urandom)} >> $urandom_range(47, 10));
        default: b = {16'($urandom), 32'($urandom)} >> $urandom_range(47, 0);
      endcase
      if (b > a) begin t = a; a = b; b = t; end
      diff = a - b;
      lz = 48;
      for (int k = 0; k < 48; k++) if (diff[k]) lz = 47 - k;
      #1;
      check(int'(shift) == lz || int'(shift) == lz - 1, $sformatf("a=%h b=%h shift %0d lz %0d", a, b, shift, lz));
      if (int'(shift) == lz) n_exact++; else n_short++;
    end
    check(n_exact > 0 && n_short > 0, "both outcomes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
