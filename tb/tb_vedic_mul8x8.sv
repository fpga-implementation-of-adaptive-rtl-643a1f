// tb_vedic_mul8x8: checks the 8x8 Vedic multiplier against the
// built-in multiplication for every operand pair.
module tb_vedic_mul8x8;
  logic [7:0] a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_mul8x8 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [15:0] expected = 16'(a) * 16'(b);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1 check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
