// tb_vedic_mul2x2: checks the 2x2 Vedic multiplier against the
// built-in multiplication for every operand pair.
module tb_vedic_mul2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mul2x2 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [3:0] expected = 4'(a) * 4'(b);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
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
