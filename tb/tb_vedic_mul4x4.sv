// tb_vedic_mul4x4: checks the 4x4 Vedic multiplier against the
// built-in multiplication for every operand pair.
module tb_vedic_mul4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [7:0] expected = 8'(a) * 8'(b);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
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
