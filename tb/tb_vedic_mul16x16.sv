// tb_vedic_mul16x16: checks the 16x16 Vedic multiplier against the
// built-in multiplication for random and corner operand pairs (all-ones, powers of two).
module tb_vedic_mul16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  vedic_mul16x16 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [31:0] expected = 32'(a) * 32'(b);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 200000; i++) begin
      case (i % 4)
        0: begin a = 16'($urandom); b = 16'($urandom); end
        1: begin a = 16'hFFFF - 16'($urandom_range(3, 0)); b = 16'($urandom); end
        2: begin a = 16'(i); b = 16'hFFFF; end
        default: begin a = 16'(1) << $urandom_range(15, 0); b = 16'($urandom); end
      endcase
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
