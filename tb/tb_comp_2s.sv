// tb_comp_2s: the two output rows must add up to x, or to -x modulo 2^48
// on subtraction.
module tb_comp_2s;
  logic [47:0] x, x_out, one_out;
  logic sub;
  comp_2s #(.W(48)) dut (.*);
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
    for (int i = 0; i < 10000; i++) begin
      x = {16'($urandom), 32'($urandom)}; sub = 1'($urandom);
      #1;
      check(48'(x_out + one_out) == (sub ? 48'(0) - x : x), $sformatf("x=%h sub=%b", x, sub));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
