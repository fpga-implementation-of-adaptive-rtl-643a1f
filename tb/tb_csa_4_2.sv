// tb_csa_4_2: the compressor plus final adder must return the sum of its
// four rows modulo 2^48, for random rows and all-ones rows.
module tb_csa_4_2;
  logic [47:0] in0, in1, in2, in3, sum;
  csa_4_2 #(.W(48)) dut (.*);
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

  function automatic logic [47:0] r48();
    return ($urandom_range(9, 0) == 0) ? '1 : {16'($urandom), 32'($urandom)};
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      in0 = r48(); in1 = r48(); in2 = r48(); in3 = (i % 2 == 0) ? '0 : r48();
      #1;
      check(sum == 48'(in0 + in1 + in2 + in3), $sformatf("%h+%h+%h+%h=%h", in0, in1, in2, in3, sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
