// tb_vedic_ahl_unit: products, latency and aging behaviour of the
// variable-latency Vedic multiplier.
//
// Random 16-bit operand pairs are multiplied; each product is compared with
// the built-in multiplication and the cycles from start to done are checked:
// 2 for a one-cycle pattern (more than 8 zeros in b, more than 9 once aged),
// 3 for a two-cycle pattern or after a Razor error. From operation 300 on,
// slow paths are emulated: a one-cycle operation whose b has at most 9 zeros
// gets a wrong product at the sampling edge and the settled one just after
// it, before the delayed clock. The Razor register must catch each such
// case, the aging indicator (window 16, threshold 2 here) must then set, and
// no further errors may occur.
module tb_vedic_ahl_unit;
  logic clk = 1'b0, dclk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic ready, done, razor_err, two_cycle, aging;
  logic [31:0] product;
  int checks = 0, failures = 0, cycle = 0;
  int n_one = 0, n_two = 0, n_inj = 0, n_rz = 0, n_inj_aged = 0;
  bit slow = 1'b0;

  vedic_ahl_unit #(.N_ZEROS(8), .AGE_WINDOW(16), .AGE_THRESHOLD(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    #2 dclk = 1'b1;
    #3 dclk = 1'b0;
  end
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (razor_err) n_rz++;

  function automatic int zeros16(logic [15:0] v);
    int z = 0;
    for (int i = 0; i < 16; i++) z += int'(!v[i]);
    return z;
  endfunction

  task automatic inject();
    logic [31:0] good;
    #4;
    good = dut.mul_p;
    force dut.mul_p = good ^ (32'h1 << $urandom_range(31, 0));
    #2;
    force dut.mul_p = good;
    release dut.mul_p;
  endtask

  always @(negedge clk)
    if (slow && dut.state == 2'd1 && !two_cycle && zeros16(dut.b_q) <= 9) begin
      n_inj++;
      if (aging) n_inj_aged++;
      fork inject(); join_none
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [15:0] ta, tb_;
    int t0, lat, rz_before;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      ta  = 16'($urandom);
      tb_ = 16'($urandom) & ((n % 3 == 0) ? 16'($urandom) : 16'hFFFF);
      if (n >= 300) slow = 1'b1;
      while (!ready) @(negedge clk);
      a = ta; b = tb_; start = 1'b1;
      rz_before = n_rz;
      @(negedge clk);
      start = 1'b0;
      t0 = cycle;
      while (!done) @(negedge clk);
      lat = cycle - t0 + 1;
      check(product == 32'(ta) * 32'(tb_), $sformatf("%h*%h=%h", ta, tb_, product));
      check(lat == ((two_cycle || n_rz != rz_before) ? 3 : 2),
            $sformatf("latency %0d two_cycle=%b", lat, two_cycle));
      check(two_cycle == !(zeros16(tb_) > (aging ? 9 : 8)) || n_rz != rz_before,
            "judging block decision");
      if (two_cycle) n_two++; else n_one++;
      @(negedge clk);
    end
    $display("one=%0d two=%0d injected=%0d razor=%0d aged-injections=%0d aging=%b",
             n_one, n_two, n_inj, n_rz, n_inj_aged, aging);
    check(n_one > 0 && n_two > 0, "both latencies");
    check(n_inj > 0 && n_rz == n_inj, "every injected error detected");
    check(aging && n_inj_aged == 0, "aging set and errors stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
