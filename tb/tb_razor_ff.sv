// tb_razor_ff: timing-error detection and recovery of the razor_ff.
//
// clk has period 10; the delayed clock is high from 2 to 5 after each rising
// clk edge. Each cycle the testbench drives a new value on d, either in time
// (settled well before the clk edge) or late: a wrong value is present at the
// clk edge and the right one settles 1 after it, before the delayed clock.
// With check high a late value must raise the error in that cycle, and the
// next edge must restore the right value into q; an in-time value must give
// no error. After an error the failing bits of d turn wrong again, and the
// next edge must still reload the right value from the shadow latches.
module tb_razor_ff;
  logic clk = 1'b0, dclk = 1'b0, rst_n = 1'b0, check = 1'b0, err;
  logic [0:0] d = '0, q;
  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

  razor_ff dut (.clk(clk), .clk_del(dclk), .rst_n(rst_n), .check(check), .d(d), .q(q), .err(err));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    #2 dclk = 1'b1;
    #3 dclk = 1'b0;
  end

  task automatic expect_eq(input logic [0:0] got, input logic [0:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h, expected %h", what, got, want);
    end
  endtask

  initial begin
    logic [0:0] good, wrong;
    logic late, recover, chk;
    recover = 1'b0;
    good = '0;
    late = 1'b0;
    repeat (2) @(posedge clk);
    #6 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      // at +6 after a rise: choose the value for the coming edge
      if (!recover) begin
        good  = 1'($urandom);
        late  = ($urandom_range(3, 0) == 0);
        wrong = good ^ (1'(1) << $urandom_range(0, 0));
        chk   = ($urandom_range(7, 0) != 0);
        d     = late ? wrong : good;
      end else begin
        late  = 1'b0;
      end
      @(posedge clk);
      #1;
      check = recover ? 1'b0 : chk;   // check the word sampled at this edge
      if (!recover) expect_eq(q, late ? wrong : good, "main flip-flop sample");
      d = good;                     // the late value settles here
      #5;                           // +6: after the delayed clock
      if (!recover) begin
        expect_eq(1'(err), 1'(check && late), "error flag");
        if (err) n_err++; else n_ok++;
        recover = err;
        // the failing bits turn wrong again: each must reload from its
        // shadow latch at the next edge (Error_L selects the mux per bit)
        if (err) d = wrong;
      end else begin
        expect_eq(1'(err), '0, "no error in recovery cycle");
        expect_eq(q, good, "recovered value");
        recover = 1'b0;
      end
    end
    checks++;
    if (n_err == 0 || n_ok == 0) failures++;
    $display("errors=%0d clean=%0d", n_err, n_ok);
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
