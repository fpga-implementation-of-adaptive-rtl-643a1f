// tb_aging_indicator: the aging indicator must stay clear while the Razor
// errors per window of 64 operations stay at or below the threshold of 4,
// also across many windows, and must set (and stay set) once a window sees
// more than 4 errors. A cycle-by-cycle reference model follows the counting
// rule: errors and operations are counted per window, both counters return
// to zero at the end of each window.
module tb_aging_indicator;
  localparam int WINDOW = 64, THRESH = 4;
  logic clk = 1'b0, rst_n = 1'b0, op_done = 1'b0, err = 1'b0, aging;
  int checks = 0, failures = 0;
  int ops = 0, errs = 0;
  bit aging_ref = 1'b0;

  aging_indicator #(.AGE_WINDOW(WINDOW), .AGE_THRESHOLD(THRESH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (err && errs + 1 > THRESH) aging_ref <= 1'b1;
    if (op_done && ops == WINDOW - 1) begin
      ops  <= 0;
      errs <= 0;
    end else begin
      if (op_done) ops <= ops + 1;
      if (err)     errs <= errs + 1;
    end
  end

  task automatic step(input bit o, input bit e);
    op_done = o; err = e;
    @(posedge clk);
    #1;
    checks++;
    if (aging !== aging_ref) begin
      failures++;
      if (failures < 10) $display("FAIL aging=%b expected %b (ops=%0d errs=%0d)", aging, aging_ref, ops, errs);
    end
  endtask

  initial begin
    bit seen_before;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // 20 windows with exactly THRESH errors each: must never trip
    for (int w = 0; w < 20; w++)
      for (int i = 0; i < WINDOW; i++) step(1'b1, i % 13 == 3 && i < 13 * THRESH);
    seen_before = aging;
    // random traffic with a rising error rate
    for (int i = 0; i < 3000; i++) step($urandom_range(1, 0) == 1, $urandom_range(40, 0) < i / 300);
    checks += 2;
    if (seen_before) failures++;
    if (!aging) failures++;
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
