// tb_ahl: the adaptive hold logic must register "two cycles" for an operand
// with at most n zeros (n = 8) while the aging indicator is clear, and for an
// operand with at most n+1 zeros once it is set. The aging indicator is
// driven past its threshold (here 2 errors in a window of 8 operations)
// half-way through. Operands with exactly n+1 and n+2 zeros are included so
// that the two judging blocks are told apart.
module tb_ahl;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, op_done = 1'b0, err = 1'b0;
  logic [15:0] operand = '0;
  logic two_cycle, aging;
  int checks = 0, failures = 0, n_two = 0, n_one = 0;

  ahl #(.WIDTH(16), .N_ZEROS(N), .AGE_WINDOW(8), .AGE_THRESHOLD(2)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] with_zeros(int z);
    logic [15:0] v = '1;
    int placed = 0;
    while (placed < z) begin
      int k = $urandom_range(15, 0);
      if (v[k]) begin v[k] = 1'b0; placed++; end
    end
    return v;
  endfunction

  initial begin
    int z, limit;
    logic expect_two;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      if (i == 300) begin
        // three Razor errors within one window: aging must set
        repeat (3) begin
          err = 1'b1; op_done = 1'b1;
          @(posedge clk); #1;
        end
        err = 1'b0; op_done = 1'b0;
        checks++;
        if (!aging) begin failures++; $display("FAIL aging not set"); end
      end
      z = (i % 3 == 0) ? N + 1 + (i / 3) % 2 : $urandom_range(16, 0);
      operand = with_zeros(z);
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      limit = aging ? N + 1 : N;
      expect_two = !(z > limit);
      checks++;
      if (two_cycle !== expect_two) begin
        failures++;
        if (failures < 10) $display("FAIL zeros=%0d aging=%b two_cycle=%b", z, aging, two_cycle);
      end
      if (two_cycle) n_two++; else n_one++;
      // the decision must hold while load is low
      operand = ~operand;
      @(posedge clk); #1;
      checks++;
      if (two_cycle !== expect_two) failures++;
    end
    checks++;
    if (n_two == 0 || n_one == 0) failures++;
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
