// aging_indicator: decides from the Razor error rate that the multiplier has
// aged.
//
// Two counters run side by side: one counts finished operations, the other
// counts Razor errors. Both return to zero at the end of every window of
// AGE_WINDOW operations. If, within a window, the error count exceeds
// AGE_THRESHOLD, aging is set; it then stays set until reset, since aging of
// the transistors does not reverse. Counting errors over a window of
// operations and setting the output past a threshold is the design's; the
// window length, the threshold and the sticky output are this
// implementation's choices. aging rises on the clk edge that takes the error
// count past the threshold.
module aging_indicator #(
  parameter int unsigned AGE_WINDOW    = 64,
  parameter int unsigned AGE_THRESHOLD = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,   // one pulse per finished operation
  input  logic err,       // one pulse per Razor error
  output logic aging
);
  localparam int unsigned CW = $clog2(AGE_WINDOW + 1);
  logic [CW-1:0] op_cnt, err_cnt;
  logic          window_end;

  always_comb window_end = op_done && (op_cnt == CW'(AGE_WINDOW - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_cnt  <= '0;
      err_cnt <= '0;
      aging   <= 1'b0;
    end else begin
      if (window_end) begin
        op_cnt  <= '0;
        err_cnt <= '0;
      end else begin
        if (op_done)                           op_cnt  <= op_cnt + 1'b1;
        if (err && err_cnt != CW'(AGE_WINDOW)) err_cnt <= err_cnt + 1'b1;
      end
      if (err && (32'(err_cnt) + 1 > AGE_THRESHOLD)) aging <= 1'b1;
    end
  end
endmodule
