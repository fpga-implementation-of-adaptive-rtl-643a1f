// razor_ff: one-bit Razor flip-flop for timing-error detection.
//
// The main flip-flop samples d on the rising edge of clk. A shadow latch,
// transparent while the delayed clock clk_del is high, samples the same d a
// little later, after a late-arriving value has settled. An XOR compares the
// main output with the shadow latch; a mismatch is the local error (Error_L).
// On an error the mux in front of the main flip-flop selects the shadow value,
// so the next clk edge reloads the correct value and q is right one cycle
// late. This structure is the design's. The check input, which masks the
// comparison in cycles whose result is not being used, is this
// implementation's addition.
//
// The shadow element is an intentional level-sensitive latch.
module razor_ff (
  input  logic clk,
  input  logic clk_del,
  input  logic rst_n,
  input  logic check,
  input  logic d,
  output logic q,
  output logic err
);
  logic shadow;

  always_latch begin
    if (clk_del) shadow = d;
  end

  always_comb err = check & (q ^ shadow);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= 1'b0;
    else        q <= err ? shadow : d;
  end
endmodule
