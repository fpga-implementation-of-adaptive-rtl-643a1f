// ahl: adaptive hold logic of one variable-latency multiplier.
//
// Two judging blocks count the zeros of the multiplier operand: the first
// says "one cycle is enough" when there are more than N_ZEROS zeros, the
// second when there are more than N_ZEROS+1. A mux picks the first while the
// aging indicator is clear and the stricter second one once it is set, so an
// aged multiplier gives more patterns two cycles. A D flip-flop, loaded when
// a new operand is accepted, holds the decision as two_cycle for the whole
// operation. The aging indicator counts the Razor errors reported on err.
// This structure (aging indicator, two judging blocks, mux, flip-flop) is the
// design's; counting the zeros of the multiplier operand in both judging
// blocks and the value of N_ZEROS are this implementation's choices.
module ahl #(
  parameter int unsigned WIDTH         = 16,
  parameter int unsigned N_ZEROS       = 8,
  parameter int unsigned AGE_WINDOW    = 64,
  parameter int unsigned AGE_THRESHOLD = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,      // operand accepted this cycle
  input  logic [WIDTH-1:0] operand,
  input  logic             op_done,
  input  logic             err,
  output logic             two_cycle,
  output logic             aging
);
  localparam int unsigned ZW = $clog2(WIDTH + 1);
  logic [ZW-1:0] zeros;
  logic          judge1, judge2, one_cycle;

  aging_indicator #(.AGE_WINDOW(AGE_WINDOW), .AGE_THRESHOLD(AGE_THRESHOLD)) u_age (
    .clk(clk), .rst_n(rst_n), .op_done(op_done), .err(err), .aging(aging));

  always_comb begin
    zeros = '0;
    for (int i = 0; i < WIDTH; i++) zeros += ZW'(!operand[i]);
    judge1    = 32'(zeros) > N_ZEROS;
    judge2    = 32'(zeros) > N_ZEROS + 1;
    one_cycle = aging ? judge2 : judge1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    two_cycle <= 1'b0;
    else if (load) two_cycle <= !one_cycle;
  end
endmodule
