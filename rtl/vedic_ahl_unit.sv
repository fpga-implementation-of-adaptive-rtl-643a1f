// vedic_ahl_unit: aging-aware variable-latency 16x16 multiplier.
//
// An input register, gated by the adaptive hold logic, feeds a combinational
// Vedic multiplier whose product is captured by a Razor register. When an
// operation starts, the AHL judges the multiplier operand b and stores
// whether the operation may finish in one cycle or needs two.
//
// Timing, counted from the clk edge that accepts start (ready high):
//   cycle 1  the multiplier works on the registered operands; the Razor
//            register samples the product at the end of the cycle.
//   cycle 2  one-cycle operation: the Razor check is enabled; with no error,
//            done is high and product is valid. With an error, razor_err is
//            high and the Razor register reloads from its shadow latches.
//            Two-cycle operation: the Razor register samples again.
//   cycle 3  (two-cycle operation or Razor error) done is high.
// product stays valid after done until the next start. ready is high only
// when idle, so one operation is in flight at a time. The one-/two-cycle
// decision, the Razor detection and the re-execution are the design's; the
// exact cycle schedule and the start/ready/done handshake are this
// implementation's.
module vedic_ahl_unit #(
  localparam int unsigned WIDTH = 16,   // width of the Vedic multiplier
  parameter int unsigned N_ZEROS       = 8,
  parameter int unsigned AGE_WINDOW    = 64,
  parameter int unsigned AGE_THRESHOLD = 4
) (
  input  logic               clk,
  input  logic               dclk,
  input  logic               rst_n,
  input  logic               start,
  output logic               ready,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic               done,
  output logic [2*WIDTH-1:0] product,
  output logic               razor_err,
  output logic               two_cycle,
  output logic               aging
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_CHECK, S_FINISH} state_t;
  state_t state;

  logic [WIDTH-1:0]   a_q, b_q;
  logic [2*WIDTH-1:0] mul_p;
  logic               check, rz_error, load;

  always_comb begin
    ready     = (state == S_IDLE);
    load      = start && ready;
    check     = (state == S_CHECK) && !two_cycle;
    razor_err = rz_error;
    done      = (state == S_FINISH) || ((state == S_CHECK) && !two_cycle && !rz_error);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a;
      b_q <= b;
    end
  end

  ahl #(.WIDTH(WIDTH), .N_ZEROS(N_ZEROS), .AGE_WINDOW(AGE_WINDOW),
        .AGE_THRESHOLD(AGE_THRESHOLD)) u_ahl (
    .clk(clk), .rst_n(rst_n), .load(load), .operand(b), .op_done(done),
    .err(rz_error), .two_cycle(two_cycle), .aging(aging));

  vedic_mul16x16 u_mul (.a(a_q), .b(b_q), .p(mul_p));

  razor_register #(.WIDTH(2*WIDTH)) u_razor (
    .clk(clk), .clk_del(dclk), .rst_n(rst_n), .check(check),
    .d(mul_p), .q(product), .error(rz_error));

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:   if (load) state <= S_MUL;
        S_MUL:    state <= S_CHECK;
        S_CHECK:  state <= (two_cycle || rz_error) ? S_FINISH : S_IDLE;
        S_FINISH: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // Every operation finishes with done and returns to idle.
  assert property (@(posedge clk) disable iff (!rst_n) done |=> state == S_IDLE);
endmodule
