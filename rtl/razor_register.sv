// razor_register: WIDTH Razor flip-flops side by side with their local error
// outputs ORed into a single error flag.
//
// Each bit is a razor_ff (main flip-flop, shadow latch on the delayed clock,
// XOR comparator, recovery mux). error is high in the cycle after a clk edge
// at which any bit's main flip-flop caught a value different from the one its
// shadow latch settled to, while check is high; the following clk edge
// restores the correct word into q. Bit-slice-and-OR structure as in the
// design.
module razor_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             clk_del,
  input  logic             rst_n,
  input  logic             check,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             error
);
  logic [WIDTH-1:0] err_l;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    razor_ff u_ff (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .check(check),
                   .d(d[i]), .q(q[i]), .err(err_l[i]));
  end

  always_comb error = |err_l;
endmodule
