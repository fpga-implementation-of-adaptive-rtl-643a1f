// comp_2s: two's-complement stage for effective subtraction.
//
// When sub is high the smaller aligned product is inverted (x_out = ~x) and
// a second row one_out carries the +1 at bit 0, so that the 4:2 compressor
// adds big + ~small + 1 = big - small. With sub low both pass unchanged
// (x_out = x, one_out = 0). Controlled by the Operation input and the product
// signs as in the design. Combinational.
module comp_2s #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] x,
  input  logic         sub,
  output logic [W-1:0] x_out,
  output logic [W-1:0] one_out
);
  always_comb begin
    x_out   = sub ? ~x : x;
    one_out = W'(sub);
  end
endmodule
