// lza: leading-zero anticipator for the subtraction a - b (a >= b).
//
// A pre-encoder forms, for every bit, Y(i) = ~(A(i) ^ ~B(i)) & (A(i-1) | ~B(i-1))
// (with the term for i = 0 taken as 1) directly from the adder operands, in
// parallel with the subtraction. A leading-zero detector turns Y into a shift
// count. For a >= b the count equals the number of leading zeros of a - b or
// is one less; the normaliser corrects the last bit. Pre-encoder equation and
// LZD truth table are the design's. Combinational.
module lza #(
  parameter int unsigned W  = 48,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [CW-1:0] shift
);
  logic [W-1:0] y;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (i == 0) y[i] = ~(a[i] ^ ~b[i]);
      else        y[i] = ~(a[i] ^ ~b[i]) & (a[i-1] | ~b[i-1]);
    end
  end

  lzd #(.W(W)) u_lzd (.y(y), .count(shift));
endmodule
