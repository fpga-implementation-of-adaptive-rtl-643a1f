// lzd: leading-zero detector (priority encoder).
//
// count is the number of zeros above the most significant one of y, W when
// y is all zeros: the truth table "Y(n)=1 -> 0, Y(n)=0 and Y(n-1)=1 -> 1, ..."
// of the leading-zero detect stage. Purely combinational.
module lzd #(
  parameter int unsigned W  = 48,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  y,
  output logic [CW-1:0] count
);
  always_comb begin
    count = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (y[i]) count = CW'(W - 1 - i);
    end
  end
endmodule
