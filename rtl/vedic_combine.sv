// vedic_combine: carry-save addition stage of an N x N Vedic multiplier.
//
// Combines the four N/2 x N/2 partial products of AL/AH (low/high half of a)
// and BL/BH into the 2N-bit product, in the arrangement of the 16x16 design:
//   p[N/2-1:0]  = low half of AL*BL;
//   first adder:  AL*BH + AH*BL            (N+1 bits, carry c0 on top)
//   second adder: + high half of AL*BL     (gives p[N-1:N/2], carry c1)
//   third adder:  AH*BH + the upper part of the second sum -> p[2N-1:N].
// Purely combinational.
module vedic_combine #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   p_ll,   // AL*BL
  input  logic [N-1:0]   p_lh,   // AL*BH
  input  logic [N-1:0]   p_hl,   // AH*BL
  input  logic [N-1:0]   p_hh,   // AH*BH
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;
  logic [N:0]   xsum;
  logic [N+1:0] mid;

  always_comb begin
    xsum       = {1'b0, p_lh} + {1'b0, p_hl};
    mid        = {1'b0, xsum} + (N+2)'(p_ll[N-1:H]);
    p[H-1:0]   = p_ll[H-1:0];
    p[N-1:H]   = mid[H-1:0];
    p[2*N-1:N] = p_hh + N'(mid[N+1:H]);
  end
endmodule
