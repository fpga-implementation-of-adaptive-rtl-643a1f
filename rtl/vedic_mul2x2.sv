// vedic_mul2x2: 2x2-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf cell of the Vedic multiplier tree.
//
// Vertical step: p0 = a0*b0. Crosswise step: a1*b0 + a0*b1 in a half adder
// gives p1 and a carry. Vertical step: a1*b1 plus that carry in a second half
// adder gives p2 and p3. Purely combinational. The sutra steps follow the
// design; drawing them as four AND gates and two half adders is the usual
// gate-level form of the cell.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic cross0, cross1, vert1, c1;

  always_comb begin
    cross0 = a[1] & b[0];
    cross1 = a[0] & b[1];
    vert1  = a[1] & b[1];
    p[0]   = a[0] & b[0];
    p[1]   = cross0 ^ cross1;
    c1     = cross0 & cross1;
    p[2]   = vert1 ^ c1;
    p[3]   = vert1 & c1;
  end
endmodule
