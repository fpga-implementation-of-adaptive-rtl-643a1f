// csa_4_2: 4:2 carry-save compressor with final carry-propagate adder.
//
// Four W-bit rows are reduced to a sum row and a carry row by two levels of
// 3:2 full-adder rows (the usual 4:2 compressor), and one adder then produces
// sum = in0 + in1 + in2 + in3 modulo 2^W. The 4:2 CSA followed by "+" is the
// design's arrangement. Combinational.
module csa_4_2 #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  output logic [W-1:0] sum
);
  logic [W-1:0] s1, c1, s2, c2;

  always_comb begin
    s1  = in0 ^ in1 ^ in2;
    c1  = ((in0 & in1) | (in0 & in2) | (in1 & in2)) << 1;
    s2  = s1 ^ c1 ^ in3;
    c2  = ((s1 & c1) | (s1 & in3) | (c1 & in3)) << 1;
    sum = s2 + c2;
  end
endmodule
