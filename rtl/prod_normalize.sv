// prod_normalize: normalises a raw 22-bit significand product.
//
// The product of two 11-bit significands lies in [2^20, 2^22) for normal
// operands; bit 21 is the "product overflow" bit. Subnormal operands give
// smaller products. lz is the left shift that brings the leading one to bit
// 21 (0 or 1 for normal operands) and sig the shifted product; zero flags an
// all-zero product. Purely combinational; this implementation's helper for
// the exponent compare and the alignment.
module prod_normalize #(
  parameter int unsigned PW = 22
) (
  input  logic [PW-1:0]            raw,
  output logic [PW-1:0]            sig,
  output logic [$clog2(PW+1)-1:0]  lz,
  output logic                     zero
);
  lzd #(.W(PW)) u_lzd (.y(raw), .count(lz));

  always_comb begin
    zero = (raw == '0);
    sig  = raw << lz;
  end
endmodule
