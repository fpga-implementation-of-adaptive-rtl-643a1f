// fdp_pkg: number formats and shared constants of the fused dot-product unit.
//
// Operands are IEEE-754 binary16 (1 sign, 5 exponent, 10 fraction bits) and
// the fused result A*B +/- C*D is IEEE-754 binary32, rounded once to nearest
// even. The 16-bit operand width and 32-bit result width follow the design;
// the choice of binary16/binary32 as the formats is this implementation's.
// Products are kept as 22-bit significands normalised so that bit 21 is the
// leading one, with a binary32-biased exponent (bias 127).
package fdp_pkg;
  localparam int unsigned H_EXP_W  = 5;
  localparam int unsigned H_FRAC_W = 10;
  localparam int unsigned H_BIAS   = 15;
  localparam int unsigned S_EXP_W  = 8;
  localparam int unsigned S_FRAC_W = 23;
  localparam int unsigned S_BIAS   = 127;
  localparam int unsigned SIG_W    = H_FRAC_W + 1;   // 11-bit significand
  localparam int unsigned PROD_W   = 2 * SIG_W;      // 22-bit product
  localparam int unsigned PEXP_W   = 9;              // product exponent width
  localparam int unsigned WIN      = 48;             // adder window width
  // Biased product exponent = ea + eb + PROD_EXP_OFS - lz, where lz is the
  // product normalisation shift (0 when the raw product has bit 21 set).
  localparam int unsigned PROD_EXP_OFS = S_BIAS + 1 - 2 * H_BIAS;  // = 98
  localparam logic [31:0] QNAN32   = 32'h7FC0_0000;

  typedef struct packed {
    logic                sign;
    logic [H_EXP_W-1:0]  exp;
    logic [H_FRAC_W-1:0] frac;
  } half_t;

  typedef struct packed {
    logic                sign;
    logic [S_EXP_W-1:0]  exp;
    logic [S_FRAC_W-1:0] frac;
  } single_t;
endpackage
