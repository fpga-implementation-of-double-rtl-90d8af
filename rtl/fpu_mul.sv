// fpu_mul: multiplication of two finite binary64 operands.
//
// The 53-bit significands of operands A and B (fraction plus the leading one of a
// normalised number) are held in mul_a and mul_b. Their full 106-bit product is not
// left to the synthesis tool as one 53 x 53 multiply: it is broken into 24-bit by
// 17-bit multiplies, which map one-to-one onto FPGA DSP multiplier blocks, and the
// partial products are added with the proper shifts. mul_a is cut into three 24-bit
// pieces (the top one holds 5 bits) and mul_b into four 17-bit pieces (the top one
// holds 2 bits), giving A_PIECES x B_PIECES = 12 partial products. The 24 x 17 piece
// size is the specified one; this arrangement of the pieces is this design's own, and
// it uses as many multipliers as the specified implementation has DSP blocks (12).
//
// A subnormal operand is normalised before the multiply (shifted left until its
// leading one reaches bit 52, its exponent lowered to match), so the product always
// has its leading one in bit 105 or 104. Its top 56 bits, with the OR of the remaining
// 50 bits in bit 0, go to the rounding stage with exponent ea + eb - 1022, which places
// bit 55 at weight 2^(ea+eb-2045) (see fpu_pkg for the format). The sign is the XOR
// of the operand signs. A zero operand gives a zero magnitude, which the rounding stage
// turns into a signed zero.
//
// Purely combinational: one stage of logic between the unit's registers.
module fpu_mul
  import fpu_pkg::*;
#(
  parameter int unsigned A_PIECE_W = 24,  // width of one multiplier input of a DSP block
  parameter int unsigned B_PIECE_W = 17   // width of the other input
) (
  input  fp64_t         opa,
  input  fp64_t         opb,
  output fp_unrounded_t res
);
  localparam int unsigned A_PIECES = (SIG_W + A_PIECE_W - 1) / A_PIECE_W;
  localparam int unsigned B_PIECES = (SIG_W + B_PIECE_W - 1) / B_PIECE_W;
  localparam int unsigned PROD_W   = 2 * SIG_W;

  logic [5:0]                       lz_a, lz_b;
  logic [SIG_W-1:0]                 mul_a, mul_b;
  logic [A_PIECES*A_PIECE_W-1:0]    a_ext;
  logic [B_PIECES*B_PIECE_W-1:0]    b_ext;
  logic [A_PIECE_W+B_PIECE_W-1:0]   pp [A_PIECES][B_PIECES];
  logic [PROD_W-1:0]                product;

  assign lz_a  = lzc53(sig_of(opa.exp, opa.frac));
  assign lz_b  = lzc53(sig_of(opb.exp, opb.frac));
  assign mul_a = sig_of(opa.exp, opa.frac) << lz_a;
  assign mul_b = sig_of(opb.exp, opb.frac) << lz_b;
  assign a_ext = (A_PIECES*A_PIECE_W)'(mul_a);
  assign b_ext = (B_PIECES*B_PIECE_W)'(mul_b);

  // One small multiplier per pair of pieces.
  for (genvar i = 0; i < A_PIECES; i++) begin : g_a
    for (genvar j = 0; j < B_PIECES; j++) begin : g_b
      assign pp[i][j] = a_ext[i*A_PIECE_W +: A_PIECE_W] * b_ext[j*B_PIECE_W +: B_PIECE_W];
    end
  end

  // Sum of the partial products, each at its weight.
  always_comb begin
    logic [A_PIECES*A_PIECE_W+B_PIECES*B_PIECE_W-1:0] acc;
    acc = '0;
    for (int i = 0; i < A_PIECES; i++) begin
      for (int j = 0; j < B_PIECES; j++) begin
        acc += ($bits(acc))'(pp[i][j]) << (i*A_PIECE_W + j*B_PIECE_W);
      end
    end
    product = acc[PROD_W-1:0];
  end

  always_comb begin
    res.sign = opa.sign ^ opb.sign;
    res.mant = product[PROD_W-1 -: MANT_W] | MANT_W'(product[PROD_W-MANT_W-1:0] != '0);
    res.exp  = XEXP_W'(eff_exp(opa.exp)) - XEXP_W'(lz_a)
             + XEXP_W'(eff_exp(opb.exp)) - XEXP_W'(lz_b) - XEXP_W'(BIAS - 1);
  end
endmodule
