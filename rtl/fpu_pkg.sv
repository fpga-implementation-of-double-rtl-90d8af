// fpu_pkg: types and constants shared by the double precision arithmetic unit.
//
// Operands are IEEE-754 binary64 words (1 sign bit, 11 exponent bits with bias 1023,
// 52 fraction bits). The operation units (add, sub, mul, div) do not produce a packed
// result: they hand an "unrounded" value to the rounding stage, made of a sign, a
// signed biased exponent and a 56-bit magnitude. The value such a record stands for is
//
//     (-1)^sign * mant / 2^55 * 2^(exp - 1023)
//
// so a normalised magnitude has its leading one in bit 55, bits 55..3 are the 53
// significant bits, bit 2 is the guard bit and bits 1..0 hold round/sticky information
// (bit 0 is the OR of everything that was shifted out). The exponent is wide and signed
// so that results below the normal range (exp <= 0) and above it (exp >= 2047) can be
// carried to the rounding stage, which denormalises or saturates them.
//
// The 56-bit hand-off format is this design's own. Op-codes and rounding-mode codes are
// the ones the unit is specified with:
// fpu_op 0 = add, 1 = sub, 2 = mul, 3 = div (3-bit field, 4..7 reserved);
// rmode 00 = nearest even, 01 = toward zero, 10 = toward +inf, 11 = toward -inf.
package fpu_pkg;

  localparam int unsigned EXP_W   = 11;
  localparam int unsigned FRAC_W  = 52;
  localparam int unsigned SIG_W   = 53;   // fraction plus hidden bit
  localparam int unsigned MANT_W  = 56;   // significand plus guard and two sticky bits
  localparam int unsigned XEXP_W  = 14;   // signed working exponent
  localparam int unsigned BIAS    = 1023;
  localparam int unsigned EXP_MAX = 2047; // all-ones exponent field: Inf / NaN

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_MUL = 3'd2,
    OP_DIV = 3'd3
  } fpu_op_e;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'b00,
    RM_TO_ZERO      = 2'b01,
    RM_UP           = 2'b10,
    RM_DOWN         = 2'b11
  } rmode_e;

  typedef struct packed {
    logic                     sign;
    logic [EXP_W-1:0]         exp;
    logic [FRAC_W-1:0]        frac;
  } fp64_t;

  // Value on its way to the rounding stage (see the header for its meaning).
  typedef struct packed {
    logic                     sign;
    logic signed [XEXP_W-1:0] exp;
    logic [MANT_W-1:0]        mant;
  } fp_unrounded_t;

  // Canonical quiet NaN returned by every invalid operation.
  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  // Significand with its hidden bit; subnormals (exp field 0) have no hidden bit.
  function automatic logic [SIG_W-1:0] sig_of(input logic [EXP_W-1:0] e,
                                              input logic [FRAC_W-1:0] f);
    return {(e != '0), f};
  endfunction

  // Exponent a significand from sig_of() is scaled by: subnormals count as exponent 1.
  function automatic logic [EXP_W-1:0] eff_exp(input logic [EXP_W-1:0] e);
    return (e == '0) ? EXP_W'(1) : e;
  endfunction

  // Number of leading zeros of a 53-bit significand (53 when it is zero).
  function automatic logic [5:0] lzc53(input logic [SIG_W-1:0] v);
    logic [5:0] n;
    n = 6'd53;
    for (int i = 0; i < SIG_W; i++) begin
      if (v[i]) n = 6'(SIG_W - 1 - i);
    end
    return n;
  endfunction

endpackage
