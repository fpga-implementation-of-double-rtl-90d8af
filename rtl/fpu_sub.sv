// fpu_sub: magnitude subtraction of two finite binary64 operands.
//
// The arithmetic unit routes an operation here when it subtracts magnitudes, which is
// a subtract of operands with equal signs or an add of operands with opposite signs.
// It forms sign(a) * (|a| - |b|); the sign of b is not looked at. If operand b is the
// bigger one, the smaller number is taken from the bigger one and the sign of the
// result is inverted. As for the adder, the
// smaller operand is shifted right to equal exponents; the bits shifted out are kept
// as a sticky bit, the extra remainder bit below the guard bit that decides rounding.
// The difference may have leading zeros; the rounding stage normalises it. An exact
// zero difference is +0, or -0 when rounding toward -infinity (IEEE-754 rule), which is
// why the rounding mode comes in.
//
// Purely combinational: one stage of logic between the unit's registers.
module fpu_sub
  import fpu_pkg::*;
(
  input  fp64_t         opa,
  input  fp64_t         opb,
  input  rmode_e        rmode,
  output fp_unrounded_t res
);
  logic              a_big;
  fp64_t             hi_op, lo_op;
  logic [11:0]       diff;
  logic [MANT_W-1:0] small_al;
  logic              sticky;
  logic [MANT_W-1:0] dif;

  // Compare magnitudes: exponent field first, then fraction.
  assign a_big = ({opa.exp, opa.frac} >= {opb.exp, opb.frac});
  assign hi_op   = a_big ? opa : opb;
  assign lo_op = a_big ? opb : opa;
  assign diff  = 12'(eff_exp(hi_op.exp)) - 12'(eff_exp(lo_op.exp));

  fpu_align u_align (
    .sig    (sig_of(lo_op.exp, lo_op.frac)),
    .shamt  (diff),
    .aligned(small_al),
    .sticky (sticky)
  );

  always_comb begin
    // The shifted-out part lies strictly between 0 and one unit of bit 0: take one
    // more unit off and mark the result inexact in bit 0, which keeps the exact
    // difference strictly inside the interval the rounding stage assumes.
    dif      = {sig_of(hi_op.exp, hi_op.frac), 3'b000} - small_al - MANT_W'(sticky);
    res.mant = dif | MANT_W'(sticky);
    res.exp  = XEXP_W'(eff_exp(hi_op.exp));
    if (dif == '0) res.sign = (rmode == RM_DOWN);
    else           res.sign = a_big ? opa.sign : ~opa.sign;
  end
endmodule
