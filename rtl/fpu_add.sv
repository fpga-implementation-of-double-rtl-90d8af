// fpu_add: magnitude addition of two finite binary64 operands.
//
// The arithmetic unit routes an operation here when it adds the magnitudes, which is
// an add of operands with equal signs or a subtract of operands with opposite signs.
// It forms sign(a) * (|a| + |b|); the sign of b is not looked at. As the unit's
// description asks, the exponents are made equal first: the operand with the smaller
// exponent is unnormalised (shifted right) so that only its least significant digits
// can be lost, and those are kept as a sticky bit. The two 56-bit aligned significands
// are then added; a carry out of the top bit shifts the sum right by one place and
// raises the exponent. The result is handed to the rounding stage unrounded.
// Subnormal operands take part with exponent 1 and no hidden bit. The alignment of
// the smaller operand is the specified method; the split into a magnitude adder and a
// magnitude subtractor chosen by the effective operation, and the three bits kept below
// the significand (the specification names two), are this design's choices.
//
// Purely combinational: the whole add is one stage of logic between the unit's input
// and output registers.
module fpu_add
  import fpu_pkg::*;
(
  input  fp64_t         opa,
  input  fp64_t         opb,
  output fp_unrounded_t res
);
  logic              a_big;
  fp64_t             hi_op, lo_op;
  logic [11:0]       diff;
  logic [MANT_W-1:0] small_al;
  logic              sticky;
  logic [MANT_W:0]   sum;

  assign a_big = (opa.exp >= opb.exp);
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
    sum = {1'b0, sig_of(hi_op.exp, hi_op.frac), 3'b000} + {1'b0, small_al | MANT_W'(sticky)};
    res.sign = opa.sign;
    if (sum[MANT_W]) begin
      res.mant = sum[MANT_W:1] | MANT_W'(sum[0]);
      res.exp  = XEXP_W'(eff_exp(hi_op.exp)) + XEXP_W'(1);
    end else begin
      res.mant = sum[MANT_W-1:0];
      res.exp  = XEXP_W'(eff_exp(hi_op.exp));
    end
  end
endmodule
