// fpu_round: normalises an unrounded result and rounds it to binary64.
//
// Input is a sign, a signed biased exponent and a 56-bit magnitude as described in
// fpu_pkg. The stage
//   1. shifts the magnitude left until its leading one is in bit 55 (needed after a
//      subtraction that cancelled leading bits), lowering the exponent to match;
//   2. if the exponent is then 0 or below, shifts the magnitude right by 1 - exp
//      places, keeping a sticky bit, so the value becomes a subnormal (gradual
//      underflow; the result is "tiny");
//   3. rounds bits 55..3 using the guard bit (bit 2) and the sticky bits (1..0) in
//      one of the four modes of `rmode`:
//        nearest even - up if above half way, to the even neighbour at half way,
//        toward zero  - excess bits truncated,
//        toward +inf  - up in magnitude when positive and inexact,
//        toward -inf  - up in magnitude when negative and inexact;
//   4. renormalises if rounding carried out of the significand, and saturates an
//      exponent of 2047 or more: to infinity, or to the largest finite number in the
//      modes that round toward zero for that sign.
// Flags: inexact when any discarded bit was set (or on overflow), overflow on
// saturation, underflow when the result is tiny and inexact. A zero magnitude gives
// a zero of the given sign with no flags.
//
// The four modes and their codes are those the unit is specified with. Where the
// normalising shift sits, the tininess rule (before rounding) and the saturation values
// by mode are this design's choices, made to match IEEE-754.
//
// Purely combinational.
module fpu_round
  import fpu_pkg::*;
(
  input  fp_unrounded_t in,
  input  rmode_e        rmode,
  output logic [63:0]   out,
  output logic          overflow,
  output logic          underflow,
  output logic          inexact
);
  function automatic logic [5:0] lzc56(input logic [MANT_W-1:0] v);
    logic [5:0] n;
    n = 6'(MANT_W);
    for (int i = 0; i < MANT_W; i++) begin
      if (v[i]) n = 6'(MANT_W - 1 - i);
    end
    return n;
  endfunction

  logic [5:0]               lz;
  logic [MANT_W-1:0]        norm;
  logic signed [XEXP_W-1:0] e_norm;
  logic                     tiny;
  logic [XEXP_W-1:0]        rshift;
  logic [2*MANT_W-1:0]      wide;
  logic [MANT_W-1:0]        m;
  logic [SIG_W-1:0]         sig;
  logic                     guard, sticky, inc;
  logic [SIG_W:0]           sig_r;
  logic signed [XEXP_W-1:0] e_fin;
  logic [EXP_W-1:0]         e_field;
  logic [FRAC_W-1:0]        frac;
  logic                     ovf;

  always_comb begin
    lz     = lzc56(in.mant);
    norm   = in.mant << lz;
    e_norm = in.exp - XEXP_W'(lz);
    tiny   = (e_norm <= 0);

    // Denormalise: value = norm/2^55 * 2^(e_norm-1023) = m/2^55 * 2^(1-1023).
    rshift = tiny ? XEXP_W'(1) - XEXP_W'(e_norm) : '0;
    if (rshift >= XEXP_W'(MANT_W)) begin
      wide = '0;
      m    = MANT_W'(norm != '0);
    end else begin
      wide = {norm, {MANT_W{1'b0}}} >> rshift;
      m    = wide[2*MANT_W-1:MANT_W] | MANT_W'(wide[MANT_W-1:0] != '0);
    end

    sig    = m[MANT_W-1:3];
    guard  = m[2];
    sticky = |m[1:0];
    unique case (rmode)
      RM_NEAREST_EVEN: inc = guard & (sticky | sig[0]);
      RM_TO_ZERO:      inc = 1'b0;
      RM_UP:           inc = ~in.sign & (guard | sticky);
      RM_DOWN:         inc =  in.sign & (guard | sticky);
      default:         inc = 1'b0;
    endcase
    sig_r = {1'b0, sig} + (SIG_W+1)'(inc);

    if (tiny) begin
      // Subnormal, or the smallest normal if rounding carried into the hidden bit.
      e_fin = sig_r[SIG_W-1] ? XEXP_W'(1) : '0;
      frac  = sig_r[FRAC_W-1:0];
    end else if (sig_r[SIG_W]) begin
      e_fin = e_norm + XEXP_W'(1);
      frac  = sig_r[FRAC_W:1];
    end else begin
      e_fin = e_norm;
      frac  = sig_r[FRAC_W-1:0];
    end

    ovf      = !tiny && (e_fin >= XEXP_W'(EXP_MAX));
    e_field  = e_fin[EXP_W-1:0];
    inexact  = guard | sticky | ovf;
    overflow = ovf;
    underflow = tiny & (guard | sticky);

    if (in.mant == '0) begin
      out       = {in.sign, 63'd0};
      inexact   = 1'b0;
      overflow  = 1'b0;
      underflow = 1'b0;
    end else if (ovf) begin
      // Infinity, unless the mode rounds toward zero for this sign.
      if (rmode == RM_TO_ZERO || (rmode == RM_UP && in.sign) || (rmode == RM_DOWN && !in.sign))
        out = {in.sign, 11'h7FE, {FRAC_W{1'b1}}};
      else
        out = {in.sign, 11'h7FF, {FRAC_W{1'b0}}};
    end else begin
      out = {in.sign, e_field, frac};
    end
  end
endmodule
