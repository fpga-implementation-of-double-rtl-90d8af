// fpu_div: long-hand division of two finite binary64 operands, one quotient bit per
// clock cycle.
//
// The dividend is the significand of operand A (leading one plus fraction), the
// divisor that of operand B. Subnormal operands are first normalised so that both
// significands have their leading one in bit 52. Each cycle the dividend register is
// compared with the divisor register: if it is not smaller, the quotient bit is 1 and
// the divisor is subtracted from it before the shift (the specified step says "greater
// than"; equality must subtract too for an exact quotient such as 6 / 2); otherwise the quotient bit is 0 and
// the dividend alone is shifted. Either way the dividend moves one place left for the
// next cycle. QBITS = 56 quotient bits are formed, the first of weight 2^0, so the
// quotient register holds a 56-bit value with its leading one in bit 55 or 54; a
// nonzero final remainder is ORed into bit 0 as the sticky bit.
//
// The exponent is the exponent of A plus 1023 minus the exponent of B. A value that
// falls to 0 or below is passed on as it is: the rounding stage shifts the quotient
// right by that amount (gradual underflow).
//
// Timing: `start` is sampled on a rising clock edge while the unit is idle. `busy` is
// high from the next edge on for QBITS cycles; `done` pulses for one cycle with `res`
// valid, and `res` holds its value until the next start. Synchronous active-high reset.
// The register names and the exponent rule are the specified ones; the number of
// quotient bits and the start/busy/done handshake are this design's choices.
module fpu_div
  import fpu_pkg::*;
#(
  parameter int unsigned QBITS = MANT_W  // quotient bits formed, one per cycle
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  fp64_t         opa,
  input  fp64_t         opb,
  output logic          busy,
  output logic          done,
  output fp_unrounded_t res
);
  logic [SIG_W:0]          dividend_reg;   // one bit wider: it can reach 2 x divisor
  logic [SIG_W-1:0]        divisor_reg;
  logic [QBITS-1:0]        quotient_reg;
  logic [$clog2(QBITS+1)-1:0] bits_left;
  logic                    sign_reg;
  logic signed [XEXP_W-1:0] exp_reg;

  logic [5:0]              lz_a, lz_b;
  logic                    q_bit;
  logic [SIG_W:0]          partial;

  assign lz_a    = lzc53(sig_of(opa.exp, opa.frac));
  assign lz_b    = lzc53(sig_of(opb.exp, opb.frac));
  assign q_bit   = (dividend_reg >= {1'b0, divisor_reg});
  assign partial = q_bit ? dividend_reg - {1'b0, divisor_reg} : dividend_reg;
  assign busy    = (bits_left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      dividend_reg <= '0;
      divisor_reg  <= '0;
      quotient_reg <= '0;
      bits_left    <= '0;
      sign_reg     <= 1'b0;
      exp_reg      <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        dividend_reg <= {1'b0, sig_of(opa.exp, opa.frac) << lz_a};
        divisor_reg  <= sig_of(opb.exp, opb.frac) << lz_b;
        quotient_reg <= '0;
        bits_left    <= ($bits(bits_left))'(QBITS);
        sign_reg     <= opa.sign ^ opb.sign;
        exp_reg      <= XEXP_W'(eff_exp(opa.exp)) - XEXP_W'(lz_a) + XEXP_W'(BIAS)
                      - XEXP_W'(eff_exp(opb.exp)) + XEXP_W'(lz_b);
      end else if (busy) begin
        quotient_reg <= {quotient_reg[QBITS-2:0], q_bit};
        dividend_reg <= partial << 1;
        bits_left    <= bits_left - 1'b1;
        done         <= (bits_left == 1);
      end
    end
  end

  always_comb begin
    res.sign = sign_reg;
    res.exp  = exp_reg;
    res.mant = MANT_W'(quotient_reg) | MANT_W'(dividend_reg != '0);
  end
endmodule
