// fpu_align: shifts a 53-bit significand right by the exponent difference of two
// addends, into a 56-bit field with guard bits, and keeps a sticky bit.
//
// The input significand is placed at bits 55..3 of the output field and shifted right
// by `shamt`. `sticky` is the OR of every one-bit that falls off the bottom, so that
// rounding later still sees that the value was not exact. The adder ORs it into bit 0;
// the subtractor needs it apart (see fpu_sub). Shifts of 56 or more leave only the
// sticky bit. A helper of this design's own, shared by the adder and subtractor.
// Purely combinational.
module fpu_align
  import fpu_pkg::*;
(
  input  logic [SIG_W-1:0]  sig,     // significand of the smaller operand
  input  logic [11:0]       shamt,   // exponent difference, unsigned
  output logic [MANT_W-1:0] aligned, // shifted significand, truncated
  output logic              sticky    // some one-bit was shifted out
);
  logic [2*MANT_W-1:0] wide;

  always_comb begin
    if (shamt >= 12'(MANT_W)) begin
      wide = '0;
      sticky = (sig != '0);
    end else begin
      wide = {sig, 3'b000, {MANT_W{1'b0}}} >> shamt;
      sticky = (wide[MANT_W-1:0] != '0);
    end
    aligned = wide[2*MANT_W-1:MANT_W];
  end
endmodule
