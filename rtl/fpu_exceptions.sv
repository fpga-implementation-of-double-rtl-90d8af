// fpu_exceptions: special operands, the final result and the five IEEE-754 exception
// flags.
//
// The datapath (add/sub/mul/div and rounding) only knows finite numbers. This stage
// looks at the two operands and the operation and replaces the rounded result where
// IEEE-754 defines it otherwise:
//   invalid        - a signalling NaN operand, inf - inf (effective subtraction),
//                    0 x inf, 0 / 0, inf / inf: result is the quiet NaN 7FF8...0;
//   NaN operand    - a quiet NaN operand gives the quiet NaN, without a flag;
//   infinity       - an infinite operand (or a finite one divided by zero) gives a
//                    correctly signed infinity; finite / inf gives a signed zero;
//   divide by zero - a finite nonzero dividend and a zero divisor.
// Otherwise the rounded result and the rounding stage's overflow, underflow and
// inexact flags pass through. `exception` is high when any of the five flags is.
//
// The five exceptions are those the unit is specified with; the exact list of invalid
// cases, the single quiet NaN returned and the separate div_by_zero output are this
// design's reading of IEEE-754.
//
// Purely combinational.
module fpu_exceptions
  import fpu_pkg::*;
(
  input  fp64_t       opa,
  input  fp64_t       opb,
  input  fpu_op_e     fpu_op,
  input  logic [63:0] rounded,     // from the rounding stage
  input  logic        r_overflow,
  input  logic        r_underflow,
  input  logic        r_inexact,
  output logic [63:0] out,
  output logic        invalid,
  output logic        div_by_zero,
  output logic        overflow,
  output logic        underflow,
  output logic        inexact,
  output logic        exception
);
  logic nan_a, nan_b, snan_a, snan_b, inf_a, inf_b, zero_a, zero_b;
  logic eff_sub, special;

  assign nan_a  = (opa.exp == '1) && (opa.frac != '0);
  assign nan_b  = (opb.exp == '1) && (opb.frac != '0);
  assign snan_a = nan_a && !opa.frac[FRAC_W-1];
  assign snan_b = nan_b && !opb.frac[FRAC_W-1];
  assign inf_a  = (opa.exp == '1) && (opa.frac == '0);
  assign inf_b  = (opb.exp == '1) && (opb.frac == '0);
  assign zero_a = (opa.exp == '0) && (opa.frac == '0);
  assign zero_b = (opb.exp == '0) && (opb.frac == '0);
  // Add of unlike signs, or subtract of like signs.
  assign eff_sub = (fpu_op == OP_SUB) ? (opa.sign == opb.sign) : (opa.sign != opb.sign);

  always_comb begin
    special     = 1'b1;
    invalid     = 1'b0;
    div_by_zero = 1'b0;
    out         = rounded;
    if (nan_a || nan_b) begin
      out     = QNAN;
      invalid = snan_a || snan_b;
    end else begin
      unique case (fpu_op)
        OP_ADD, OP_SUB: begin
          if (inf_a && inf_b && eff_sub) begin
            out = QNAN; invalid = 1'b1;
          end else if (inf_a) begin
            out = opa;
          end else if (inf_b) begin
            out = {opb.sign ^ (fpu_op == OP_SUB), 11'h7FF, 52'd0};
          end else begin
            special = 1'b0;
          end
        end
        OP_MUL: begin
          if ((inf_a && zero_b) || (zero_a && inf_b)) begin
            out = QNAN; invalid = 1'b1;
          end else if (inf_a || inf_b) begin
            out = {opa.sign ^ opb.sign, 11'h7FF, 52'd0};
          end else begin
            special = 1'b0;
          end
        end
        OP_DIV: begin
          if ((inf_a && inf_b) || (zero_a && zero_b)) begin
            out = QNAN; invalid = 1'b1;
          end else if (inf_a) begin
            out = {opa.sign ^ opb.sign, 11'h7FF, 52'd0};
          end else if (inf_b) begin
            out = {opa.sign ^ opb.sign, 63'd0};
          end else if (zero_b) begin
            out = {opa.sign ^ opb.sign, 11'h7FF, 52'd0}; div_by_zero = 1'b1;
          end else begin
            special = 1'b0;
          end
        end
        default: special = 1'b0;
      endcase
    end
    overflow  = !special && r_overflow;
    underflow = !special && r_underflow;
    inexact   = !special && r_inexact;
    exception = invalid | div_by_zero | overflow | underflow | inexact;
  end
endmodule
