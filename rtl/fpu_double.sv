// fpu_double: double precision (IEEE-754 binary64) floating point arithmetic unit
// with add, subtract, multiply and divide.
//
// Structure. The operands, op-code and rounding mode are taken into input registers
// when `enable` is sampled high. From there the four operation units work side by
// side on the registered operands: fpu_add and fpu_sub are single stages of
// combinational logic, fpu_mul is a single stage built from 24 x 17-bit multiplies,
// and fpu_div is a long-hand divider that forms one quotient bit per cycle. The 3-bit
// op-code selects the unit whose output goes on to the shared rounding stage
// (fpu_round) and from there to the exception stage (fpu_exceptions), whose result and
// flags are taken into the output registers. Add and subtract are routed by the
// effective operation: a magnitude addition (add of like signs, subtract of unlike
// signs) goes to fpu_add, a magnitude subtraction to fpu_sub.
//
// Interface. fpu_op: 0 add, 1 sub, 2 mul, 3 div (codes 4..7 are not operations and
// `enable` is ignored with them). rmode: 00 nearest even, 01 toward zero,
// 10 toward +inf, 11 toward -inf. out is opa (op) opb. Flags: invalid, div_by_zero,
// overflow, underflow, inexact, and exception = OR of the five.
//
// Timing. `enable` is sampled on the rising edge of clk when the unit is not busy
// (ready high or just after reset). `ready` drops on that edge and rises again, with
// `out` and the flags valid, ADD_CYCLES / SUB_CYCLES / MUL_CYCLES / DIV_CYCLES rising
// edges after it (20, 20, 24 and 74 by default, the latencies the unit is specified
// with). Add, subtract and multiply settle within one clock after the input
// registers; the divider needs 1 + 56 cycles; the output is nevertheless taken at the
// fixed latency of each operation. `enable` while busy is ignored. `count` shows the
// cycles elapsed in the current operation. Synchronous active-high reset clears all
// registers, `ready` included.
module fpu_double
  import fpu_pkg::*;
#(
  parameter int unsigned ADD_CYCLES = 20,
  parameter int unsigned SUB_CYCLES = 20,
  parameter int unsigned MUL_CYCLES = 24,
  parameter int unsigned DIV_CYCLES = 74
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [1:0]  rmode,
  input  logic [2:0]  fpu_op,
  input  logic [63:0] opa,
  input  logic [63:0] opb,
  output logic [63:0] out,
  output logic        ready,
  output logic        underflow,
  output logic        overflow,
  output logic        inexact,
  output logic        exception,
  output logic        invalid,
  output logic        div_by_zero,
  output logic [6:0]  count
);
  // Input registers.
  fp64_t   opa_reg, opb_reg;
  fpu_op_e op_reg;
  rmode_e  rmode_reg;
  logic    busy;
  logic    div_start;

  // Datapath.
  fp_unrounded_t add_res, sub_res, mul_res, div_res, sel_res;
  logic          div_busy, div_done;
  logic          eff_sub;
  logic [63:0]   rnd_out, exc_out;
  logic          rnd_ovf, rnd_unf, rnd_inx;
  logic          exc_inv, exc_dbz, exc_ovf, exc_unf, exc_inx, exc_any;
  logic [6:0]    latency;

  // The output is taken when the counter reaches the operation's latency.
  always_comb begin
    unique case (op_reg)
      OP_ADD:  latency = 7'(ADD_CYCLES);
      OP_SUB:  latency = 7'(SUB_CYCLES);
      OP_MUL:  latency = 7'(MUL_CYCLES);
      default: latency = 7'(DIV_CYCLES);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      opa_reg     <= '0;
      opb_reg     <= '0;
      op_reg      <= OP_ADD;
      rmode_reg   <= RM_NEAREST_EVEN;
      busy        <= 1'b0;
      div_start   <= 1'b0;
      count       <= '0;
      ready       <= 1'b0;
      out         <= '0;
      underflow   <= 1'b0;
      overflow    <= 1'b0;
      inexact     <= 1'b0;
      exception   <= 1'b0;
      invalid     <= 1'b0;
      div_by_zero <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (!busy) begin
        if (enable && fpu_op <= 3'(OP_DIV)) begin
          opa_reg   <= opa;
          opb_reg   <= opb;
          op_reg    <= fpu_op_e'(fpu_op);
          rmode_reg <= rmode_e'(rmode);
          div_start <= (fpu_op == 3'(OP_DIV));
          busy      <= 1'b1;
          ready     <= 1'b0;
          count     <= 7'd1;
        end
      end else if (count == latency) begin
        out         <= exc_out;
        underflow   <= exc_unf;
        overflow    <= exc_ovf;
        inexact     <= exc_inx;
        exception   <= exc_any;
        invalid     <= exc_inv;
        div_by_zero <= exc_dbz;
        busy        <= 1'b0;
        ready       <= 1'b1;
      end else begin
        count <= count + 7'd1;
      end
    end
  end

  fpu_add u_add (.opa(opa_reg), .opb(opb_reg), .res(add_res));
  fpu_sub u_sub (.opa(opa_reg), .opb(opb_reg), .rmode(rmode_reg), .res(sub_res));
  fpu_mul u_mul (.opa(opa_reg), .opb(opb_reg), .res(mul_res));
  fpu_div u_div (
    .clk  (clk),
    .rst  (rst),
    .start(div_start),
    .opa  (opa_reg),
    .opb  (opb_reg),
    .busy (div_busy),
    .done (div_done),
    .res  (div_res)
  );

  // Op-code selects the unit that feeds the rounding stage.
  assign eff_sub = (op_reg == OP_SUB) ? (opa_reg.sign == opb_reg.sign)
                                      : (opa_reg.sign != opb_reg.sign);
  always_comb begin
    unique case (op_reg)
      OP_ADD, OP_SUB: sel_res = eff_sub ? sub_res : add_res;
      OP_MUL:         sel_res = mul_res;
      default:        sel_res = div_res;
    endcase
  end

  fpu_round u_round (
    .in       (sel_res),
    .rmode    (rmode_reg),
    .out      (rnd_out),
    .overflow (rnd_ovf),
    .underflow(rnd_unf),
    .inexact  (rnd_inx)
  );

  fpu_exceptions u_exc (
    .opa        (opa_reg),
    .opb        (opb_reg),
    .fpu_op     (op_reg),
    .rounded    (rnd_out),
    .r_overflow (rnd_ovf),
    .r_underflow(rnd_unf),
    .r_inexact  (rnd_inx),
    .out        (exc_out),
    .invalid    (exc_inv),
    .div_by_zero(exc_dbz),
    .overflow   (exc_ovf),
    .underflow  (exc_unf),
    .inexact    (exc_inx),
    .exception  (exc_any)
  );

  // ready and busy are never high together; ready rises only as an operation ends.
  a_ready_idle: assert property (@(posedge clk) disable iff (rst) ready |-> !busy);
  a_ready_rise: assert property (@(posedge clk) disable iff (rst)
    $rose(ready) |-> $past(busy && count == latency));

  // The divider must have finished by the time a divide result is taken.
  a_div_in_time: assert property (@(posedge clk) disable iff (rst)
    (busy && op_reg == OP_DIV && count == latency) |-> (!div_busy && !div_start));

  // A divider result is ready exactly 1 + 56 cycles after the divide was accepted.
  a_div_done: assert property (@(posedge clk) disable iff (rst)
    div_start |-> ##(MANT_W+1) div_done);

  initial begin
    assert (DIV_CYCLES >= MANT_W + 2 && DIV_CYCLES < 128)
      else $error("DIV_CYCLES must leave the divider its %0d cycles", MANT_W + 2);
    assert (ADD_CYCLES >= 1 && SUB_CYCLES >= 1 && MUL_CYCLES >= 1 &&
            ADD_CYCLES < 128 && SUB_CYCLES < 128 && MUL_CYCLES < 128)
      else $error("latencies must lie between 1 and 127 cycles");
  end
endmodule
