// fpu_exceptions_tb: self-checking test of fpu_exceptions.
//
// Every pair from a pool of operands (signed zeros, infinities, quiet and signalling
// NaNs, subnormal, normal and largest numbers) is applied with each operation. Where
// an operand is a NaN or an infinity, or a divisor is zero, the expected result is the
// simulator's own double result of the operation (any NaN expected as the unit's quiet
// NaN) and the expected flags follow from the IEEE-754 definitions: invalid for a
// signalling NaN or a NaN made from non-NaN operands, divide-by-zero for a finite
// nonzero dividend over zero. Otherwise the stage must pass the rounded result and the
// rounding flags through unchanged; these are driven with random values.
module fpu_exceptions_tb;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  fp64_t       opa, opb;
  fpu_op_e     op;
  logic [63:0] rounded;
  logic        r_ovf, r_unf, r_inx;
  logic [63:0] out;
  logic        inv, dbz, ovf, unf, inx, exc;
  int          checks = 0, failures = 0;

  fpu_exceptions dut (
    .opa(opa), .opb(opb), .fpu_op(op), .rounded(rounded),
    .r_overflow(r_ovf), .r_underflow(r_unf), .r_inexact(r_inx),
    .out(out), .invalid(inv), .div_by_zero(dbz), .overflow(ovf), .underflow(unf),
    .inexact(inx), .exception(exc)
  );

  localparam int NPOOL = 14;
  localparam logic [63:0] POOL [NPOOL] = '{
    64'h0000000000000000, 64'h8000000000000000,   // +0, -0
    64'h7FF0000000000000, 64'hFFF0000000000000,   // +inf, -inf
    64'h7FF8000000000000, 64'hFFF8000000000123,   // quiet NaNs
    64'h7FF0000000000001, 64'hFFF4000000000000,   // signalling NaNs
    64'h3FF8000000000000, 64'hC008000000000000,   // 1.5, -3
    64'h0000000000000007, 64'h800FFFFFFFFFFFFF,   // subnormals
    64'h7FEFFFFFFFFFFFFF, 64'hFFEFFFFFFFFFFFFF    // largest finite
  };

  function automatic logic is_inf(input logic [63:0] b);
    return (b[62:52] == 11'h7FF) && (b[51:0] == 0);
  endfunction
  function automatic logic is_zero(input logic [63:0] b);
    return b[62:0] == 0;
  endfunction
  function automatic logic is_snan(input logic [63:0] b);
    return is_nan(b) && !b[51];
  endfunction

  task automatic check_pair(input logic [63:0] a, input logic [63:0] b, input int o);
    logic special, e_inv, e_dbz, e_ovf, e_unf, e_inx;
    logic [63:0] e_out, host;
    opa = a; opb = b; op = fpu_op_e'(o);
    rounded = {$urandom, $urandom};
    {r_ovf, r_unf, r_inx} = 3'($urandom);
    #1;
    host    = rbits(rne(o, bitsr(a), bitsr(b)));
    special = is_nan(a) || is_nan(b) || is_inf(a) || is_inf(b) || (o == 3 && is_zero(b));
    if (special) begin
      e_out = is_nan(host) ? QNAN : host;
      e_inv = is_snan(a) || is_snan(b) || (is_nan(host) && !is_nan(a) && !is_nan(b));
      e_dbz = (o == 3) && is_zero(b) && !is_zero(a) && !is_nan(a) && !is_inf(a);
      {e_ovf, e_unf, e_inx} = 3'b000;
    end else begin
      e_out = rounded;
      e_inv = 1'b0;
      e_dbz = 1'b0;
      {e_ovf, e_unf, e_inx} = {r_ovf, r_unf, r_inx};
    end
    checks++;
    if (out !== e_out || inv !== e_inv || dbz !== e_dbz || ovf !== e_ovf || unf !== e_unf ||
        inx !== e_inx || exc !== (e_inv | e_dbz | e_ovf | e_unf | e_inx)) begin
      failures++;
      if (failures <= 10)
        $display("FAIL exc op=%0d a=%h b=%h out=%h exp=%h inv=%b/%b dbz=%b/%b", o, a, b, out,
                 e_out, inv, e_inv, dbz, e_dbz);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int o = 0; o < 4; o++)
        for (int i = 0; i < NPOOL; i++)
          for (int j = 0; j < NPOOL; j++)
            check_pair(POOL[i], POOL[j], o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
