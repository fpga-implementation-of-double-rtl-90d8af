// fpu_sub_tb: self-checking test of fpu_sub, followed by fpu_round to read its result.
//
// Operand pairs of like sign go through the magnitude subtractor (a - b) and the
// rounding stage in every rounding mode. Expected results come from the simulator's
// double arithmetic (nearest even) and, for the directed modes, from the TwoSum error
// of that result (fpu_ref_pkg). Cases: full-range random operands (subnormals
// included, nearest even only), mid-range random operands in all four modes with an
// inexact-flag check, operands with close exponents (cancellation of leading bits,
// b larger than a), equal operands (exact zero and its sign) and fixed vectors.
module fpu_sub_tb;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  fp64_t         opa, opb;
  fp_unrounded_t res;
  rmode_e        rmode;
  logic [63:0]   out;
  logic          ovf, unf, inx;
  int            checks = 0, failures = 0;

  fpu_sub   dut     (.opa(opa), .opb(opb), .rmode(rmode), .res(res));
  fpu_round u_round (.in(res), .rmode(rmode), .out(out), .overflow(ovf), .underflow(unf),
                     .inexact(inx));

  task automatic check(input logic [63:0] a, input logic [63:0] b, input int rm,
                       input logic [63:0] exp_out, input int exp_inx);
    opa = a; opb = b; rmode = rmode_e'(rm);
    #1;
    checks++;
    if (out !== exp_out || (exp_inx >= 0 && inx !== exp_inx[0])) begin
      failures++;
      if (failures <= 10)
        $display("FAIL sub a=%h b=%h rm=%0d out=%h exp=%h inx=%b exp_inx=%0d",
                 a, b, rm, out, exp_out, inx, exp_inx);
    end
  endtask

  task automatic rand_case(input int elo, input int ehi, input bit all_modes, input int close);
    logic [63:0] a, b, x;
    int dir;
    a = rand_fp(elo, ehi);
    if (close >= 0) begin
      b = rand_fp(0, 0);
      b[62:52] = 11'(int'(a[62:52]) - close);
      if ($urandom % 4 == 0) b[51:40] = a[51:40];
      if ($urandom % 2 == 0) begin x = a; a = b; b = x; end
    end else begin
      b = rand_fp(elo, ehi);
    end
    b[63] = a[63];
    x = rbits(bitsr(a) - bitsr(b));
    if (!all_modes) begin
      check(a, b, 0, x, -1);
    end else begin
      dir = err_dir(1, bitsr(a), bitsr(b), bitsr(x));
      for (int rm = 0; rm < 4; rm++) check(a, b, rm, directed(rm, x, dir), int'(dir != 0));
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
    // Fixed vectors: 3.75 - 1.5 = 2.25; 1 - 2^-54 in each mode; 2 - 3 = -1;
    // 1 - 1 = +0, or -0 when rounding toward -inf; smallest normal - smallest subnormal.
    check(64'h400E000000000000, 64'h3FF8000000000000, 0, 64'h4002000000000000, 0);
    check(64'h3FF0000000000000, 64'h3C90000000000000, 0, 64'h3FF0000000000000, 1);
    check(64'h3FF0000000000000, 64'h3C90000000000000, 1, 64'h3FEFFFFFFFFFFFFF, 1);
    check(64'h3FF0000000000000, 64'h3C90000000000000, 3, 64'h3FEFFFFFFFFFFFFF, 1);
    check(64'h3FF0000000000000, 64'h3C90000000000000, 2, 64'h3FF0000000000000, 1);
    check(64'h4000000000000000, 64'h4008000000000000, 0, 64'hBFF0000000000000, 0);
    check(64'h3FF0000000000000, 64'h3FF0000000000000, 0, 64'h0000000000000000, 0);
    check(64'h3FF0000000000000, 64'h3FF0000000000000, 3, 64'h8000000000000000, 0);
    check(64'h0010000000000000, 64'h0000000000000001, 0, 64'h000FFFFFFFFFFFFF, 0);
    for (int i = 0; i < 200; i++) begin
      logic [63:0] a;
      a = rand_fp(1, 2046);
      check(a, a, 0, 64'h0, 0);
    end
    for (int i = 0; i < 3000; i++) rand_case(0, 2046, 1'b0, -1);
    for (int i = 0; i < 3000; i++) rand_case(823, 1223, 1'b1, -1);
    for (int i = 0; i < 2000; i++) rand_case(900, 1100, 1'b1, int'($urandom % 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
