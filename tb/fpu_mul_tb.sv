// fpu_mul_tb: self-checking test of fpu_mul, followed by fpu_round to read its result.
//
// Random operand pairs go through the multiplier and the rounding stage. Expected
// results come from the simulator's double arithmetic (nearest even) and, for the
// directed modes, from the TwoProduct error of that result (fpu_ref_pkg). Cases:
// full-range operands (products that overflow, underflow to subnormals or zero, and
// subnormal operands; nearest even only), mid-range operands in all four modes with an
// inexact-flag check, significands with many ones (every partial product full), and
// fixed vectors worked out by hand.
module fpu_mul_tb;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  fp64_t         opa, opb;
  fp_unrounded_t res;
  rmode_e        rmode;
  logic [63:0]   out;
  logic          ovf, unf, inx;
  int            checks = 0, failures = 0;

  fpu_mul   dut     (.opa(opa), .opb(opb), .res(res));
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
        $display("FAIL mul a=%h b=%h rm=%0d out=%h exp=%h inx=%b exp_inx=%0d",
                 a, b, rm, out, exp_out, inx, exp_inx);
    end
  endtask

  task automatic rand_case(input int elo, input int ehi, input bit all_modes, input int close);
    logic [63:0] a, b, x;
    int dir;
    a = rand_fp(elo, ehi);
    b = rand_fp(elo, ehi);
    if (close >= 0) begin
      a[51:0] = a[51:0] | {52{1'b1}} << (close % 8);
      b[51:0] = b[51:0] | {52{1'b1}} << (close / 8);
    end
    x = rbits(bitsr(a) * bitsr(b));
    if (!all_modes) begin
      check(a, b, 0, x, -1);
    end else begin
      dir = err_dir(2, bitsr(a), bitsr(b), bitsr(x));
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
    // Fixed vectors: 1.5 x 1.5 = 2.25; -3 x 0.5 = -1.5; 0 x -5 = -0;
    // smallest subnormal x 2^52 = 2^-1022; (1 + 2^-52)^2 rounds to 1 + 2^-51 (nearest)
    // or stays above it toward +inf; largest x 2 overflows.
    check(64'h3FF8000000000000, 64'h3FF8000000000000, 0, 64'h4002000000000000, 0);
    check(64'hC008000000000000, 64'h3FE0000000000000, 0, 64'hBFF8000000000000, 0);
    check(64'h0000000000000000, 64'hC014000000000000, 0, 64'h8000000000000000, 0);
    check(64'h0000000000000001, 64'h4330000000000000, 0, 64'h0010000000000000, 0);
    check(64'h3FF0000000000001, 64'h3FF0000000000001, 0, 64'h3FF0000000000002, 1);
    check(64'h3FF0000000000001, 64'h3FF0000000000001, 2, 64'h3FF0000000000003, 1);
    check(64'h7FEFFFFFFFFFFFFF, 64'h4000000000000000, 0, 64'h7FF0000000000000, 1);
    for (int i = 0; i < 3000; i++) rand_case(0, 2046, 1'b0, -1);
    for (int i = 0; i < 3000; i++) rand_case(400, 1646, 1'b0, -1);
    for (int i = 0; i < 3000; i++) rand_case(0, 2046, 1'b0, -1);
    for (int i = 0; i < 3000; i++) rand_case(623, 1423, 1'b1, -1);
    for (int i = 0; i < 2000; i++) rand_case(900, 1100, 1'b1, int'($urandom % 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
