// fpu_round_tb: self-checking test of fpu_round.
//
// Random unrounded values (sign, exponent, 56-bit magnitude with a random number of
// leading zeros) are rounded in all four modes. The expected value is computed with
// the simulator's double arithmetic: converting the 56-bit integer magnitude to a
// double rounds it to nearest even, and multiplying by powers of two places it, exactly
// while the result is normal. The side on which the exact value lies is the sign of
// the integer difference between the magnitude and the converted double, which gives
// the directed results and the inexact flag. Values that end up subnormal use 53-bit
// magnitudes, so that the only rounding is the final scaling into the subnormal range;
// the underflow flag is checked there. Overflow in every mode and sign, the zero
// magnitude and rounding that carries into the next binade are fixed cases.
module fpu_round_tb;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  fp_unrounded_t in;
  rmode_e        rmode;
  logic [63:0]   out;
  logic          ovf, unf, inx;
  int            checks = 0, failures = 0;

  fpu_round dut (.in(in), .rmode(rmode), .out(out), .overflow(ovf), .underflow(unf),
                 .inexact(inx));

  // 2^n for -1022 <= n <= 1023, built from its bit pattern.
  function automatic real p2(input int n);
    logic [10:0] e;
    e = 11'(n + 1023);
    return $bitstoreal({1'b0, e, 52'd0});
  endfunction

  // r * 2^k with one rounding at most, at the final step.
  function automatic real scale(input real r, input int k);
    real v;
    v = r;
    while (k > 1000) begin v = v * p2(1000); k -= 1000; end
    if (k < -900) begin
      v = v * p2(k + 600);
      v = v * p2(-600);
    end else begin
      v = v * p2(k);
    end
    return v;
  endfunction

  // Integer value of a positive whole double below 2^63.
  function automatic longint unsigned to_int(input real r);
    logic [63:0] b;
    longint unsigned sig;
    b = rbits(r);
    sig = {11'd0, 1'b1, b[51:0]};
    if (b[62:52] < 11'd1023) return 0;
    if (int'(b[62:52]) >= 1075) return sig << (int'(b[62:52]) - 1075);
    return sig >> (1075 - int'(b[62:52]));
  endfunction

  task automatic check(input logic s, input int e, input logic [55:0] m, input int rm,
                       input logic [63:0] exp_out, input int exp_inx, input int exp_unf,
                       input int exp_ovf);
    in.sign = s; in.exp = XEXP_W'(e); in.mant = m; rmode = rmode_e'(rm);
    #1;
    checks++;
    if (out !== exp_out || inx !== exp_inx[0] || unf !== exp_unf[0] || ovf !== exp_ovf[0]) begin
      failures++;
      if (failures <= 10)
        $display("FAIL round s=%b e=%0d m=%h rm=%0d out=%h exp=%h flags(i,u,o)=%b%b%b exp=%0d%0d%0d",
                 s, e, m, rm, out, exp_out, inx, unf, ovf, exp_inx, exp_unf, exp_ovf);
    end
  endtask

  // Normal-range result from a random 56-bit magnitude.
  task automatic normal_case();
    logic [55:0] m;
    logic s;
    int lz, en, e, dir;
    longint unsigned back;
    real r, x;
    lz = int'($urandom % 24);
    m  = 56'({$urandom, $urandom} >> 8);
    m[55] = 1'b1;
    m  = m >> lz;
    s  = 1'($urandom);
    en = 1 + int'($urandom % 2046);        // exponent after normalisation
    e  = en + lz;
    r  = real'(longint'(m));               // 53 significant bits, nearest even
    back = to_int(r);                      // exact: r is an integer below 2^57
    dir = (64'(m) > back) ? 1 : (64'(m) < back) ? -1 : 0;
    if (s) dir = -dir;
    x  = scale(r, e - 1078);
    if (s) x = -x;
    if (rbits(x) == rbits(s ? -p2(1023) * 2.0 : p2(1023) * 2.0)) return;  // overflow: fixed cases
    for (int rm = 0; rm < 4; rm++)
      check(s, e, m, rm, directed(rm, rbits(x), dir), int'(dir != 0), 0, 0);
  endtask

  // Subnormal-range result from a 53-bit magnitude.
  task automatic tiny_case();
    logic [55:0] m;
    logic s;
    int e, dir, tiny;
    real r, x, ax;
    m  = 56'(({$urandom, $urandom} >> 11) << 3);
    m[55] = 1'b1;
    s  = 1'($urandom);
    e  = -60 + int'($urandom % 62);       // normalised exponent -60 .. 1
    r  = real'(longint'(m));              // exact
    ax = scale(r, e - 1078);
    // Exact value recovered by scaling back (exact for a subnormal or normal double).
    x  = scale(ax, 1078 - e);
    dir = (r > x) ? 1 : (r < x) ? -1 : 0;
    if (s) dir = -dir;
    tiny = int'(e <= 0);
    if (s) ax = -ax;
    if (ax == 0.0) return;                // rounded to zero: directed neighbours differ
    for (int rm = 0; rm < 4; rm++)
      check(s, e, m, rm, directed(rm, rbits(ax), dir), int'(dir != 0),
            int'(tiny != 0 && dir != 0), 0);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Zero magnitude: signed zero, no flags.
    check(1'b1, 500, 56'd0, 0, 64'h8000000000000000, 0, 0, 0);
    check(1'b0, -9, 56'd0, 3, 64'h0000000000000000, 0, 0, 0);
    // All ones rounding up carries into the next binade: 2^53 - 1/2 ... -> 2.0.
    check(1'b0, 1023, {56{1'b1}}, 0, 64'h4000000000000000, 1, 0, 0);
    check(1'b0, 1023, {56{1'b1}}, 1, 64'h3FFFFFFFFFFFFFFF, 1, 0, 0);
    // Largest finite rounded up: overflow to infinity or to the largest finite.
    check(1'b0, 2046, {56{1'b1}}, 0, 64'h7FF0000000000000, 1, 0, 1);
    // Rounded toward zero it stays the largest finite number: inexact, no overflow.
    check(1'b0, 2046, {56{1'b1}}, 1, 64'h7FEFFFFFFFFFFFFF, 1, 0, 0);
    check(1'b0, 2046, {56{1'b1}}, 2, 64'h7FF0000000000000, 1, 0, 1);
    check(1'b0, 2046, {56{1'b1}}, 3, 64'h7FEFFFFFFFFFFFFF, 1, 0, 0);
    check(1'b1, 2046, {56{1'b1}}, 2, 64'hFFEFFFFFFFFFFFFF, 1, 0, 0);
    check(1'b1, 2046, {56{1'b1}}, 3, 64'hFFF0000000000000, 1, 0, 1);
    check(1'b1, 3000, 56'h80000000000000, 0, 64'hFFF0000000000000, 1, 0, 1);
    // Exponent 2047 with an exact significand still overflows.
    check(1'b0, 2047, 56'h80000000000000, 1, 64'h7FEFFFFFFFFFFFFF, 1, 0, 1);
    // Far below the subnormal range: zero or the smallest subnormal.
    check(1'b0, -500, 56'h80000000000000, 0, 64'h0000000000000000, 1, 1, 0);
    check(1'b0, -500, 56'h80000000000000, 2, 64'h0000000000000001, 1, 1, 0);
    check(1'b1, -500, 56'h80000000000000, 3, 64'h8000000000000001, 1, 1, 0);
    // Largest subnormal plus a half unit rounds to the smallest normal.
    check(1'b0, 0, {1'b1, {52{1'b1}}, 3'b100}, 0, 64'h0010000000000000, 1, 1, 0);
    for (int i = 0; i < 4000; i++) normal_case();
    for (int i = 0; i < 3000; i++) tiny_case();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
