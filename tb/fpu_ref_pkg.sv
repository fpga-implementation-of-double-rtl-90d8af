// fpu_ref_pkg: reference arithmetic for the floating point unit's testbenches.
//
// Expected results come from the simulator's own IEEE-754 double arithmetic, which
// rounds to nearest even. For the three directed rounding modes the reference finds
// on which side of that result the exact value lies, with error-free transformations
// done in double arithmetic:
//   add - TwoSum (Knuth): s = a + b, err = exact - s, exactly;
//   mul - TwoProduct (Dekker, Veltkamp splitting): err = a*b - p, exactly;
//   div - remainder r = a - q*b, exact, from TwoProduct(q, b); its sign times the
//         sign of b tells whether the exact quotient is above or below q.
// These are exact when nothing overflows or underflows on the way, so directed-mode
// checks use operands whose exponents keep results well inside the normal range.
// The directed result is then the nearest-even result or its neighbour one unit in the
// last place away.
package fpu_ref_pkg;

  function automatic logic [63:0] rbits(input real r);
    return $realtobits(r);
  endfunction

  function automatic real bitsr(input logic [63:0] b);
    return $bitstoreal(b);
  endfunction

  function automatic logic is_nan(input logic [63:0] b);
    return (b[62:52] == 11'h7FF) && (b[51:0] != 0);
  endfunction

  // Veltkamp split of a into two halves of at most 26 significant bits each.
  function automatic void split(input real a, output real hi, output real lo);
    real c;
    c  = 134217729.0 * a;    // 2^27 + 1
    hi = c - (c - a);
    lo = a - hi;
  endfunction

  // Exact error of the rounded product p = a*b: a*b = p + err.
  function automatic real two_prod_err(input real a, input real b, input real p);
    real ah, al, bh, bl;
    split(a, ah, al);
    split(b, bh, bl);
    return ((ah * bh - p) + ah * bl + al * bh) + al * bl;
  endfunction

  // Sign (-1, 0, +1) of (exact result - nearest-even result x) for op 0..3.
  function automatic int err_dir(input int op, input real a, input real b, input real x);
    real e, bb, pe, r;
    case (op)
      0, 1: begin
        real bs;
        bs = (op == 1) ? -b : b;
        bb = x - a;
        e  = (a - (x - bb)) + (bs - bb);
      end
      2: e = two_prod_err(a, b, x);
      default: begin
        pe = two_prod_err(x, b, x * b);
        r  = (a - x * b) - pe;          // exact remainder a - x*b
        e  = (b < 0.0) ? -r : r;
      end
    endcase
    return (e > 0.0) ? 1 : (e < 0.0) ? -1 : 0;
  endfunction

  // Nearest-even result of op on a and b.
  function automatic real rne(input int op, input real a, input real b);
    case (op)
      0: return a + b;
      1: return a - b;
      2: return a * b;
      default: return a / b;
    endcase
  endfunction

  // Result in rounding mode rm (0 RNE, 1 RZ, 2 RU, 3 RD), given the nearest-even result
  // x (finite and nonzero) and the side dir on which the exact value lies.
  function automatic logic [63:0] directed(input int rm, input logic [63:0] x, input int dir);
    logic neg;
    neg = x[63];
    if (dir == 0 || rm == 0) return x;
    case (rm)
      1: if ((dir < 0) != neg) return x - 64'd1;              // |x| too big
      2: if (dir > 0) return neg ? x - 64'd1 : x + 64'd1;
      default: if (dir < 0) return neg ? x + 64'd1 : x - 64'd1;
    endcase
    return x;
  endfunction

  // Random finite double with biased exponent in [elo, ehi] and random sign.
  function automatic logic [63:0] rand_fp(input int elo, input int ehi);
    logic [63:0] v;
    int unsigned e;
    e = elo + ($urandom % (ehi - elo + 1));
    v = {$urandom, $urandom};
    v[62:52] = e[10:0];
    return v;
  endfunction

endpackage
