// roba_ref_pkg: reference model of the RoBA multiplier for the testbenches.
//
// Computes, with 64-bit integer arithmetic and without any of the RTL's
// bit-level structure, what the multiplier should return:
//   - round_pow2(x): the power of two nearest to x, found by comparing the
//     distance to every candidate; a tie goes to the larger power, except
//     that 3 goes to 2; 0 stays 0.
//   - roba_ref(a, b, n, variant): the n-bit operands' magnitudes (exact or
//     one's complement negation), the approximate product
//     Ar*B + Br*A - Ar*Br, the sign applied (exactly or one's complement)
//     and the result as a 2n-bit pattern.
package roba_ref_pkg;

  import roba_pkg::*;

  function automatic longint round_pow2(longint x);
    longint best, c;
    if (x == 0) return 0;
    if (x == 3) return 2;
    best = 1;
    for (int j = 1; j < 62; j++) begin
      longint dc, db;
      c  = longint'(1) << j;
      dc = (x > c) ? x - c : c - x;
      db = (x > best) ? x - best : best - x;
      if (dc < db || (dc == db && c > best)) best = c;
      if (c > 2 * x) break;
    end
    return best;
  endfunction

  // Sign-extend an n-bit pattern.
  function automatic longint sext(longint v, int n);
    longint m;
    m = (longint'(1) << n) - 1;
    v = v & m;
    if (v[n-1]) return v - (longint'(1) << n);
    return v;
  endfunction

  // Magnitude of the approximate product, before the sign is applied.
  function automatic longint roba_mag(longint am, longint bm);
    longint ar, br;
    ar = round_pow2(am);
    br = round_pow2(bm);
    return ar * bm + br * am - ar * br;
  endfunction

  // Approximate product as a signed integer (unsigned for U_ROBA).
  function automatic longint roba_val(longint a, longint b, int n, roba_variant_e v);
    longint sa, sb, am, bm, m;
    bit neg;
    if (v == U_ROBA) begin
      am  = a & ((longint'(1) << n) - 1);
      bm  = b & ((longint'(1) << n) - 1);
      neg = 1'b0;
    end else begin
      sa  = sext(a, n);
      sb  = sext(b, n);
      am  = (sa < 0) ? ((v == S_ROBA) ? -sa : -sa - 1) : sa;
      bm  = (sb < 0) ? ((v == S_ROBA) ? -sb : -sb - 1) : sb;
      neg = (sa < 0) != (sb < 0);
    end
    m = roba_mag(am, bm);
    if (neg) m = (v == S_ROBA) ? -m : -m - 1;
    return m;
  endfunction

  // The same as a 2n-bit pattern, as it appears on the product port.
  function automatic longint roba_ref(longint a, longint b, int n, roba_variant_e v);
    return roba_val(a, b, n, v) & ((longint'(1) << (2 * n)) - 1);
  endfunction

  // Exact product as a signed integer (unsigned for U_ROBA).
  function automatic longint exact_val(longint a, longint b, int n, roba_variant_e v);
    if (v == U_ROBA)
      return (a & ((longint'(1) << n) - 1)) * (b & ((longint'(1) << n) - 1));
    return sext(a, n) * sext(b, n);
  endfunction

endpackage
