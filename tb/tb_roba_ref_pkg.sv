// tb_roba_ref_pkg: arithmetic reference model of the ROBA multipliers, used
// by the testbenches.
//
// It works on plain integers, independently of the RTL's bit equations:
// rounding finds the leading one with a loop and looks at the bit below it;
// the approximate product Ar*B + Br*A - Ar*Br is formed with real
// multiplications on 64-bit integers. Results are returned masked to 2n
// bits, as the RTL presents them.
package tb_roba_ref_pkg;

  // Nearest power of two; a tie (3*2^k) rounds up, except 3 which rounds to 2.
  function automatic longint unsigned ref_round(longint unsigned a);
    int k;
    if (a == 0) return 0;
    k = 63;
    while (a[k] == 1'b0) k--;
    if (k >= 2 && a[k-1]) return 64'd1 << (k + 1);
    return 64'd1 << k;
  endfunction

  function automatic longint unsigned mask2n(longint unsigned v, int n);
    return v & ((64'd1 << (2 * n)) - 1);
  endfunction

  // Unsigned ROBA product (unmasked).
  function automatic longint unsigned ref_roba_mag(longint unsigned a, longint unsigned b);
    longint unsigned ar, br;
    ar = ref_round(a);
    br = ref_round(b);
    return ar * b + br * a - ar * br;
  endfunction

  // Value of an n-bit two's-complement word.
  function automatic longint sx(longint unsigned v, int n);
    longint unsigned m;
    m = v & ((64'd1 << n) - 1);
    if (m[n-1]) return longint'(m) - (longint'(1) << n);
    return longint'(m);
  endfunction

  function automatic longint unsigned ref_u(longint unsigned a, longint unsigned b, int n);
    return mask2n(ref_roba_mag(a, b), n);
  endfunction

  // S-ROBA: exact magnitudes, exact negation.
  function automatic longint unsigned ref_s(longint unsigned a, longint unsigned b, int n);
    longint va, vb, r;
    va = sx(a, n);
    vb = sx(b, n);
    r  = longint'(ref_roba_mag((va < 0) ? -va : va, (vb < 0) ? -vb : vb));
    if ((va < 0) != (vb < 0)) r = -r;
    return mask2n(r, n);
  endfunction

  // AS-ROBA: each negation is one short (|x| - 1 and -x - 1).
  function automatic longint unsigned ref_as(longint unsigned a, longint unsigned b, int n,
                                             bit bypass);
    longint va, vb, r;
    va = sx(a, n);
    vb = sx(b, n);
    if (bypass && va == -1) return mask2n(-vb, n);
    if (bypass && vb == -1) return mask2n(-va, n);
    r = longint'(ref_roba_mag((va < 0) ? -va - 1 : va, (vb < 0) ? -vb - 1 : vb));
    r = mask2n(r, n);
    if ((va < 0) != (vb < 0)) r = -r - 1;
    return mask2n(r, n);
  endfunction

endpackage
