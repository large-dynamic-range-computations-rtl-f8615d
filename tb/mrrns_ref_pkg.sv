// mrrns_ref_pkg: bit-true reference model of the MRRNS inner-product
// processor, written directly from the polynomial arithmetic and not from
// the ring hardware: it multiplies the signed-digit polynomials out over the
// integers, folds T^2 = -1, sums the coefficients of equal powers of two,
// wraps each sum into [-52, 52] (what the modulus 105 can represent) and
// applies the scaling recursion.
package mrrns_ref_pkg;

  class mrrns_ref;
    longint c [3][81];     // product coefficients, [T power][W..Z exponents base 3]
    longint pw_re [31];    // exact per-power sums
    longint pw_im [31];
    int     wr_re [31];    // the same, wrapped into [-52, 52]
    int     wr_im [31];
    longint exact_re, exact_im;  // exact complex inner product
    int     wraps;         // per-power sums that left [-52, 52]

    function new();
      clear();
    endfunction

    function void clear();
      foreach (c[t, n]) c[t][n] = 0;
      exact_re = 0;
      exact_im = 0;
    endfunction

    static function int digit(int v, int k);
      int mag;
      mag = (v < 0) ? -v : v;
      if (((mag >> k) & 1) == 0) return 0;
      return (v < 0) ? -1 : 1;
    endfunction

    static function int clip17(int v);
      if (v < -65535) return -65535;
      return v;
    endfunction

    // Position of the product of input monomials ka and kb (exponent bits)
    static function int prod_index(int ka, int kb);
      int n, p3;
      n = 0;
      p3 = 1;
      for (int v = 0; v < 4; v++) begin
        n += (((ka >> v) & 1) + ((kb >> v) & 1)) * p3;
        p3 *= 3;
      end
      return n;
    endfunction

    static function int mono_pow(int n);
      return (n % 3) + 2 * ((n / 3) % 3) + 4 * ((n / 9) % 3) + 8 * ((n / 27) % 3);
    endfunction

    static function int sym105(longint v);
      longint r;
      r = v % 105;
      if (r < 0) r += 105;
      if (r > 52) r -= 105;
      return int'(r);
    endfunction

    // Add one term x * c of the inner product
    function void add_term(int xr, int xi, int cr, int ci);
      int xa [2];
      int cb [2];
      xa[0] = clip17(xr);
      xa[1] = clip17(xi);
      cb[0] = clip17(cr);
      cb[1] = clip17(ci);
      for (int ta = 0; ta < 2; ta++)
        for (int tb = 0; tb < 2; tb++)
          for (int ka = 0; ka < 16; ka++)
            for (int kb = 0; kb < 16; kb++)
              c[ta + tb][prod_index(ka, kb)] += longint'(digit(xa[ta], ka) * digit(cb[tb], kb));
      exact_re += longint'(xa[0]) * cb[0] - longint'(xa[1]) * cb[1];
      exact_im += longint'(xa[0]) * cb[1] + longint'(xa[1]) * cb[0];
    endfunction

    function void finish();
      wraps = 0;
      for (int e = 0; e < 31; e++) begin
        pw_re[e] = 0;
        pw_im[e] = 0;
      end
      for (int n = 0; n < 81; n++) begin
        pw_re[mono_pow(n)] += c[0][n] - c[2][n];
        pw_im[mono_pow(n)] += c[1][n];
      end
      for (int e = 0; e < 31; e++) begin
        wr_re[e] = sym105(pw_re[e]);
        wr_im[e] = sym105(pw_im[e]);
        if (longint'(wr_re[e]) != pw_re[e]) wraps++;
        if (longint'(wr_im[e]) != pw_im[e]) wraps++;
      end
    endfunction

    static function longint half_rne(longint x);
      longint q;
      q = x >>> 1;
      if (x[0] && q[0]) q++;
      return q;
    endfunction

    // Scaling recursion over 31 per-power values
    static function longint scale(int p [31], int s);
      longint acc, hi;
      acc = p[0];
      hi = 0;
      for (int i = 1; i < 31; i++)
        if (i <= s) acc = half_rne(acc) + p[i];
        else        hi += longint'(p[i]) <<< (i - s);
      return acc + hi;
    endfunction

    static function longint sat17(longint v);
      if (v > 65535) return 65535;
      if (v < -65535) return -65535;
      return v;
    endfunction
  endclass

endpackage
