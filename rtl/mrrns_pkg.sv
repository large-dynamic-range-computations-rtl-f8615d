// mrrns_pkg: types, constants and elaboration-time functions shared by the
// modulus-replication RNS (MRRNS) inner-product processor.
//
// Number representation. A 17-bit two's complement integer A (|A| < 2^16) is
// written as a polynomial in four indeterminates W, X, Y, Z that stand for
// 2, 4, 16 and 256, of degree one in each. The monomial W^i0 X^i1 Y^i2 Z^i3
// is worth 2^(i0 + 2*i1 + 4*i2 + 8*i3), so monomial number k (0..15, exponent
// bits of k) is exactly bit k of |A|; its coefficient is sign(A) * bit k and
// lies in {-1, 0, 1}. A complex integer adds the indeterminate T for j: the
// real part is the T^0 polynomial and the imaginary part the T^1 polynomial.
//
// Rings. Each modulus m (3, 5 or 7) evaluates polynomials at every
// combination of roots: W, X, Y, Z at {-1, 0, 1} (quotient X(X^2-1)), and T at
// the two square roots of -1 when m = 4k+1 (quotient T^2+1, so for m = 5
// T = -2, 2) or else at {-1, 0, 1} (quotient T(T^2-1)). That gives 3^4 = 81
// channels per T root: 243 for m = 3 and 7, 162 for m = 5.
//
// Products of two such polynomials have degree two in each indeterminate, so
// results are indexed by base-3 exponent vectors: output monomial
// n = e0 + 3 e1 + 9 e2 + 27 e3 (0..80), worth 2^(e0 + 2 e1 + 4 e2 + 8 e3),
// i.e. a power of two from 2^0 to 2^30.
package mrrns_pkg;

  localparam int DATA_W   = 17;   // 16 magnitude bits plus sign
  localparam int NDIG     = 16;   // monomials of one real polynomial
  localparam int NMONO    = 81;   // output monomials in W, X, Y, Z (3^4)
  localparam int NPOW     = 31;   // powers of two 2^0 .. 2^30
  localparam int CRT_M    = 105;  // 3 * 5 * 7
  localparam int CRT_W    = 7;    // signed width of a value in [-52, 52]
  localparam int VALUE_W  = 48;   // signed width of a decoded result
  localparam int STREE_MAX_TABLE = 192;  // 2^6 entries of 3 bits

  // A signed digit in {-1, 0, 1}.
  typedef logic signed [1:0] digit_t;
  // One real polynomial: coefficient of monomial k at index k.
  typedef digit_t [NDIG-1:0] rpoly_t;
  // One complex polynomial: [0] real (T^0) part, [1] imaginary (T^1) part.
  typedef rpoly_t [1:0] cpoly_t;

  // Non-negative residue of v modulo m.
  function automatic int modp(input int v, input int m);
    int r;
    r = v % m;
    if (r < 0) r += m;
    return r;
  endfunction

  // Residue width of modulus m.
  function automatic int res_w(input int m);
    return $clog2(m);
  endfunction

  // Multiplicative inverse of a modulo m (m prime, a not divisible by m).
  function automatic int inv_mod(input int a, input int m);
    int r;
    r = 0;
    for (int i = 1; i < m; i++)
      if (modp(a * i, m) == 1) r = i;
    return r;
  endfunction

  // Number of evaluation points used for T with modulus m.
  function automatic int t_roots(input int m);
    return (m % 4 == 1) ? 2 : 3;
  endfunction

  // Number of ring channels of modulus m.
  function automatic int n_chan(input int m);
    return t_roots(m) * NMONO;
  endfunction

  // Smallest positive square root of -1 modulo m (0 if there is none).
  function automatic int sqrt_m1(input int m);
    int r;
    r = 0;
    for (int i = m - 1; i > 0; i--)
      if (modp(i * i, m) == m - 1) r = i;
    return r;
  endfunction

  // Value (as a signed integer) of T's root number idx for modulus m.
  function automatic int t_root(input int m, input int idx);
    if (t_roots(m) == 2) return (idx == 0) ? -sqrt_m1(m) : sqrt_m1(m);
    return idx - 1;
  endfunction

  // Power of two represented by output monomial n (base-3 exponents).
  function automatic int mono_pow(input int n);
    int e0, e1, e2, e3;
    e0 = n % 3;
    e1 = (n / 3) % 3;
    e2 = (n / 9) % 3;
    e3 = (n / 27) % 3;
    return e0 + 2 * e1 + 4 * e2 + 8 * e3;
  endfunction

  // Look-up table of a binary ring operation on two residues of modulus m
  // packed as address {a, b}; op 0 = addition, 1 = multiplication. Entry
  // number addr occupies bits [addr*rw +: rw]. Unreachable codes hold 0.
  function automatic logic [STREE_MAX_TABLE-1:0] ring_table(input int m, input int op);
    logic [STREE_MAX_TABLE-1:0] t;
    int rw, a, b, r;
    rw = res_w(m);
    t = '0;
    for (int addr = 0; addr < (1 << (2 * rw)); addr++) begin
      a = addr >> rw;
      b = addr & ((1 << rw) - 1);
      r = 0;
      if (a < m && b < m) r = (op == 0) ? modp(a + b, m) : modp(a * b, m);
      for (int i = 0; i < rw; i++) t[addr * rw + i] = r[i];
    end
    return t;
  endfunction

  // Signed-digit polynomial of a real integer: coefficient k is sign(v) times
  // bit k of |v|. |v| must be below 2^16.
  function automatic rpoly_t encode_real(input logic signed [DATA_W-1:0] v);
    rpoly_t d;
    logic [DATA_W-1:0] mag;
    mag = v[DATA_W-1] ? DATA_W'(-v) : DATA_W'(v);
    for (int k = 0; k < NDIG; k++)
      d[k] = mag[k] ? (v[DATA_W-1] ? -2'sd1 : 2'sd1) : 2'sd0;
    return d;
  endfunction

endpackage
