// psi_inverse: interpolation from the ring channels of modulus M back to the
// coefficients of the result polynomial, followed by the reduction T^2 = -1.
//
// The evaluation map is a tensor product of one small matrix per variable,
// so its inverse is applied one variable at a time. For the three points
// -1, 0, 1 and f(x) = a0 + a1 x + a2 x^2:
//   a0 = f(0),  a1 = (f(1) - f(-1))/2,  a2 = (f(1) + f(-1))/2 - f(0),
// and for T at the two points -r, r (r^2 = -1, used when M = 5):
//   a0 = (f(r) + f(-r))/2,  a1 = (f(r) - f(-r))/(2r),
// with all divisions done as multiplications by inverses mod M.
// After the W, X, Y, Z passes, index n = e0 + 3e1 + 9e2 + 27e3 holds the
// coefficient of W^e0 X^e1 Y^e2 Z^e3. For M = 3 and 7, T appears up to T^2,
// which is folded into the real part (T stands for j); for M = 5 the
// quotient T^2 + 1 already did that. The fold is this design's own step: it
// puts all three moduli into the same real/imaginary form before the CRT.
// Combinational.
module psi_inverse
  import mrrns_pkg::*;
#(
  parameter int M = 7
) (
  input  logic [n_chan(M)-1:0][$clog2(M)-1:0] res,
  output logic [NMONO-1:0][$clog2(M)-1:0]     coef_re,
  output logic [NMONO-1:0][$clog2(M)-1:0]     coef_im
);
  localparam int RW   = $clog2(M);
  localparam int NT   = t_roots(M);
  localparam int NCH  = n_chan(M);
  localparam int INV2 = inv_mod(2, M);
  localparam int INV2R = (NT == 2) ? inv_mod(modp(2 * sqrt_m1(M), M), M) : 0;

  always_comb begin
    int a [3 * NMONO];
    int stride, i0, i1, i2, fm, f0, fp;
    stride  = 1;
    {i0, i1, i2, fm, f0, fp} = '0;
    coef_re = '0;
    coef_im = '0;
    for (int i = 0; i < 3 * NMONO; i++) a[i] = 0;
    for (int i = 0; i < NCH; i++) a[i] = int'(res[i]);
    // W, X, Y, Z: three-point interpolation inside every T block
    for (int v = 0; v < 4; v++) begin
      stride = 3 ** v;
      for (int tb = 0; tb < NT; tb++)
        for (int n = 0; n < NMONO; n++)
          if (((n / stride) % 3) == 0) begin
            i0 = tb * NMONO + n;
            i1 = i0 + stride;
            i2 = i0 + 2 * stride;
            fm = a[i0];
            f0 = a[i1];
            fp = a[i2];
            a[i0] = f0;
            a[i1] = modp(INV2 * (fp - fm), M);
            a[i2] = modp(INV2 * (fp + fm) - f0, M);
          end
    end
    // T, then the fold T^2 = -1
    for (int n = 0; n < NMONO; n++) begin
      if (NT == 3) begin
        fm = a[n];
        f0 = a[NMONO + n];
        fp = a[2 * NMONO + n];
        coef_re[n] = RW'(modp(f0 - (INV2 * (fp + fm) - f0), M));
        coef_im[n] = RW'(modp(INV2 * (fp - fm), M));
      end else begin
        fm = a[n];
        fp = a[NMONO + n];
        coef_re[n] = RW'(modp(INV2 * (fp + fm), M));
        coef_im[n] = RW'(modp(INV2R * (fp - fm), M));
      end
    end
  end
endmodule
