// psi_forward: the evaluation map from a complex input polynomial to the
// ring channels of one modulus M.
//
// Channel ch = t*81 + w + 3x + 9y + 27z receives the value of the polynomial
// at T = root t and W, X, Y, Z = (w-1), (x-1), (y-1), (z-1), reduced mod M.
// The roots of T are {-1, 0, 1} for M = 3 and 7 and {-2, 2} for M = 5 (the
// square roots of -1). The evaluation matrix is the tensor product of one
// small matrix per variable, so it is applied one variable at a time: a
// polynomial a0 + a1 v of degree one becomes the three values a0 - a1, a0,
// a0 + a1 at v = -1, 0, 1 (and a0 -+ r a1 for T at -r, r). Four such passes
// over W, X, Y, Z and one over T need only additions of small integers; the
// result is reduced mod M once at the end. Combinational.
module psi_forward
  import mrrns_pkg::*;
#(
  parameter int M = 7
) (
  input  cpoly_t                                   dig,
  output logic [n_chan(M)-1:0][$clog2(M)-1:0]     res
);
  localparam int RW  = $clog2(M);
  localparam int NCH = n_chan(M);

  localparam int NT = t_roots(M);
  localparam int R1 = t_root(M, NT - 1);   // largest root of T: 1, or r for M = 5

  always_comb begin
    int a [2][NMONO];
    int o [3 * NMONO];
    logic [6:0] n3;
    int stride, c0, c1;
    stride = 1;
    n3 = '0;
    {c0, c1} = '0;
    for (int t = 0; t < 2; t++)
      for (int n = 0; n < NMONO; n++) a[t][n] = 0;
    // coefficient of monomial k sits at the base-3 index whose digits are k's bits
    for (int t = 0; t < 2; t++)
      for (int k = 0; k < NDIG; k++) begin
        n3 = 7'(int'(k[0]) + 3 * int'(k[1]) + 9 * int'(k[2]) + 27 * int'(k[3]));
        a[t][n3] = int'(dig[t][k]);
      end
    // W, X, Y, Z: replace digit 0/1 (exponent) by digit 0/1/2 (root -1/0/1)
    for (int v = 0; v < 4; v++) begin
      stride = 3 ** v;
      for (int t = 0; t < 2; t++)
        for (int n = 0; n < NMONO; n++)
          if (((n / stride) % 3) == 0) begin
            c0 = a[t][n];
            c1 = a[t][n + stride];
            a[t][n]              = c0 - c1;
            a[t][n + stride]     = c0;
            a[t][n + 2 * stride] = c0 + c1;
          end
    end
    // T
    for (int n = 0; n < NMONO; n++) begin
      if (NT == 3) begin
        o[n]             = a[0][n] - a[1][n];
        o[NMONO + n]     = a[0][n];
        o[2 * NMONO + n] = a[0][n] + a[1][n];
      end else begin
        o[n]             = a[0][n] - R1 * a[1][n];
        o[NMONO + n]     = a[0][n] + R1 * a[1][n];
        o[2 * NMONO + n] = 0;
      end
    end
    for (int ch = 0; ch < NCH; ch++) res[ch] = RW'(modp(o[ch], M));
  end
endmodule
