// tb_psi_inverse: random polynomials of degree up to two in W, X, Y, Z (and
// up to two in T for M = 3, 7, one for M = 5) are evaluated here at every
// channel's roots; the inverse maps must return their coefficients, with
// the T^2 coefficient subtracted from the real part (T^2 = -1).
module tb_psi_inverse;
  import mrrns_pkg::*;

  logic [242:0][1:0] res3;
  logic [161:0][2:0] res5;
  logic [242:0][2:0] res7;
  logic [80:0][1:0] re3, im3;
  logic [80:0][2:0] re5, im5, re7, im7;

  psi_inverse #(.M(3)) dut3 (.res(res3), .coef_re(re3), .coef_im(im3));
  psi_inverse #(.M(5)) dut5 (.res(res5), .coef_re(re5), .coef_im(im5));
  psi_inverse #(.M(7)) dut7 (.res(res7), .coef_re(re7), .coef_im(im7));

  int checks = 0, failures = 0;
  int c [3][81];

  function automatic int md(int x, int m);
    int r;
    r = x % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic int pw(int b, int e);
    int r;
    r = 1;
    for (int i = 0; i < e; i++) r *= b;
    return r;
  endfunction

  function automatic int eval_at(int nt, int t, int w, int x, int y, int z);
    int s;
    s = 0;
    for (int tp = 0; tp < nt; tp++)
      for (int n = 0; n < 81; n++)
        s += c[tp][n] * pw(t, tp) * pw(w, n % 3) * pw(x, (n / 3) % 3) *
             pw(y, (n / 9) % 3) * pw(z, (n / 27) % 3);
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) begin
      for (int tp = 0; tp < 3; tp++)
        for (int n = 0; n < 81; n++) c[tp][n] = int'($urandom_range(20, 0)) - 10;
      for (int m = 3; m <= 7; m += 2) begin
        int nt;
        nt = (m == 5) ? 2 : 3;
        for (int ch = 0; ch < nt * 81; ch++) begin
          int ti, tv, v;
          ti = ch / 81;
          tv = (m == 5) ? ((ti == 0) ? -2 : 2) : ti - 1;
          v = md(eval_at(nt, tv, (ch % 3) - 1, ((ch / 3) % 3) - 1, ((ch / 9) % 3) - 1,
                         ((ch / 27) % 3) - 1), m);
          if (m == 3) res3[ch] = 2'(v);
          else if (m == 5) res5[ch] = 3'(v);
          else res7[ch] = 3'(v);
        end
      end
      #1;
      for (int n = 0; n < 81; n++) begin
        check(int'(re3[n]) == md(c[0][n] - c[2][n], 3), $sformatf("M=3 re %0d", n));
        check(int'(im3[n]) == md(c[1][n], 3), "M=3 im");
        check(int'(re5[n]) == md(c[0][n], 5), $sformatf("M=5 re %0d", n));
        check(int'(im5[n]) == md(c[1][n], 5), "M=5 im");
        check(int'(re7[n]) == md(c[0][n] - c[2][n], 7), $sformatf("M=7 re %0d", n));
        check(int'(im7[n]) == md(c[1][n], 7), "M=7 im");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
