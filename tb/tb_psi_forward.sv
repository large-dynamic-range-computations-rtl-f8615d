// tb_psi_forward: random complex polynomials are evaluated by the three
// forward maps (M = 3, 5, 7); every channel must hold the polynomial's value
// at that channel's roots, computed here by direct substitution.
module tb_psi_forward;
  import mrrns_pkg::*;
  import mrrns_ref_pkg::*;

  cpoly_t dig;
  logic [242:0][1:0] res3;
  logic [161:0][2:0] res5;
  logic [242:0][2:0] res7;

  psi_forward #(.M(3)) dut3 (.dig(dig), .res(res3));
  psi_forward #(.M(5)) dut5 (.dig(dig), .res(res5));
  psi_forward #(.M(7)) dut7 (.dig(dig), .res(res7));

  int checks = 0, failures = 0;

  function automatic int md(int x, int m);
    int r;
    r = x % m;
    return (r < 0) ? r + m : r;
  endfunction

  // value of the polynomial at T = t, W = w, X = x, Y = y, Z = z
  function automatic int eval_at(int t, int w, int x, int y, int z);
    int s, term;
    s = 0;
    for (int part = 0; part < 2; part++)
      for (int k = 0; k < 16; k++) begin
        term = int'(dig[part][k]);
        if (part == 1) term *= t;
        if (k[0]) term *= w;
        if (k[1]) term *= x;
        if (k[2]) term *= y;
        if (k[3]) term *= z;
        s += term;
      end
    return s;
  endfunction

  task automatic check_mod(input int m);
    int nt, tv, v, got;
    nt = (m == 5) ? 2 : 3;
    for (int ti = 0; ti < nt; ti++)
      for (int z = 0; z < 3; z++)
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 3; x++)
            for (int w = 0; w < 3; w++) begin
              int ch;
              tv = (m == 5) ? ((ti == 0) ? -2 : 2) : ti - 1;
              v = md(eval_at(tv, w - 1, x - 1, y - 1, z - 1), m);
              ch = ti * 81 + w + 3 * x + 9 * y + 27 * z;
              got = (m == 3) ? int'(res3[ch]) : (m == 5) ? int'(res5[ch]) : int'(res7[ch]);
              checks++;
              if (got != v) begin
                failures++;
                if (failures < 10) $display("FAIL: M=%0d channel %0d: %0d exp %0d", m, ch, got, v);
              end
            end
  endtask

  initial begin
    for (int i = 0; i < 20; i++) begin
      int vr, vi;
      vr = int'($urandom_range(131070, 0)) - 65535;
      vi = int'($urandom_range(131070, 0)) - 65535;
      for (int k = 0; k < 16; k++) begin
        dig[0][k] = 2'(mrrns_ref::digit(vr, k));
        dig[1][k] = 2'(mrrns_ref::digit(vi, k));
      end
      #1;
      check_mod(3);
      check_mod(5);
      check_mod(7);
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
