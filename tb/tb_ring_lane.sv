// tb_ring_lane: checks one lane (M = 7 by default through the parameter of
// this bench) against the reference model: after each block of four terms
// the lane's per-power sums must equal the exact per-power sums of the
// product polynomial reduced modulo M, three clock edges after the last
// term. Blocks run with gaps and back to back.
module tb_ring_lane;
  import mrrns_pkg::*;
  import mrrns_ref_pkg::*;

  localparam int M   = 7;
  localparam int RW  = $clog2(M);
  localparam int LAT = 3;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_first, in_last, out_valid;
  cpoly_t a_dig, b_dig;
  logic [NPOW-1:0][RW-1:0] pow_re, pow_im;

  ring_lane #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic int md(longint v);
    longint r;
    r = v % M;
    if (r < 0) r += M;
    return int'(r);
  endfunction

  function automatic rpoly_t enc(int v);
    rpoly_t d;
    for (int k = 0; k < NDIG; k++) d[k] = 2'(mrrns_ref::digit(v, k));
    return d;
  endfunction

  mrrns_ref q_ref[$];
  int       q_cyc[$];
  int       n_out = 0;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      mrrns_ref rr;
      int lc;
      n_out++;
      check(q_ref.size() > 0, "unexpected out_valid");
      if (q_ref.size() > 0) begin
        rr = q_ref.pop_front();
        lc = q_cyc.pop_front();
        check(cyc - lc == LAT, $sformatf("latency %0d", cyc - lc));
        for (int e = 0; e < NPOW; e++) begin
          check(int'(pow_re[e]) == md(rr.pw_re[e]), $sformatf("re power %0d: %0d exp %0d", e, pow_re[e], md(rr.pw_re[e])));
          check(int'(pow_im[e]) == md(rr.pw_im[e]), $sformatf("im power %0d", e));
        end
      end
    end
  end

  initial begin
    mrrns_ref r;
    rst_n = 1'b0;
    {in_valid, in_first, in_last} = '0;
    a_dig = '0;
    b_dig = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 12; b++) begin
      int last_cyc;
      r = new();
      for (int n = 0; n < 4; n++) begin
        int xr, xi, cr, ci;
        xr = int'($urandom_range(131070, 0)) - 65535;
        xi = int'($urandom_range(131070, 0)) - 65535;
        cr = int'($urandom_range(131070, 0)) - 65535;
        ci = int'($urandom_range(131070, 0)) - 65535;
        if (b == 0) begin xi = 0; ci = 0; end
        r.add_term(xr, xi, cr, ci);
        if (b % 3 == 1 && n == 2) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_first = (n == 0);
        in_last  = (n == 3);
        a_dig[0] = enc(xr);
        a_dig[1] = enc(xi);
        b_dig[0] = enc(cr);
        b_dig[1] = enc(ci);
        @(negedge clk);
      end
      last_cyc = cyc;
      in_valid = 1'b0;
      r.finish();
      q_ref.push_back(r);
      q_cyc.push_back(last_cyc);
      if (b % 2 == 0) repeat (LAT + 1) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    check(n_out == 12 && q_ref.size() == 0, "every block produced one result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
