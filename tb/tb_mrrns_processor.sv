// tb_mrrns_processor: end-to-end test of the MRRNS inner-product processor
// at its default parameters (block length 4, scaling by 2^18).
//
// Streams blocks of four complex terms, with random gaps in in_valid and
// back-to-back blocks, and compares every result (full value, clipped
// polynomial, clip flags) with the bit-true reference model. It also checks
// the 6-cycle latency, that unscaled results without RNS overflow equal the
// exact inner product, and that scaled ones lie within 1 of the exact value
// divided by 2^18. Each mechanism must happen at least once: scaled and
// unscaled blocks, RNS overflow (coefficient sums wrapping modulo 105),
// clipping to 17 bits, back-to-back results and input gaps.
module tb_mrrns_processor;
  import mrrns_pkg::*;
  import mrrns_ref_pkg::*;

  localparam int NBLK = 48;
  localparam int LAT  = 5;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [DATA_W-1:0] x_re, x_im, c_re, c_im;
  logic scale_en;
  logic out_valid;
  logic signed [VALUE_W-1:0] y_re, y_im;
  cpoly_t y_poly;
  logic [1:0] y_clip;

  mrrns_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results
  longint q_re[$], q_im[$];
  int     q_cyc[$], q_clip[$];
  logic   q_scaled[$], q_wrap[$];
  longint q_xre[$], q_xim[$];

  int n_scaled = 0, n_unscaled = 0, n_wrap = 0, n_clip = 0, n_b2b = 0, n_gap = 0, n_out = 0;
  int last_out_cyc = -10;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d out %0d: %s", cyc, n_out, what);
    end
  endtask

  function automatic int rnd(int bits);
    int v;
    v = int'($urandom_range((1 << bits) - 1, 0));
    return ($urandom_range(1, 0) == 1) ? -v : v;
  endfunction

  // output monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint er, ei, sr, si;
      int exp_clip;
      n_out++;
      if (q_re.size() == 0) begin
        check(0, "unexpected out_valid");
      end else begin
        er = q_re.pop_front();
        ei = q_im.pop_front();
        exp_clip = q_clip.pop_front();
        begin int lc; lc = q_cyc.pop_front(); check(cyc - lc == LAT, $sformatf("latency %0d", cyc - lc)); end
        check(y_re == er, $sformatf("y_re %0d exp %0d", y_re, er));
        check(y_im == ei, $sformatf("y_im %0d exp %0d", y_im, ei));
        check(y_clip == 2'(exp_clip), "clip flags");
        sr = mrrns_ref::sat17(er);
        si = mrrns_ref::sat17(ei);
        for (int k = 0; k < NDIG; k++) begin
          check(int'(y_poly[0][k]) == mrrns_ref::digit(int'(sr), k), "re digit");
          check(int'(y_poly[1][k]) == mrrns_ref::digit(int'(si), k), "im digit");
        end
        // against exact arithmetic when nothing wrapped
        begin
          logic sc, wr;
          longint xr, xi;
          sc = q_scaled.pop_front();
          wr = q_wrap.pop_front();
          xr = q_xre.pop_front();
          xi = q_xim.pop_front();
          if (!wr && !sc) begin
            check(y_re == xr && y_im == xi, "unscaled result equals exact inner product");
          end else if (!wr && sc) begin
            longint dr, di;
            dr = (y_re <<< 18) - xr;
            di = (y_im <<< 18) - xi;
            check(dr < (64'sd1 <<< 18) && dr > -(64'sd1 <<< 18) &&
                  di < (64'sd1 <<< 18) && di > -(64'sd1 <<< 18), "scaling error below 1");
          end
        end
      end
      if (last_out_cyc == cyc - BLOCK_GAP_FREE) n_b2b++;
      last_out_cyc = cyc;
    end
  end
  localparam int BLOCK_GAP_FREE = 4;

  task automatic run_block(input int mode);
    mrrns_ref r;
    int xr [4], xi [4], cr [4], ci [4];
    bit sc;
    int s;
    int pre [31], pim [31];
    longint vr, vi;
    r = new();
    sc = 1'b0;
    for (int n = 0; n < 4; n++) begin
      case (mode)
        0: begin  // typical scaled FFT stage: 14-bit data, 16-bit twiddles
          xr[n] = rnd(14); xi[n] = rnd(14); cr[n] = rnd(16); ci[n] = rnd(16); sc = 1'b1;
        end
        1: begin  // small unscaled values
          xr[n] = rnd(7); xi[n] = rnd(7); cr[n] = rnd(7); ci[n] = rnd(7);
        end
        2: begin  // all-ones magnitudes: forces RNS overflow
          xr[n] = 65535; xi[n] = 0; cr[n] = 65535; ci[n] = 0; sc = ($urandom_range(1, 0) == 1);
        end
        3: begin  // unscaled, too large for 17 bits: clipping
          xr[n] = 300 + int'($urandom_range(40, 0)); xi[n] = rnd(4);
          cr[n] = 300 + int'($urandom_range(40, 0)); ci[n] = rnd(4);
        end
        default: begin  // 16-bit extremes, including -2^16
          xr[n] = ($urandom_range(3, 0) == 0) ? -65536 : rnd(16); xi[n] = rnd(16);
          cr[n] = rnd(16); ci[n] = ($urandom_range(3, 0) == 0) ? -65536 : rnd(16);
          sc = 1'b1;
        end
      endcase
      r.add_term(xr[n], xi[n], cr[n], ci[n]);
    end
    r.finish();
    s = sc ? 18 : 0;
    for (int e = 0; e < 31; e++) begin
      pre[e] = r.wr_re[e];
      pim[e] = r.wr_im[e];
    end
    vr = mrrns_ref::scale(pre, s);
    vi = mrrns_ref::scale(pim, s);
    for (int n = 0; n < 4; n++) begin
      if (mode != 1 && $urandom_range(2, 0) == 0) begin
        in_valid = 1'b0;
        n_gap++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      x_re = DATA_W'(xr[n]); x_im = DATA_W'(xi[n]);
      c_re = DATA_W'(cr[n]); c_im = DATA_W'(ci[n]);
      scale_en = sc;
      @(negedge clk);
    end
    // the last term is sampled at the edge that brings cyc to its current value
    q_cyc.push_back(cyc);
    q_re.push_back(vr);
    q_im.push_back(vi);
    q_clip.push_back({(vi > 65535 || vi < -65535), (vr > 65535 || vr < -65535)});
    q_scaled.push_back(sc);
    q_wrap.push_back(r.wraps != 0);
    q_xre.push_back(r.exact_re);
    q_xim.push_back(r.exact_im);
    if (sc) n_scaled++; else n_unscaled++;
    if (r.wraps != 0) n_wrap++;
    if (vr > 65535 || vr < -65535 || vi > 65535 || vi < -65535) n_clip++;
    in_valid = 1'b0;
    scale_en = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    scale_en = 1'b0;
    {x_re, x_im, c_re, c_im} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      int mode;
      mode = (b < 5) ? b : int'($urandom_range(4, 0));
      if (b >= 5 && b < 9) mode = 1;   // back-to-back unscaled blocks
      run_block(mode);
    end
    repeat (LAT + 4) @(negedge clk);
    check(q_re.size() == 0, "all results delivered");
    $display("mechanisms: scaled=%0d unscaled=%0d rns_overflow=%0d clip=%0d back_to_back=%0d input_gaps=%0d",
             n_scaled, n_unscaled, n_wrap, n_clip, n_b2b, n_gap);
    check(n_scaled > 0, "scaled block seen");
    check(n_unscaled > 0, "unscaled block seen");
    check(n_wrap > 0, "RNS overflow seen");
    check(n_clip > 0, "clipping seen");
    check(n_b2b > 0, "back-to-back results seen");
    check(n_gap > 0, "input gaps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
