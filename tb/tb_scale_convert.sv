// tb_scale_convert: random per-power coefficients in [-52, 52] (sparse and
// dense patterns), with scaling on and off. The value must match the
// recursive rounding of the reference model and lie within 1 of the exact
// sum divided by 2^18; unscaled it must be exact. The clipped value, clip
// flag and re-encoded digits are checked too.
module tb_scale_convert;
  import mrrns_pkg::*;
  import mrrns_ref_pkg::*;

  logic signed [NPOW-1:0][CRT_W-1:0] coef;
  logic scale_en;
  logic signed [VALUE_W-1:0] value;
  logic signed [DATA_W-1:0] sat;
  logic clip;
  rpoly_t dig;

  scale_convert dut (.*);

  int checks = 0, failures = 0, n_clip = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      int p [31];
      longint exact, expv, sv;
      int hi_pow;
      hi_pow = (i % 4 == 0) ? 30 : int'($urandom_range(30, 8));
      exact = 0;
      for (int e = 0; e < 31; e++) begin
        p[e] = (e <= hi_pow) ? int'($urandom_range(104, 0)) - 52 : 0;
        if (i % 3 == 1 && $urandom_range(1, 0) == 1) p[e] = 0;
        coef[e] = CRT_W'(p[e]);
        exact += longint'(p[e]) <<< e;
      end
      scale_en = (i % 2 == 0);
      #1;
      expv = mrrns_ref::scale(p, scale_en ? 18 : 0);
      check(value == expv, $sformatf("value %0d exp %0d", value, expv));
      if (scale_en) begin
        longint d;
        d = (longint'(value) <<< 18) - exact;
        check(d < (64'sd1 <<< 18) && d > -(64'sd1 <<< 18), "rounding error below 1");
      end else begin
        check(value == exact, "unscaled value exact");
      end
      sv = mrrns_ref::sat17(expv);
      check(sat == DATA_W'(sv), "clipped value");
      check(clip == (sv != expv), "clip flag");
      if (clip) n_clip++;
      for (int k = 0; k < NDIG; k++)
        check(int'(dig[k]) == mrrns_ref::digit(int'(sv), k), "digit");
    end
    check(n_clip > 0, "clipping exercised");
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
