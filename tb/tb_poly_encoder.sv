// tb_poly_encoder: for random and corner-case complex inputs, every digit
// must be in {-1, 0, 1}, carry the sign of its part, and the digits weighted
// by 2^k must add up to the input (with -2^16 clipped to -(2^16 - 1)).
module tb_poly_encoder;
  import mrrns_pkg::*;

  logic signed [DATA_W-1:0] re, im;
  cpoly_t dig;

  poly_encoder dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic check_part(input int v, input rpoly_t d, input string part);
    int sum, exp_v;
    sum = 0;
    exp_v = (v == -65536) ? -65535 : v;
    for (int k = 0; k < NDIG; k++) begin
      check(d[k] != 2'b10, "digit in {-1,0,1}");
      if (v > 0) check(d[k] != -2'sd1, "digit sign");
      if (v < 0) check(d[k] != 2'sd1, "digit sign");
      sum += int'(d[k]) * (1 << k);
    end
    check(sum == exp_v, $sformatf("%s %0d decodes to %0d", part, v, sum));
  endtask

  initial begin
    int corners [6] = '{0, 1, -1, 65535, -65535, -65536};
    for (int i = 0; i < 300; i++) begin
      int vr, vi;
      vr = (i < 6) ? corners[i] : int'($urandom_range(131071, 0)) - 65536;
      vi = (i < 6) ? corners[5 - i] : int'($urandom_range(131071, 0)) - 65536;
      re = DATA_W'(vr);
      im = DATA_W'(vi);
      #1;
      check_part(vr, dig[0], "re");
      check_part(vi, dig[1], "im");
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
