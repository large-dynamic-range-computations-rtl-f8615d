// tb_crt_decode: every integer v in [-52, 52] is reduced modulo 3, 5 and 7
// and must decode to v; values outside that range must decode to v wrapped
// modulo 105.
module tb_crt_decode;
  import mrrns_pkg::*;

  logic [1:0] r3;
  logic [2:0] r5, r7;
  logic signed [CRT_W-1:0] v;

  crt_decode dut (.*);

  int checks = 0, failures = 0;

  function automatic int md(int x, int m);
    int r;
    r = x % m;
    return (r < 0) ? r + m : r;
  endfunction

  initial begin
    for (int x = -160; x <= 160; x++) begin
      int exp_v;
      r3 = 2'(md(x, 3));
      r5 = 3'(md(x, 5));
      r7 = 3'(md(x, 7));
      #1;
      exp_v = md(x, 105);
      if (exp_v > 52) exp_v -= 105;
      checks++;
      if (int'(v) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d decodes to %0d", x, v);
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
