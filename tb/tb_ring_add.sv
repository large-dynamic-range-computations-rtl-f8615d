// tb_ring_add: exhaustive test of the modulo-7, -5 and -3 adder cells:
// every pair of residues must give (a+b) mod M one clock edge later.
module tb_ring_add;
  logic clk = 1'b0, en = 1'b1;
  logic [2:0] a7, b7, p7, a5, b5, p5;
  logic [1:0] a3, b3, p3;

  ring_add #(.M(7)) dut7 (.clk(clk), .en(en), .a(a7), .b(b7), .s(p7));
  ring_add #(.M(5)) dut5 (.clk(clk), .en(en), .a(a5), .b(b5), .s(p5));
  ring_add #(.M(3)) dut3 (.clk(clk), .en(en), .a(a3), .b(b3), .s(p3));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a < 7; a++)
      for (int b = 0; b < 7; b++) begin
        @(negedge clk);
        a7 = 3'(a); b7 = 3'(b);
        a5 = 3'(a % 5); b5 = 3'(b % 5);
        a3 = 2'(a % 3); b3 = 2'(b % 3);
        @(negedge clk);
        check(int'(p7) == (a + b) % 7, $sformatf("7: %0d+%0d -> %0d", a, b, p7));
        check(int'(p5) == ((a % 5) + (b % 5)) % 5, "mod 5 sum");
        check(int'(p3) == ((a % 3) + (b % 3)) % 3, "mod 3 sum");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
