// tb_ring_channel: one modulo-7 channel accumulates the products of random
// residue pairs over blocks of random length; two clock edges after the
// last term of a block, acc must equal the sum of the products mod 7.
// Terms arrive with random idle cycles in between.
module tb_ring_channel;
  localparam int M = 7;

  logic clk = 1'b0;
  logic mul_en = 1'b0, acc_en = 1'b0, acc_first = 1'b0;
  logic [2:0] a, b, acc;

  ring_channel #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // control pipeline as a user of the channel drives it
  logic v1 = 1'b0, first_in = 1'b0, f1 = 1'b0;
  logic valid_in = 1'b0;
  always @(posedge clk) begin
    v1 <= valid_in;
    f1 <= first_in;
  end
  always_comb begin
    mul_en    = valid_in;
    acc_en    = v1;
    acc_first = f1;
  end

  initial begin
    for (int blk = 0; blk < 40; blk++) begin
      int len, sum;
      len = int'($urandom_range(8, 1));
      sum = 0;
      for (int n = 0; n < len; n++) begin
        int x, y;
        x = int'($urandom_range(M - 1, 0));
        y = int'($urandom_range(M - 1, 0));
        sum = (sum + x * y) % M;
        @(negedge clk);
        valid_in = 1'b1;
        first_in = (n == 0);
        a = 3'(x);
        b = 3'(y);
        if ($urandom_range(3, 0) == 0) begin
          @(negedge clk);
          valid_in = 1'b0;
          a = 3'($urandom_range(6, 0));
        end
      end
      @(negedge clk);
      valid_in = 1'b0;
      @(negedge clk);
      check(int'(acc) == sum, $sformatf("block %0d: acc %0d exp %0d", blk, acc, sum));
    end
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
