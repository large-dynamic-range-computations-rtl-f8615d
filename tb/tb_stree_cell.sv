// tb_stree_cell: a six-input, three-output switching-tree cell loaded with a
// random table must return table entry in_bits one clock edge after the
// inputs are applied, and must hold its output while en is low.
module tb_stree_cell;
  localparam int IN_W = 6, OUT_W = 3;
  localparam logic [191:0] TBL = 192'h9b3c_51e7_0a2f_d468_7c15_e9b2_46a0_3fd8_12c7_be59_83f4_6d0a;

  logic clk = 1'b0, en;
  logic [IN_W-1:0]  in_bits;
  logic [OUT_W-1:0] out_bits;

  stree_cell #(.IN_W(IN_W), .OUT_W(OUT_W), .TABLE(TBL)) dut (.*);

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
    logic [OUT_W-1:0] held;
    en = 1'b1;
    in_bits = '0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      in_bits = 6'(a);
      en = 1'b1;
      @(negedge clk);
      check(out_bits == TBL[a * 3 +: 3], $sformatf("entry %0d", a));
    end
    // hold
    held = out_bits;
    en = 1'b0;
    for (int i = 0; i < 8; i++) begin
      in_bits = 6'($urandom);
      @(negedge clk);
      check(out_bits == held, "hold while en low");
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
