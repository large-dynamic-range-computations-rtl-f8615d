// stree_cell: one switching-tree pipeline cell.
//
// A switching tree is a look-up table of at most six inputs built as a
// minimised binary tree of n-channel transistors; it is embedded in a true
// single-phase clocked latch, so every tree evaluation is one pipeline stage.
// At register-transfer level that is a table look-up followed by a register:
// out_bits takes TABLE[in_bits] on the rising clock edge when en is high.
// The table is a parameter, entry a at bits [a*OUT_W +: OUT_W].
//
// The six-input limit and the one-cycle evaluation follow the source design.
// The enable (to hold an accumulator while no data arrives) is this design's
// own addition; the dynamic latch itself has none.
module stree_cell #(
  parameter int IN_W  = 6,
  parameter int OUT_W = 3,
  parameter logic [mrrns_pkg::STREE_MAX_TABLE-1:0] TABLE = '0
) (
  input  logic             clk,
  input  logic             en,
  input  logic [IN_W-1:0]  in_bits,
  output logic [OUT_W-1:0] out_bits
);
  initial begin
    assert (IN_W <= 6) else $error("switching trees have at most six inputs");
    assert ((OUT_W << IN_W) <= mrrns_pkg::STREE_MAX_TABLE) else $error("table too large");
  end

  logic [OUT_W-1:0] tree_out;

  always_comb tree_out = TABLE[in_bits * OUT_W +: OUT_W];

  always_ff @(posedge clk)
    if (en) out_bits <= tree_out;
endmodule
