// ring_mul: modulo-M multiplier cell, one switching-tree pipeline stage.
//
// Both operands are residues 0..M-1 of $clog2(M) bits; for M = 7 that is the
// six-input, three-output tree of the source design's mod-7 multiplier. The
// table is generated at elaboration from the definition of the ring, so the
// product p = a*b mod M appears one clock edge after a and b (when en is
// high). Operand codes >= M cannot occur and return 0.
module ring_mul #(
  parameter int M = 7
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [$clog2(M)-1:0]  a,
  input  logic [$clog2(M)-1:0]  b,
  output logic [$clog2(M)-1:0]  p
);
  localparam int RW = $clog2(M);

  stree_cell #(
    .IN_W (2 * RW),
    .OUT_W(RW),
    .TABLE(mrrns_pkg::ring_table(M, 1))
  ) u_tree (
    .clk     (clk),
    .en      (en),
    .in_bits ({a, b}),
    .out_bits(p)
  );
endmodule
