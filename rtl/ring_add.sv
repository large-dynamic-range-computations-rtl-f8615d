// ring_add: modulo-M adder cell, one switching-tree pipeline stage.
//
// Operands are residues 0..M-1 of $clog2(M) bits, so the tree has at most six
// inputs. The sum s = (a + b) mod M appears one clock edge after the
// operands when en is high. Addition cells are implied by the source design
// ("multiplications and additions in the finite rings") but not drawn; the
// table form is the same as for the multiplier.
module ring_add #(
  parameter int M = 7
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [$clog2(M)-1:0]  a,
  input  logic [$clog2(M)-1:0]  b,
  output logic [$clog2(M)-1:0]  s
);
  localparam int RW = $clog2(M);

  stree_cell #(
    .IN_W (2 * RW),
    .OUT_W(RW),
    .TABLE(mrrns_pkg::ring_table(M, 0))
  ) u_tree (
    .clk     (clk),
    .en      (en),
    .in_bits ({a, b}),
    .out_bits(s)
  );
endmodule
