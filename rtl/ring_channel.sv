// ring_channel: one channel of the direct product ring, a modulo-M
// multiply-accumulate pipeline.
//
// The inner product is carried out independently in every channel, with no
// communication between channels. Stage 1 is a ring_mul cell (product of the
// two operand residues), stage 2 a ring_add cell whose second operand is the
// accumulator itself, or zero when acc_first marks the first term of a new
// inner product. mul_en and acc_en advance the two stages; a term presented
// with mul_en in cycle c is in acc two clock edges later.
module ring_channel #(
  parameter int M = 7
) (
  input  logic                 clk,
  input  logic                 mul_en,
  input  logic                 acc_en,
  input  logic                 acc_first,
  input  logic [$clog2(M)-1:0] a,
  input  logic [$clog2(M)-1:0] b,
  output logic [$clog2(M)-1:0] acc
);
  localparam int RW = $clog2(M);

  logic [RW-1:0] prod;
  logic [RW-1:0] acc_in;

  ring_mul #(.M(M)) u_mul (
    .clk(clk), .en(mul_en), .a(a), .b(b), .p(prod)
  );

  always_comb acc_in = acc_first ? '0 : acc;

  ring_add #(.M(M)) u_add (
    .clk(clk), .en(acc_en), .a(acc_in), .b(prod), .s(acc)
  );
endmodule
