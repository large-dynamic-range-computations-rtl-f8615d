// mrrns_processor: complex inner-product processor for one output of a
// radix-4 FFT butterfly, computed over replicated rings modulo 3, 5 and 7.
//
// y = sum_{n=0}^{BLOCK_LEN-1} x_n * c_n for complex 17-bit integers, where
// c_n is the twiddle factor already multiplied by the DFT unit (+-1, +-j),
// which only swaps and negates its parts. Each operand is encoded as a
// polynomial of degree one in T, W, X, Y, Z with coefficients in {-1, 0, 1}
// (poly_encoder). The product has degree two in each indeterminate and, for
// typical data, coefficients inside [-52, 52], so it is computed in Z_105,
// split by the CRT into Z_3 x Z_5 x Z_7 and, by evaluation at the roots of
// small quotient polynomials, into 243 + 162 + 243 = 648 independent ring
// channels of 2 or 3 bits (ring_lane). Each channel is a two-cell
// multiply-accumulate pipeline. Only at the end do the lanes meet: their
// per-power sums are CRT-decoded (crt_decode) and converted back to an
// integer with optional scaling by 2^SCALE_S (scale_convert), which also
// re-encodes the result as an input polynomial for the next FFT stage.
//
// Interface: present one term per cycle with in_valid; terms are grouped in
// blocks of BLOCK_LEN valid cycles, counted from reset. scale_en is sampled
// with the last term of a block. out_valid is high for one cycle, 5 clock
// edges after the edge that samples the last term (3 in the lanes, one for
// the CRT, one for scaling), with y_re/y_im (full
// value), y_poly (clipped, re-encoded) and y_clip. Blocks may follow each
// other without gaps. A coefficient sum outside [-52, 52] wraps modulo 105
// (RNS overflow); nothing detects it, as in the source design.
//
// The block length of four, the moduli, the polynomial encoding and the
// scaling recursion follow the source design; the interface, pipeline depth,
// the T^2 = -1 fold of the mod-3 and mod-7 lanes and the clipping are this
// design's own.
module mrrns_processor
  import mrrns_pkg::*;
#(
  parameter int BLOCK_LEN = 4,
  parameter int SCALE_S   = 18
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [DATA_W-1:0]    x_re,
  input  logic signed [DATA_W-1:0]    x_im,
  input  logic signed [DATA_W-1:0]    c_re,
  input  logic signed [DATA_W-1:0]    c_im,
  input  logic                        scale_en,
  output logic                        out_valid,
  output logic signed [VALUE_W-1:0]   y_re,
  output logic signed [VALUE_W-1:0]   y_im,
  output cpoly_t                      y_poly,
  output logic [1:0]                  y_clip
);
  // ---- term counter: first / last term of each block
  logic [$clog2(BLOCK_LEN + 1)-1:0] cnt;
  logic in_first, in_last;

  always_comb begin
    in_first = (cnt == '0);
    in_last  = (cnt == ($bits(cnt))'(BLOCK_LEN - 1));
  end

  always_ff @(posedge clk)
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= in_last ? '0 : cnt + 1'b1;

  // ---- encoding
  cpoly_t x_dig, c_dig;
  poly_encoder u_enc_x (.re(x_re), .im(x_im), .dig(x_dig));
  poly_encoder u_enc_c (.re(c_re), .im(c_im), .dig(c_dig));

  // ---- the three lanes
  logic                      v3_out, v5_out, v7_out;
  logic [NPOW-1:0][1:0]      p3_re, p3_im;
  logic [NPOW-1:0][2:0]      p5_re, p5_im, p7_re, p7_im;

  ring_lane #(.M(3)) u_lane3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .a_dig(x_dig), .b_dig(c_dig), .out_valid(v3_out), .pow_re(p3_re), .pow_im(p3_im));
  ring_lane #(.M(5)) u_lane5 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .a_dig(x_dig), .b_dig(c_dig), .out_valid(v5_out), .pow_re(p5_re), .pow_im(p5_im));
  ring_lane #(.M(7)) u_lane7 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .a_dig(x_dig), .b_dig(c_dig), .out_valid(v7_out), .pow_re(p7_re), .pow_im(p7_im));

  // scale_en travels with the block: sampled with the last term, aligned
  // with the lanes' three-edge latency
  logic [3:0] sc_pipe;
  always_ff @(posedge clk) sc_pipe <= {sc_pipe[2:0], scale_en};

  // ---- CRT decoding, registered (fourth edge after the last term)
  logic signed [NPOW-1:0][CRT_W-1:0] crt_re, crt_im, crt_re_r, crt_im_r;
  logic v5r, sc5;

  for (genvar e = 0; e < NPOW; e++) begin : g_crt
    crt_decode u_crt_re (.r3(p3_re[e]), .r5(p5_re[e]), .r7(p7_re[e]), .v(crt_re[e]));
    crt_decode u_crt_im (.r3(p3_im[e]), .r5(p5_im[e]), .r7(p7_im[e]), .v(crt_im[e]));
  end

  always_ff @(posedge clk) begin
    if (v3_out) begin
      crt_re_r <= crt_re;
      crt_im_r <= crt_im;
      sc5      <= sc_pipe[3];
    end
  end

  always_ff @(posedge clk)
    if (!rst_n) v5r <= 1'b0;
    else        v5r <= v3_out & v5_out & v7_out;

  // ---- scaling and conversion, registered (fifth edge)
  logic signed [VALUE_W-1:0] val_re, val_im;
  logic                      clip_re, clip_im;
  rpoly_t                    dig_re, dig_im;

  scale_convert #(.SCALE_S(SCALE_S)) u_sc_re (
    .coef(crt_re_r), .scale_en(sc5), .value(val_re), .sat(), .clip(clip_re), .dig(dig_re));
  scale_convert #(.SCALE_S(SCALE_S)) u_sc_im (
    .coef(crt_im_r), .scale_en(sc5), .value(val_im), .sat(), .clip(clip_im), .dig(dig_im));

  always_ff @(posedge clk)
    if (v5r) begin
      y_re      <= val_re;
      y_im      <= val_im;
      y_poly[0] <= dig_re;
      y_poly[1] <= dig_im;
      y_clip    <= {clip_im, clip_re};
    end

  always_ff @(posedge clk)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v5r;
endmodule
