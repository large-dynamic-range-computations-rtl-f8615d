// ring_lane: every ring channel of one modulus M, with its input and output
// maps.
//
// Pipeline (one term of the inner product may enter every clock cycle):
//   edge 0  both operands pass psi_forward and are registered per channel
//   edge 1  ring_mul cells hold the channel products
//   edge 2  ring_add cells hold the running sums (restarted by in_first)
//   edge 3  after the last term (in_last), psi_inverse turns the channel sums
//           into polynomial coefficients, and the coefficients that stand
//           for the same power of two are added modulo M; the 31 sums per
//           part (2^0 .. 2^30) are registered and out_valid pulses.
// Edge 0 is the edge that samples a term, so out_valid is high in the cycle
// after the third edge following the one that samples the last term. Adding equal-power coefficients in the
// ring, before any conversion, follows the source design: it reduces the
// number of values the CRT has to process.
module ring_lane
  import mrrns_pkg::*;
#(
  parameter int M = 7
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic                               in_first,
  input  logic                               in_last,
  input  cpoly_t                             a_dig,
  input  cpoly_t                             b_dig,
  output logic                               out_valid,
  output logic [NPOW-1:0][$clog2(M)-1:0]     pow_re,
  output logic [NPOW-1:0][$clog2(M)-1:0]     pow_im
);
  localparam int RW  = $clog2(M);
  localparam int NCH = n_chan(M);

  typedef logic [NCH-1:0][RW-1:0] chans_t;

  chans_t a_eval, b_eval, a_r, b_r, acc;
  logic   v1, f1, l1, v2, f2, l2, done3;

  psi_forward #(.M(M)) u_fwd_a (.dig(a_dig), .res(a_eval));
  psi_forward #(.M(M)) u_fwd_b (.dig(b_dig), .res(b_eval));

  always_ff @(posedge clk)
    if (in_valid) begin
      a_r <= a_eval;
      b_r <= b_eval;
    end

  always_ff @(posedge clk)
    if (!rst_n) begin
      {v1, f1, l1, v2, f2, l2, done3} <= '0;
    end else begin
      v1    <= in_valid;
      f1    <= in_first;
      l1    <= in_last;
      v2    <= v1;
      f2    <= f1;
      l2    <= l1;
      done3 <= v2 & l2;
    end

  for (genvar ch = 0; ch < NCH; ch++) begin : g_chan
    ring_channel #(.M(M)) u_ch (
      .clk      (clk),
      .mul_en   (v1),
      .acc_en   (v2),
      .acc_first(f2),
      .a        (a_r[ch]),
      .b        (b_r[ch]),
      .acc      (acc[ch])
    );
  end

  logic [NMONO-1:0][RW-1:0] coef_re, coef_im;
  logic [NPOW-1:0][RW-1:0]  sum_re, sum_im;

  psi_inverse #(.M(M)) u_inv (.res(acc), .coef_re(coef_re), .coef_im(coef_im));

  always_comb begin
    int sr [NPOW];
    int si [NPOW];
    for (int e = 0; e < NPOW; e++) begin
      sr[e] = 0;
      si[e] = 0;
    end
    for (int n = 0; n < NMONO; n++) begin
      sr[mono_pow(n)] += int'(coef_re[n]);
      si[mono_pow(n)] += int'(coef_im[n]);
    end
    for (int e = 0; e < NPOW; e++) begin
      sum_re[e] = RW'(modp(sr[e], M));
      sum_im[e] = RW'(modp(si[e], M));
    end
  end

  always_ff @(posedge clk)
    if (done3) begin
      pow_re <= sum_re;
      pow_im <= sum_im;
    end

  always_ff @(posedge clk)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= done3;
endmodule
