// poly_encoder: maps a complex integer to its MRRNS input polynomial.
//
// re + j*im is written as P_re(W,X,Y,Z) + T * P_im(W,X,Y,Z) where each P has
// degree one in every indeterminate and W, X, Y, Z stand for 2, 4, 16, 256:
// the coefficient of monomial k is sign times bit k of the magnitude, so it
// is in {-1, 0, 1}. Because the coefficients are already residues of every
// modulus, this single step covers the integer-to-polynomial map and the
// coefficient reductions modulo 105 and modulo 3, 5 and 7 of the source
// design. Purely combinational.
//
// Inputs are 17-bit two's complement; the representable range is
// (-2^16, 2^16), so -2^16 is clipped to -(2^16 - 1) (this design's choice).
module poly_encoder
  import mrrns_pkg::*;
(
  input  logic signed [DATA_W-1:0] re,
  input  logic signed [DATA_W-1:0] im,
  output cpoly_t                   dig
);
  localparam logic signed [DATA_W-1:0] MOST_NEG = {1'b1, {(DATA_W - 1){1'b0}}};
  localparam logic signed [DATA_W-1:0] MIN_REP  = {1'b1, {(DATA_W - 2){1'b0}}, 1'b1};

  logic signed [DATA_W-1:0] re_c, im_c;

  always_comb begin
    re_c   = (re == MOST_NEG) ? MIN_REP : re;
    im_c   = (im == MOST_NEG) ? MIN_REP : im;
    dig[0] = encode_real(re_c);
    dig[1] = encode_real(im_c);
  end
endmodule
