// scale_convert: turns the per-power coefficients of a result back into an
// integer, scaled by 2^s, and re-encodes it as an input polynomial.
//
// coef[i] is the (CRT-decoded) sum of all coefficients standing for 2^i, so
// the exact result is sum_i coef[i] 2^i. Scaling by 2^s uses the recursive
// relation of the source design,
//   acc_0 = coef[0],   acc_i = acc_{i-1}/2 + coef[i]   for 1 <= i <= s,
// where each halving rounds to nearest with ties to even (an odd value is
// off by +1/2 or -1/2 with equal chance, which the source's error analysis
// assumes); the low powers therefore need only small adders and the total
// rounding error stays below 1. The powers above s are then added with their
// weights 2^(i-s). With scale_en low, s = 0 and the exact integer results.
// The rounding rule and the handling of powers above s are this design's
// reading of the source's recursion.
//
// value carries the full result. For the next FFT stage it is clipped to
// the input range (-2^16, 2^16) (sat, with clip flagging a clip, this
// design's choice) and re-encoded as signed digits (dig). Combinational.
module scale_convert
  import mrrns_pkg::*;
#(
  parameter int SCALE_S = 18
) (
  input  logic signed [NPOW-1:0][CRT_W-1:0] coef,
  input  logic                              scale_en,
  output logic signed [VALUE_W-1:0]         value,
  output logic signed [DATA_W-1:0]          sat,
  output logic                              clip,
  output rpoly_t                            dig
);
  localparam longint MAXV = (64'sd1 <<< (DATA_W - 1)) - 1;

  // acc/2 rounded to nearest, ties to even
  function automatic longint half_rne(input longint x);
    longint q;
    q = x >>> 1;
    if (x[0] && q[0]) q = q + 1;
    return q;
  endfunction

  always_comb begin
    longint acc, hi, tot;
    int     s;
    s   = scale_en ? SCALE_S : 0;
    acc = longint'($signed(coef[0]));
    hi  = 0;
    for (int i = 1; i < NPOW; i++) begin
      if (i <= s) acc = half_rne(acc) + longint'($signed(coef[i]));
      else        hi  = hi + (longint'($signed(coef[i])) <<< (i - s));
    end
    tot   = acc + hi;
    value = VALUE_W'(tot);
    clip  = 1'b0;
    if (tot > MAXV) begin
      tot  = MAXV;
      clip = 1'b1;
    end else if (tot < -MAXV) begin
      tot  = -MAXV;
      clip = 1'b1;
    end
    sat = DATA_W'(tot);
    dig = encode_real(sat);
  end
endmodule
