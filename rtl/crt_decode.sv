// crt_decode: Chinese Remainder decoding of one coefficient from its
// residues modulo 3, 5 and 7 to the symmetric range [-52, 52] of Z_105.
//
// v = (70 r3 + 21 r5 + 15 r7) mod 105, then v - 105 if v > 52. The weights
// are the CRT basis (70 = 1 mod 3 and 0 mod 5, 7; 21 = 1 mod 5; 15 = 1 mod
// 7). A coefficient whose true value lies outside [-52, 52] wraps: that is
// the RNS overflow that the number range of 105 is chosen to make rare.
// Combinational.
module crt_decode
  import mrrns_pkg::*;
(
  input  logic [1:0]              r3,
  input  logic [2:0]              r5,
  input  logic [2:0]              r7,
  output logic signed [CRT_W-1:0] v
);
  always_comb begin
    int s;
    s = modp(70 * int'(r3) + 21 * int'(r5) + 15 * int'(r7), CRT_M);
    if (s > CRT_M / 2) s -= CRT_M;
    v = CRT_W'(s);
  end
endmodule
