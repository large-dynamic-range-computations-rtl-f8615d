# Large-dynamic-range complex arithmetic on rings of 3, 5 and 7

This is a complex inner-product processor for the butterflies of a radix-4
FFT. It carries 17-bit data and produces results of more than 32 bits, yet
every arithmetic cell in it works on a residue of only two or three bits. It
uses no carry chains and no wide multipliers, and the 648 small channels never
talk to each other until a single conversion step at the end.

The method is the *modulus replication residue number system* (MRRNS). A
classical residue number system needs many large, pairwise-coprime moduli to
reach a wide dynamic range. Here the dynamic range comes from polynomials
instead:

1. Each integer is written as a polynomial whose coefficients are tiny. These
   coefficients are the integer's binary digits, with signs.
2. The polynomials are multiplied in a ring modulo 105 = 3·5·7. Only the
   coefficients have to stay small, not the product itself.
3. The polynomial ring is split into many copies of Z₃, Z₅ and Z₇. Each split
   evaluates the polynomials at the roots of small quotient polynomials.

## Number representation

A 17-bit two's-complement value `A`, with |A| < 2¹⁶, becomes a polynomial in
four indeterminates `W, X, Y, Z`. They stand for 2, 4, 16 and 256, and each
appears to degree at most one:

    A = Σ_k a_k · W^k0 X^k1 Y^k2 Z^k3,   k = 0..15 (k0..k3 are the bits of k)

Monomial `k` is worth exactly 2^k, so `a_k = sign(A) · bit_k(|A|)` and every
coefficient lies in {-1, 0, 1}. A complex value `A + jB` adds the
indeterminate `T` for `j`, giving the polynomial `P_A + T·P_B`. In the RTL
this is the type `cpoly_t`, two 16-digit signed-digit vectors; see
`mrrns_pkg`.

Multiplying two such polynomials gives degree two in each indeterminate. The
81 result monomials of `W, X, Y, Z` are indexed in base 3 as
`n = e0 + 3e1 + 9e2 + 27e3`. Monomial `n` is worth 2^(e0+2e1+4e2+8e3), a
power of two from 2⁰ to 2³⁰. Several monomials share a power; for example,
`W²` and `X` both mean 4.

A product coefficient is a sum of ±1 terms. In a length-4 inner product it is
at most 128 in theory, but normally far smaller because the signs cancel. The
modulus 105 represents [-52, 52]. A coefficient outside that range wraps
around; this is *RNS overflow*. It is left undetected because it is rare:
a full 1024-point FFT of a noisy sine (`tb_fft1024`) produced none.

## From one polynomial ring to 648 channels

For each modulus `m`, the polynomial is evaluated at every combination of
roots:

| modulus | roots of W, X, Y, Z (quotient X(X²−1)) | roots of T | channels |
|---|---|---|---|
| 3 | −1, 0, 1 | −1, 0, 1 (T(T²−1); T²+1 has no roots mod 3) | 3 · 81 = 243 |
| 5 | −1, 0, 1 | −2, 2 (T²+1 = (T−2)(T+2) mod 5) | 2 · 81 = 162 |
| 7 | −1, 0, 1 | −1, 0, 1 (T²+1 has no roots mod 7) | 3 · 81 = 243 |

Evaluation is a ring isomorphism, a Chinese-remainder theorem for
polynomials. It holds because the roots' pairwise differences are invertible
mod `m`. Multiplication and addition can therefore be done channel by channel
and undone afterwards. The evaluation matrix is a tensor product of one 3×3
(or 2×2) matrix per variable. `psi_forward` applies it one variable at a
time: each degree-one factor `c0 + c1·v` becomes `c0 − c1`, `c0`, `c0 + c1`
at v = −1, 0, 1. `psi_inverse` undoes it the same way:

    f(x) = a0 + a1 x + a2 x²  at −1, 0, 1:
        a0 = f(0),  a1 = (f(1) − f(−1))/2,  a2 = (f(1) + f(−1))/2 − f(0)
    f(T) = a0 + a1 T  at −r, r (r² = −1, mod 5):
        a0 = (f(r) + f(−r))/2,  a1 = (f(r) − f(−r))/(2r)

All divisions are multiplications by inverses mod `m`.

For moduli 3 and 7, `T` is not reduced by `T² + 1`, so their results contain
a `T²` term. `psi_inverse` folds it into the real part (`re = c0 − c2`,
`im = c1`). After this, all three moduli describe the same real and imaginary
polynomials and can be CRT-combined.

**Why the DFT unit is folded into the coefficient.** A radix-4 butterfly
output is `y_k = Σ_m x_m · w_m · (−j)^(km)`. The processor receives
`c_m = w_m · (−j)^(km)`, which is still a 17-bit complex integer because
multiplying by ±1 or ±j only swaps and negates parts. Every product then has
degree at most two in `T`, which fits the three-point quotient of modulus 3.
Applying `±T` after the twiddle product would need degree three.

## Channel arithmetic: switching-tree cells

With residues of at most three bits, any ring operation on two operands is a
function of at most six bits. Each such function is one **switching tree**: a
look-up table realised as a minimised binary tree of transistors. The tree is
embedded in a single-phase clocked latch, so every evaluation is one pipeline
stage. In RTL:

- `stree_cell`: a parameterised table followed by a register, with an enable.
- `ring_mul`, `ring_add`: instances of `stree_cell`. Their tables are computed
  at elaboration from the ring definition; unreachable codes give 0.
- `ring_channel`: a multiply cell followed by an add cell that accumulates.
  A restart mux feeds zero instead of the old sum on the first term of a
  block.

`ring_lane` holds every channel of one modulus: the two forward maps, the
channel array, the inverse map, and a modular sum of all coefficients that
stand for the same power of two. Doing that sum inside the ring cuts the work
of the conversion step from 81 CRT decodes per part to 31. The cost is that
the *summed* coefficient must also stay inside [−52, 52].

## Conversion: CRT and scaling

`crt_decode` turns (r₃, r₅, r₇) into the symmetric value
`(70 r₃ + 21 r₅ + 15 r₇) mod 105`, mapped into [−52, 52]. It is used 62 times
(31 powers × real and imaginary).

`scale_convert` rebuilds the integer `Σ C_i 2^i` and divides it by 2^s
without a wide adder on the low part:

    acc_0 = C_0
    acc_i = round(acc_{i−1} / 2) + C_i        for 1 ≤ i ≤ s
    value = acc_s + Σ_{i>s} C_i · 2^(i−s)

Each halving rounds to nearest, with ties to even. An odd value is therefore
off by ±½ with equal chance, and the total error stays below 1. The design
uses `s = 18` (16-bit twiddles plus 2 bits of growth per stage) or `s = 0`,
chosen per block by `scale_en`. For a 1024-point FFT, stages 2–4 are scaled;
stages 1 and 5 are not. The result is then clipped to (−2¹⁶, 2¹⁶) and
re-encoded as a digit polynomial (`y_poly`), which is the input format of the
next stage.

## Top level: `mrrns_processor`

Parameters:

- `BLOCK_LEN = 4`: the length of each inner product.
- `SCALE_S = 18`: the scaling exponent `s`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the control flags |
| `in_valid` | in | 1 | a term `x·c` is presented this cycle |
| `x_re`, `x_im`, `c_re`, `c_im` | in | 17 signed | data and coefficient; −2¹⁶ is read as −(2¹⁶−1) |
| `scale_en` | in | 1 | scale this block by 2^SCALE_S; sampled with the block's last term |
| `out_valid` | out | 1 | one-cycle result strobe |
| `y_re`, `y_im` | out | 48 signed | full (scaled) result |
| `y_poly` | out | `cpoly_t` | result clipped to 17 bits, as a digit polynomial |
| `y_clip` | out | 2 | {imag, real} was clipped |

Timing:

- One term enters per cycle. Every `BLOCK_LEN` valid terms, counted from
  reset, form one block.
- `in_valid` may drop between terms, and blocks may follow each other
  without gaps.
- `out_valid` rises 5 clock edges after the edge that samples a block's last
  term: 3 in the lanes (forward map, multiply, accumulate), then CRT, then
  scaling.

## Files

- `rtl/mrrns_pkg.sv`: types, and the functions that derive roots, inverses
  and cell tables.
- `rtl/stree_cell.sv`, `ring_mul.sv`, `ring_add.sv`, `ring_channel.sv`: the
  channel cells.
- `rtl/poly_encoder.sv`, `psi_forward.sv`, `psi_inverse.sv`, `ring_lane.sv`:
  the encoding and the ring maps.
- `rtl/crt_decode.sv`, `scale_convert.sv`: the conversion step.
- `rtl/mrrns_processor.sv`: the top level.
- `tb/mrrns_ref_pkg.sv`: a bit-true reference model. It multiplies the
  polynomials out over the integers, so it shares no code path with the ring
  hardware.
- `tb/tb_<block>.sv`: one self-checking bench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_mrrns_processor.sv`: the end-to-end bench at default parameters. It
  forces scaled and unscaled blocks, RNS overflow, clipping, input gaps and
  back-to-back blocks, and checks the latency.
- `tb/tb_fft1024.sv`: a complete 1024-point FFT through the processor. It is
  bit-exact against the model and reaches about 65 dB signal-to-error against
  a floating-point DFT.

## Simulating

With Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mrrns_pkg.sv tb/mrrns_ref_pkg.sv tb/tb_fft1024.sv --top-module tb_fft1024
    ./obj_dir/Vtb_fft1024

Replace the bench name to run any other bench. The FFT bench runs in a few
seconds; the others take well under one.

## How far to trust it, and where it departs from the method

What the testbenches establish:

- Every block is checked against an independent computation. Each check was
  also shown to fail on a deliberately broken copy of the block.
- The top level matches the reference model bit for bit.
- Unscaled results equal the exact complex inner product whenever no
  overflow occurs.
- Scaled results are within 1 of the exact value divided by 2¹⁸.

The following are this design's own choices, not part of the method:

- The interface, handshake, pipeline depth and reset.
- The enable on the cells.
- The `T²` fold for moduli 3 and 7.
- Folding the DFT unit into the coefficient.
- The reading of the scaling recursion: s halvings, round half to even, and
  powers above `s` added with their weights.
- Clipping before re-encoding.
- `W, X, Y, Z = 2, 4, 16, 256`. This is implied by the method but not stated
  in so many words.

Not modelled:

- The dynamic CMOS circuits themselves: the precharged n-channel trees and
  the single-phase latch.
- FFT data memory and address sequencing. The FFT bench keeps the data
  arrays.
- Any detection of RNS overflow.
