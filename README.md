# Complex arithmetic with 16-bit dynamic range in rings of 3, 5 and 7 elements

This is a radix-4 DFT element, the building block of a 1024-point FFT. It does
all its multiplications in the rings Z_3, Z_5 and Z_7, whose values fit in 2 or
3 bits. In an ordinary residue number system (RNS), moduli this small give a
range of only 105. That is far too little for 15-bit data times 15-bit
twiddles. The Modulus Replication RNS (MRRNS) gets around this by not encoding
the number itself in the rings. It encodes the number's *bits*:

* An integer is written as a polynomial in "bit indeterminates" W = 2, X = 4,
  Y = 16, Z = 256. Bit *i* of the magnitude is the coefficient of the monomial
  whose exponent of W, X, Y, Z is bit 0, 1, 2, 3 of *i*. All coefficients carry
  the number's sign, so each is 0 or ±1.
* The polynomial is evaluated with every indeterminate at 0, +1 and −1. Those
  are the roots of V(V² − 1), which exist in every Z_m with m > 2. Each
  evaluation point is an independent *channel*. A channel value is only a signed
  count of bits, so the forward map needs nothing but sign changes and
  additions.
* Complex numbers get one more indeterminate, T, standing for j. Z_3 and Z_7
  have no square root of −1, so T is also mapped through T(T² − 1) = 0. This
  gives 3⁵ = 243 channels per modulus and 729 channels in all.
* Each channel runs the same computation in its own tiny ring, independently of
  all others. No carries or other signals pass between channels.
* After the computation, the product polynomial is interpolated back from the
  channels. No exponent is above 2, so 3 points per indeterminate suffice. Then
  T is finally given its meaning: T² = −1. Monomials of equal power-of-two
  weight are summed, still in the rings.
* Each weight's residues mod 3, 5 and 7 are converted to a small integer in
  [−52, 52]. A chain of adders then assembles the binary result and scales it
  by 2^S.

The price is redundancy: 729 small channels instead of one wide multiplier.
What you get in return is that the hardware which does the work consists only
of 6-input logic functions. These are two 3-bit ring operands, so each output
bit of a ring adder or multiplier is one 6-input look-up.

## Datapath and timing

```
 in_valid/in_ready
        |
 r4_sequencer ........ holds a butterfly, issues k = 0,1,2,3 on 4 clocks
        |              coefficients c_nk = w_n * (-j)^(n k)
        v
 8 x mrrns_encoder ... 4 data + 4 coefficients -> residues [3][243]     1 clk
        |              (mrrns_fwd_map inside, twice per operand)
        v
 729 x ring_ip4 ...... sum_n x_n c_n in Z_m, switching-tree cells         3 clk
        |
 3 x mrrns_inv_map ... 3-point interpolation, one stage per indeterminate 5 clk
        |
 3 x mrrns_weight_combine  T^2 = -1, sum equal weights 2^0..2^30         1 clk
        |
 62 x mrc_conv ....... residues -> [-52, 52]   \
 2 x scale_convert ... divide by 2^S, binary   /                         1 clk
        v
 out_valid, out_k, out_re, out_im
```

An output leaves 11 clock edges after the edge that accepts its butterfly
(NV + 7 in general). The four outputs k = 0..3 of a butterfly come on four
consecutive clocks. `in_ready` is high when the sequencer is idle and while it
issues k = 3, so butterflies can follow each other without a gap: one butterfly
every four clocks, one output every clock. The datapath has no reset and no
stall. Only the sequencer and the valid/k pipe are reset (`rst_n`, synchronous,
active low).

### Why each output is a single 4-term inner product

T satisfies T³ = T in the rings, not T³ = −T. So T may be multiplied in only
once before the inverse map, and the bit indeterminates likewise (W³ = W, but
2³ ≠ 2). A result may therefore contain one layer of products and no more.
For this reason the element does not perform a butterfly as twiddle multiply
followed by DFT additions. For each output k it forms one inner product:

    X_k = sum_{n=0..3} x_n * c_{n,k},   c_{n,k} = w_n * (-j)^(n k mod 4)

Multiplying a sign-magnitude complex twiddle by a power of −j only swaps its
real and imaginary parts and flips signs. `r4_sequencer` does exactly that.
Sums of products are fine, because addition does not raise exponents. An FFT
stage therefore maps its operands, computes, and converts back to binary. The
next stage maps again.

### Interface of `mrrns_radix4`

| port | width | meaning |
|---|---|---|
| `x_re_sgn`, `x_im_sgn` | 4 | sign of data n (1 = negative) |
| `x_re_mag`, `x_im_mag` | 4 × 16 | magnitude of data n (< 2^16) |
| `w_re_sgn`, `w_im_sgn`, `w_re_mag`, `w_im_mag` | as above | twiddle w_n, applied to input n |
| `in_valid`, `in_ready` | 1 | butterfly taken when both are high |
| `out_valid`, `out_k` | 1, 2 | an output, and which k it is |
| `out_re`, `out_im` | 24 | floor(X_k / 2^S), two's complement |

Operands are sign-magnitude because the encoding needs every bit digit to carry
the number's sign (0/+1 or 0/−1). Twiddles are meant to be scaled by 2^14, so
that S = 14 gives a result at the data's scale.

## The small-ring cells (`switching_tree`, `ring_cell`, `ring_ip4`)

Ring values are 3-bit codes; Z_3 uses codes 0..2. A two-operand ring operation
therefore has 6 inputs. Each of its 3 output bits is a `switching_tree`: a
64-entry truth table, evaluated as a binary decision tree. Level l of the tree
is steered by one input bit, operand `a` drives the upper three levels and `b`
the lower three, and only one root-to-leaf path is active. In silicon this is a
tree of series transistors that discharges a precharged node. The tree is
pruned using the operand codes that never occur (code 7 in Z_7, codes ≥ 5 in
Z_5); the reference multiplier had at most 5 transistors in series. That
pruning changes no logic value. Here those don't-care entries are simply 0.

`ring_cell` puts three trees in front of a register. The register stands for
the dynamic evaluate stage with its restoring latch. The truth tables are
computed at elaboration time from `MOD` and `OP` (add, subtract, multiply).
`ring_cell #(.MOD(7), .OP(RING_MUL))` is the mod-7 multiplier, the largest
ring circuit in the design. `ring_ip4` is four multipliers followed by a
two-level adder tree, so it is three cell stages deep.

## Back from the rings (`mrrns_inv_map`, `mrrns_weight_combine`)

Channel index and coefficient index are both base-3 numbers, with one digit per
indeterminate in the order W, X, Y, Z, T (digit 0 = W). In a channel index a
digit selects a root: 0 → 0, 1 → +1, 2 → −1. In a coefficient index a digit is
an exponent. Stage v of the inverse map turns digit v from a root into an
exponent, using

    c0 = p(0),   c1 = (p(1) - p(-1)) * 2^-1,   c2 = (p(1) + p(-1)) * 2^-1 - p(0)

where 2^-1 is the inverse of 2 in Z_m: 2, 3 and 4 for m = 3, 5, 7.

The weight merge makes T = j. The real part is coef(T⁰) − coef(T²) and the
imaginary part is coef(T¹). It then adds, in the ring, all monomials
W^a X^b Y^c Z^d with the same k = a + 2b + 4c + 8d. For example, X², W²X and
Y all weigh 2⁴. The result is 31 coefficients for 2⁰..2³⁰, for the real part
and for the imaginary part. The whole chain, taken together, computes the
convolution of the operands' signed bit digits. For one product that is
`coef_k = sum_{i+j=k} a_i b_j`, and the testbenches use this to compute their
expected values independently of the rings.

## Conversion and scaling (`mrc_conv`, `scale_convert`)

`mrc_conv` uses mixed radix digits. With inputs r3, r5, r7:
a1 = r3, a2 = (r5 − a1)·2 mod 5, a3 = ((r7 − a1)·5 − a2)·3 mod 7. These give
x = a1 + 3·a2 + 15·a3 in [0, 104], and values above 52 are read as x − 105.

`scale_convert` takes the coefficients c_0..c_30. The low S coefficients go
through a chain of adders. Each adder drops the least significant bit of the
running sum and adds the next coefficient:

    t_0 = c_0,  t_i = floor(t_{i-1} / 2) + c_i  (i = 1..S)

Then the remaining coefficients are added at weight 2^(i−S). Since
floor(floor(x)/2) = floor(x/2), the output is exactly floor(V / 2^S), with
V = Σ c_i 2^i. The scaling error is therefore in (−1, 0]. The running sum stays
within ±104, so the scaling adders are 8 bits wide (`SCALE_W`).

## Accuracy and overflow

Each power-of-two coefficient must lie in [−52, 52]; otherwise it is wrapped
modulo 105 and the output is wrong. The design does not detect this: residue
channels cannot see magnitudes. Overflow needs many set bits of the same sign
to line up on one weight. With random 14-bit data and 15-bit twiddles it did
not happen in any of the 5120 outputs of a full 1024-point FFT. The end-to-end
testbench provokes it on purpose, using all-ones operands of one sign, and
checks that the hardware wraps exactly as modelled.

On random complex data (14 bits plus sign), a 1024-point FFT run through the
element gave a relative RMS error of 1.1 × 10⁻³ against a double-precision DFT.
Between stages, the testbench divides each result by 4, rounding to nearest,
to keep operands below 2^16. Most of the error comes from that rounding and
from the 2^14 twiddle quantisation; a different inter-stage scaling changes the
figure.

## Choices made in this implementation

These are not fixed by the MRRNS scheme itself. Change them freely.

* Butterfly form (decimation in time, twiddles on the inputs) and the
  valid/ready sequencing. The scheme only calls for a time-multiplexed radix-4
  element.
* S = 14. The scheme scales by some 2^s without fixing s.
* Pipeline depth: one register per ring cell, per inverse-map stage, after the
  encoder, after the weight merge and after scaling.
* The forward map is exact integer counting followed by one reduction per
  modulus. This is equivalent to counting in each ring, and the three moduli
  share it.
* Ring values are 3 bits wide for all moduli. Don't-care table entries are 0.
* The scaling adders are 8 bits wide, enough for a running sum of up to ±104.
  The scheme speaks of 5-bit additions there, which cannot hold coefficients
  of ±52.
* Weights: W = 2, X = 4, Y = 16, Z = 256 fix the weight of every monomial, and
  the design follows those values. For example, W²Y and XY both weigh 2⁶.

## Not included

* The FFT memory and address sequencing for a full 1024-point transform. The
  workload testbench provides them behaviourally.
* The transistor-level dynamic pipeline stage, the pruned trees and the 3 µm
  CMOS layout. Their logic function is what `ring_cell` models.

## Parameters

`mrrns_radix4 #(.NV(4), .S(14))`. `NV` is the number of bit indeterminates,
giving 2^NV-bit magnitudes, 3^(NV+1) channels per modulus and 2^(NV+1) − 1
weights. NV = 3 is the 8-bit system (W, X, Y). NV = 2 is a small 4-bit
version, and `tb/tb_mrrns_radix4_nv2.sv` simulates it. `S` is the scaling shift. The output width is
2^(NV+1) − 1 − S + 7. S must be at most 2^(NV+1) − 2.

## Files and simulation

`rtl/`: `mrrns_pkg` (ring helpers, types), `switching_tree`, `ring_cell`,
`ring_ip4`, `mrrns_fwd_map`, `mrrns_encoder`, `r4_sequencer`, `mrrns_inv_map`,
`mrrns_weight_combine`, `mrc_conv`, `scale_convert`, and the top
`mrrns_radix4`. Every module has a testbench `tb/tb_<module>.sv` that checks
itself and ends with a `TB_RESULT checks=N failures=M` line.
`tb/tb_mrrns_radix4.sv` is the end-to-end test at full size.
`tb/tb_fft1024_workload.sv` runs the 1024-point FFT, and
`tb/tb_mrrns_radix4_nv2.sv` runs the element built with NV = 2, S = 3.

```
verilator --binary --timing --assert -Irtl -Itb rtl/mrrns_pkg.sv \
    tb/tb_mrrns_radix4.sv --top-module tb_mrrns_radix4 -o sim
./obj_dir/sim
```

Building the full-size top takes about a minute. Simulating it takes under a
second for the end-to-end test and about five seconds for the FFT.
