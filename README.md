# Shift-only number theoretic transforms modulo 2^n ± 1

Spectral modular arithmetic (SMA) multiplies long integers, as needed in RSA,
by treating the integers as polynomials. It moves them into a spectral domain
with a number theoretic transform (NTT), multiplies them point by point there,
and brings the result back with the inverse transform (INTT). This RTL
provides the transform units of such a processor.

The main idea is to pick the ring so that the transform needs no multipliers.
The ring is Z_q with q = 2^n − 1 (Mersenne) or q = 2^n + 1 (Fermat), and the
root of unity is a power of two, ω = 2^k. Every twiddle multiplication is then
a multiplication by 2^e, which is one of:

* a rotation of the n-bit word, for 2^n − 1 (only wiring);
* a shift, a fold of the high half into the low half, and a negation when
  e ≥ n, for 2^n + 1.

The hardware is built almost entirely from modular adders and subtractors. The
same arithmetic is arranged three ways:

* a fully combinational FFT network;
* the same network with pipeline registers;
* an area-compressed unit that reuses a single FFT layer, one layer per clock.

A pseudo-transform variant works modulo q/p for a divisor p of q. An inverse
transform completes the set.

## Residues and the modular adders

| ring | width | range | note |
|---|---|---|---|
| 2^n − 1 | n bits | 0 … 2^n − 1 | all-ones is a second code for zero |
| 2^n + 1 | n+1 bits | 0 … 2^n | canonical |

The Mersenne rules are simple because 2^n ≡ 1:

* `mod_reduce` (FERMAT = 0) adds the high half of a 2n-bit value to its low half
  and adds the carry back in.
* `mersenne_addsub` adds (or subtracts) and then adds the carry back in (or
  subtracts the borrow).
* Results may come out as all-ones. `mod_normalize` clears that code to 0, and
  only at the transform outputs.

The Fermat units are harder because 2^n ≡ −1 and the value 2^n is a legal
residue:

* `mod_reduce` (FERMAT = 1) forms *low − high*. If that borrows, it adds 1, which
  is the same as adding q modulo 2^(n+1).
* `fermat_add` looks at the (n+2)-bit sum as two carry bits c0 (bit n+1) and c1
  (bit n) plus the low n bits t. A zero detector on t separates the exact sums
  2^n (kept as 2^n) and 2^(n+1) (which becomes 2^n − 1) from an ordinary
  overflow (which subtracts 1):

      flag1 = (t == 0) & (c0 ^ c1)
      flag2 = c0 | (t != 0) & ~c0 & c1
      r     = {flag1, t} − flag2

* `fermat_sub` uses the same two top bits of the difference. When both are set,
  the difference was negative, and the unit adds 1 to the low part. When only
  c1 is set, the difference was exactly 2^n, and the unit restores bit n.

The power-of-two multipliers:

* `mod_const_mul` multiplies by a fixed exponent. It is a rotation for 2^n − 1.
  For 2^n + 1 it is a shift, then `mod_reduce`, then a subtraction from zero if
  e mod 2n ≥ n.
* `mod_var_mul` does the same for an exponent that arrives at run time. It is a
  barrel rotator for 2^n − 1, and a barrel shifter plus reduction and an
  optional negation for 2^n + 1.

## The combinational network (`ntt_comb`, `ntt_layer`)

`ntt_comb` is a radix-2 decimation-in-time FFT with log2 D layers:

* The input is bit-reverse permuted by wiring, so both ports are in natural
  order.
* Layer L pairs positions i and i + 2^L inside blocks of 2^(L+1). It writes the
  modular sum at i and the difference at i + 2^L (`ntt_butterfly`).
* The twiddle is not a separate stage. Each layer output that enters the next
  layer as the twiddled operand is multiplied there and then, by a constant
  `mod_const_mul`. Output i of layer L gets ω^((i mod h)·D/(2h)), where
  h = 2^(L+1), whenever bit L+1 of i is set.
* The last layer has no twiddles.

For D = 16 the twiddled nodes are:

| layer | twiddled nodes | count |
|---|---|---|
| 0 | 3, 7, 11, 15 | 4 |
| 1 | 5–7, 13–15 | 6 |
| 2 | 9–15 | 7 |
| total | | (D·log2 D)/2 − D + 1 = 17 |

On 2^n − 1 these multiplications are only rotations, so they merge into the
adders for free. On 2^n + 1 each one costs a reduction. For 2^n + 1 the longest
path therefore runs through the additions with reductions. For 2^n − 1 it runs
through the subtractors.

## Pipelined (`ntt_pipelined`)

This is the same network with a bank of D residue registers after every
log2(D)/STAGES layers. The last bank sits after the last layer, behind the
Mersenne normalisation. The unit takes a new D-point vector every clock and
returns it STAGES clocks later. A valid bit travels alongside the data. Only
the valid bits are reset. For D = 16, STAGES may be 1, 2 or 4: STAGES = 4 puts a
bank after every layer, and STAGES = 2 after layers 1 and 3.

## Area-compressed (`ntt_area_compressed`)

This unit builds one FFT layer and uses it log2 D times. That only works if
every layer has the same wiring, so it uses the constant-geometry form of the
FFT, a decimation-in-frequency variant. At every stage s, butterfly k (k = 0 …
D/2 − 1):

* reads positions k and k + D/2;
* writes the sum to 2k;
* writes the difference, multiplied by ω^((k >> s) << s), to 2k + 1.

The hardware is one layer of D/2 butterflies and D/2 run-time shifters
(`mod_var_mul`), with their D outputs registered and fed back. A stage counter
picks each shifter's exponent. The twiddle of the last stage is always 1, and
at stage 0 butterfly k uses ω^k.

After log2 D clocks the registers hold the spectrum in bit-reversed order. The
output wiring puts it back in natural order and, for 2^n − 1, normalises it.

Handshake and timing:

* `start` is sampled while `busy` is low. The first stage is computed from `x`
  through an input multiplexer, so `x` has to be valid only in the start clock.
* `busy` is high for the remaining log2 D − 1 clocks.
* `done` pulses when `y` becomes valid, log2 D clocks after start. `y` then
  holds until the next start.
* A `start` given while busy is ignored.
* A `start` given in the same clock as `done` is accepted. So the unit sustains
  one transform every log2 D clocks.

Compared with the combinational network, the register count is D residues plus
about five control bits. The logic is one layer plus the shifters, and the
shifters cannot be merged into the adders.

## Pseudo transforms (`pnt_pre`, `pnt_post`, `pnt_ntt`)

A pseudo Fermat or Mersenne transform works modulo q/p, where p divides
q = 2^n ± 1. This gives more choice of ring size. Because p divides q,

    NTT_q(p · x) = p · (NTT(x) mod q/p)

so the cheap mod-q network can be reused with one constant multiplier in front
of each input and one exact divider behind each output:

* `pnt_pre` multiplies by p with one adder per set bit of p beyond the first.
  Since x < q/p, the product is below q and needs no reduction.
* `pnt_post` divides by p using a β with β·p = 2^σ − 1:

      1/p = β/2^σ · (1 + 2^−σ)(1 + 2^−2σ)(1 + 2^−4σ)…

  The input is multiplied by β. Then ⌈log2(n/σ)⌉ shift-add passes
  z ← z + (z >> 2^i·σ) run in fixed point with FRAC = 8 guard bits; right
  shifts truncate. Finally the binary point moves σ places. The truncated
  series always lands just below the exact integer quotient, so the quotient is
  the integer part plus one if any fraction bit is set. For 2^n − 1 the all-ones
  code is cleared first.

The default is q = 2^22 + 1, p = 5, β = 3, σ = 4, which gives q/p = 838861 and
three passes. The divider has been checked for every multiple of 5 up to 2^22.

## Inverse transform and the SMA wrapper (`intt`, `sma_ntt_top`)

The inverse transform uses only powers of two as well:

* ω^−1 = 2^(order − k);
* D^−1 = 2^(order − log2 D);
* the order of 2 is n for 2^n − 1 and 2n for 2^n + 1.

`intt` is therefore `ntt_pipelined` run with the inverse root, followed by one
constant `mod_const_mul` per output. It inverts the forward transform only when
ω really has order D in Z_q.

`sma_ntt_top` holds two groups of units, all sharing `clk` and `rst_n` (active
low, asynchronous).

The SMA front and back end, on 2^20 + 1 with ω = 32 and D = 8:

* Init NTT (`u_init_ntt`, pipelined, 3 stages), output on `sma_spec_*`;
* the spectral processing unit, which is external and returns its result on
  `sma_proc_*`;
* Final INTT (`u_final_intt`), output on `sma_y`.

Independent units, each with its own ports:

| ports | unit | ring, size, root |
|---|---|---|
| `comb_fnt_*` | combinational | 2^20 + 1, D = 8, ω = 32 |
| `comb_mnt_*` | combinational | 2^19 − 1, D = 16, ω = 2 |
| `pipe_*` | pipelined, `PIPE_STAGES` = 4 | 2^19 − 1, D = 16, ω = 2 |
| `ac_*` | area-compressed | 2^19 − 1, D = 16, ω = 2 |
| `pnt_*` | combinational pseudo Fermat | (2^22 + 1)/5, D = 16, ω = 4 |

Vectors are packed arrays `[D-1:0][W-1:0]`, with element i in natural order.
W is n for 2^n − 1 and n + 1 for 2^n + 1.

## Configurations and how far they are true transforms

Each unit takes the parameters N, FERMAT, D and OMEGA_EXP, and the
`sma_ntt_top` parameters set them for each group. Whether the network computes
X_i = Σ_j x_j ω^(ij) mod q depends on the configuration:

| configuration | ω of order D? | what the network computes |
|---|---|---|
| 2^20 + 1, ω = 32, D = 8 | yes (32^4 = 2^20 ≡ −1) | the transform by its definition; `intt` inverts it |
| 2^19 − 1, ω = 2, D = 16 | no (2 has order 19) | the radix-2 FFT network with ω = 2 |
| (2^22 + 1)/5, ω = 4, D = 16 | no (4^11 ≡ −1 mod q) | the radix-2 FFT network with ω = 4 |

Where ω does not have order D, the result is deterministic and
architecture-independent: the combinational, pipelined and area-compressed
units agree bit for bit. It is not the transform of the definition, though, and
it cannot be inverted by `intt`. For an exact transform of length D, choose ω
of order D. Examples are 2^(2n/D) on 2^n + 1, as in 2^8 + 1 with ω = 2 and
D = 16, which the testbenches also cover.

The sizes of the Mersenne and pseudo examples, and p = 5 for the pseudo
example, are inferences. They are the values for which this architecture's
adder and register counts match published implementation figures for these
examples. Treat them as defaults, not as requirements.

## Departures and choices of this design

* The bit reversal at the input of the decimation-in-time networks, and at the
  output of the area-compressed unit, is this design's; it is wiring only.
* The valid bit (pipelined, INTT) and the start/busy/done handshake
  (area-compressed) are this design's.
* In the area-compressed unit, the first stage is computed straight from the
  input, so results arrive log2 D clocks after start rather than after a
  separate load cycle.
* The inverse transform's structure (forward network with ω^−1, then a 1/D
  shift) and the use of pipelined units in the SMA wrapper are this design's.
  So are the FNT parameters there.
* The area-compressed twiddle schedule is ω^(((k >> s) << s)) on difference
  output 2k+1 at stage s. For D = 8 that puts non-trivial factors on outputs
  3, 5 and 7 after the first stage and on outputs 5 and 7 after the second.
  A schedule that instead uses outputs 3 and 7 after the second stage, with the
  same k / k+D/2 routing, does not produce a transform.
* The divider keeps 8 guard fraction bits and rounds up on any nonzero
  fraction bit.
* Fermat exponents e ≥ n are handled by a negation. With the default forward
  parameters this never happens, but the inverse transform needs it.
* The Mersenne output normaliser is an all-ones detector and a clear.
* The spectral processing unit between the two transforms is not part of this
  RTL; its connections are ports.
* FPGA resource counts and delays are not modelled. Nothing here is specific to
  an FPGA or a process.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=… failures=…`. They share the reference model in
`tb/ntt_ref_pkg.sv`, which holds the transform by definition, its inverse, a
textbook iterative FFT and cyclic convolution, all in plain `%` arithmetic. For
example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/ntt_pkg.sv tb/ntt_ref_pkg.sv tb/tb_sma_ntt_top.sv \
        --top-module tb_sma_ntt_top -o sim && obj_dir/sim

What the testbenches check:

* The arithmetic units are checked exhaustively at small n (5 to 8) and with
  random and corner values at n = 19, 20 and 22.
* The networks are compared with the definition (true-root configurations) or
  with the textbook FFT (the others).
* Latencies are checked: STAGES clocks for the pipelined units, log2 D clocks
  for the area-compressed unit.
* `tb_sma_int_mult` uses the SMA chain for what it is for. It multiplies
  random 32-bit integers split into four 8-bit digits, zero-padded to 8
  coefficients, then propagates the carries of the returned convolution and
  compares with the 64-bit product. With the default chain (8 points modulo
  2^20 + 1), 32 × 32-bit products are the largest that fit this digit layout.
  Every coefficient of the convolution must stay below q.
* `tb_sma_ntt_top` runs the whole top at its default parameters. It multiplies
  two polynomials through Init NTT → pointwise product in the testbench →
  Final INTT and checks the cyclic convolution. It also streams the pipelined
  unit back to back and restarts the area-compressed unit on `done`. It counts
  that each of these happened, along with the all-ones and 2^n corner inputs.

## Files

| file | content |
|---|---|
| `rtl/ntt_pkg.sv` | residue width, order of 2, bit reversal, twiddle exponent functions |
| `rtl/mod_reduce.sv` | 2n-bit → residue folding |
| `rtl/mersenne_addsub.sv`, `rtl/fermat_add.sv`, `rtl/fermat_sub.sv` | modular adders and subtractors |
| `rtl/mod_const_mul.sv`, `rtl/mod_var_mul.sv` | power-of-two multipliers |
| `rtl/mod_normalize.sv` | all-ones → 0 for 2^n − 1 |
| `rtl/ntt_butterfly.sv`, `rtl/ntt_layer.sv` | butterfly and one decimation-in-time layer |
| `rtl/ntt_comb.sv`, `rtl/ntt_pipelined.sv`, `rtl/ntt_area_compressed.sv` | the three architectures |
| `rtl/pnt_pre.sv`, `rtl/pnt_post.sv`, `rtl/pnt_ntt.sv` | pseudo transform |
| `rtl/intt.sv` | inverse transform |
| `rtl/sma_ntt_top.sv` | top level |
