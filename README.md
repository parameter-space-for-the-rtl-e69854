# FFTM3: Montgomery multiplication through Fermat-ring number-theoretic transforms

This design multiplies 3,100-bit integers modulo an odd 3,100-bit `n` in
Montgomery form, `z = x*y*r^-1 mod n`. It never runs a long carry chain over the whole operand.
Instead, every operand is cut into `s = 32` words of `mu = 97` bits and treated as a polynomial,
and polynomial products are computed with a length-64 number-theoretic transform (NTT) over the
ring `Z_q` with `q = 2^224 + 1`. In that ring the root of unity is `omega = 2^7`, so every
"multiplication by a twiddle factor" is a shift followed by a cheap reduction (`2^224 = -1`).

The only real multiplier is a single pipelined Karatsuba unit. It performs one
component-wise product per cycle.

The Montgomery reduction itself is done in the spectral domain. A multiplication is three rounds of
"component-wise product -> inverse transform -> forward transform":

| round | spectral product | inverse transform, then on the words | forward transform |
|-------|------------------|--------------------------------------|-------------------|
| 1 | `G = X . Y` | `h = g mod r` | `H` |
| 2 | `M = H . N'` | `m = m mod r` | `M` |
| 3 | `Z = M . N + G` | `z = (g + m*n) / r` | `Z` (the result) |

Here `r = 2^(mu*s) = 2^3104` and `n' = -n^-1 mod r`. Operands and result stay in the spectral
domain (`X = NTT(x)` and so on), so results can be chained: `Z` can be the `X` of the next
multiplication without ever leaving the transform domain.

Nothing is ever fully reduced. Coefficients are *non-least-positive* (NLP) residues mod q, and
words are carry-save words. `z` is congruent to `x*y*r^-1 (mod n)` and lies below `3n` when
`x, y < 3n`. This is why no conditional subtraction is needed anywhere.

## Parameters and number formats

| top parameter | default | meaning |
|---|---|---|
| `V` | 224 | `q = 2^V + 1` |
| `D` | 64 | transform length `d`; `s = d/2` words per operand |
| `LOG2W` | 7 | `omega = 2^LOG2W` (needs `omega^d = 1`, `omega^(d/2) = -1` mod q) |
| `MU` | 97 | word size, `b = 2^MU`; moduli up to `l = MU*s - 4 = 3100` bits |
| `BASE_W` | 17 | largest unsigned operand width of a base multiplier (18-bit signed DSP) |
| `BASE_LAT` | 1 | latency of a base multiplier |
| `SQRT2` | 0 | 1 selects `omega = sqrt(2)` (for sets with `2v/d < 1`); `LOG2W` is then ignored |

The number formats are:

- **Coefficient.** A coefficient is a `V+2 = 226`-bit two's complement value, congruent mod q to the
  true one. Reduction mod q (`modq_reduce`) is an alternating sum of 224-bit chunks. It leaves
  a value that fits in 226 bits, and it is never corrected into `[0, q)` inside the transform.
- **Word.** A word is `MU+2 = 99` bits, carry-save (below `3*2^97`). A time-domain coefficient
  `z_i < q` is split into `B = ceil(226/97) = 3` segments `z_i0, z_i1, z_i2`. Word `i` is
  `w_i = z_i0 + z_(i-1)1 + z_(i-2)2`, and the words are never carry-propagated.

The parameter rule `s * 2^(2(mu+2)+1) < q` guarantees that every true convolution coefficient of
two NLP word vectors lies in `[0, q)`. So after the inverse transform, one add or subtract of `q`
recovers the exact integer coefficient.

## Memory: slots, banks and the four-coefficient read

`coeff_mem` holds 7 polynomial slots of `d` coefficients each:

| slot | contents |
|---|---|
| 0 | X |
| 1 | Y |
| 2 | N' |
| 3 | N |
| 4 | G (kept for round 3) |
| 5, 6 | work slots WA / WB (ping-pong) |

Each slot is four simple dual-port RAMs (`ram_sdp`: one write port, one registered read port).
Coefficient `p` sits in bank `p mod 4` at address `p/4`, so one read address yields four
consecutive coefficients. That is exactly what the butterfly unit consumes per cycle. Writes
have a separate enable and address per bank.

## The transform engine

### Butterfly unit (`fft_butterfly`)

The butterfly unit takes the four coefficients `x_4t..x_4t+3` and runs two radix-2 butterflies:

- A on `(x_4t, x_4t+1)`, producing `X_2t` and `X_2t+d/2`
- B on `(x_4t+2, x_4t+3)`, producing `X_2t+1` and `X_2t+1+d/2`

Each butterfly computes `X_k = x_2k + x_2k+1*omega^P` and `X_k+d/2 = x_2k - x_2k+1*omega^P`.

This is a *constant-geometry* network. Every stage reads the same positions and writes the same
positions, so one piece of hardware serves all `log2 d = 6` stages.

The twiddle exponent of butterfly `k` in processing stage `p` (0 first) is:

    P = floor(k / 2^(L-1-p)) * 2^(L-1-p),  L = log2 d

So the first stage processed uses `omega^0` everywhere, and the last uses `omega^k`. The input must be
in bit-reversed order and the output comes out in natural order.

The inverse transform uses the negated exponent (`omega^-P = 2^(2V - 7P)`). Its `d^-1` scaling is
done later, in the accumulator.

`shift_modq` multiplies by `2^e` for `e` taken mod `2V`. For `e >= V` it uses `2^e = -2^(e-V)`,
so the physical shifter never exceeds 224 positions.

The unit has three pipeline registers:

1. shift
2. add/subtract
3. reduction

### The `omega = sqrt(2)` path (`sqrt2_mult`, `SQRT2 = 1`)

Parameter sets with `2v/d < 1` (for example `v = 64, d = 256`) use `omega = sqrt(2)`, where
`sqrt(2) = 2^(3v/4) - 2^(v/4) mod q`. The controller computes the exponent `P` of `sqrt(2)` mod
`4V` and sends `floor(P/2)` as the shift plus an odd flag. In the butterfly an extra stage
multiplies the shifted value by `sqrt(2)` when the flag is set. `sqrt2_mult` does this with two
constant shifts (each reduced), a subtraction and a final reduction. The butterfly is then 4 cycles
deep instead of 3; the published design adds 3 cycles for this case.

### Writing a stage back: the channel selector

Group `t` produces the top pair `X_2t, X_2t+1` and the bottom pair `X_2t+d/2, X_2t+d/2+1`. In the
bank layout both pairs want banks `{0,1}` (t even) or `{2,3}` (t odd). Writing them directly would
collide.

`channel_selector` delays the bottom pair by one register stage. In each cycle it then sends the
current top pair to one half of the banks and the previous group's bottom pair to the other half:

| `sel` | current top pair goes to | delayed bottom pair goes to |
|---|---|---|
| 0 (`t` even) | RAM0/1 | RAM2/3 |
| 1 (`t` odd) | RAM2/3 | RAM0/1 |

The controller generates the addresses:

- The top pair of group `u` goes to address `u/2`.
- The bottom pair goes to `u/2 + d/8`.

A whole stage of `d/4` groups is written in `d/4 + 1` cycles with no bank conflict.

### Overlapping stages

Stage `j+1` starts `PERIOD = max(d/4, d/8 + BLAT + 2)` cycles after stage `j` (16 at the
defaults). That is as soon as the first group it needs has been written. Consecutive stages always
alternate between the two work slots (ping-pong), so a stage never overwrites coefficients that
the previous stage has not read yet.

## Bit-reversed order: the word buffer and bit-reversed products

The constant-geometry network needs bit-reversed input. Two places produce that input:

- **Inverse transform input.** The multiplier writes product `p` to position `bitrev(p)` of its
  destination slot. It handles one coefficient per cycle, so a single-bank write per cycle never
  collides.
- **Forward transform input.** The accumulator produces time-domain words (`h`, `m` or `z`).
  First-stage group `t` needs positions `bitrev(4t..4t+3)`. At `d = 64` these differ only in their
  top two bits, so all four would lie in the *same* RAM bank. The words therefore go to `td_buffer`, a
  register array of `s` 99-bit words. It returns any four words per cycle in the bit-reversed
  order, and zeroes for positions `>= s` (`h`, `m` and `z` have only `s` words).

## From inverse-transform outputs to words: the accumulator

This is the most intricate part of the design (`ifft_accumulator`). The last stage of every inverse
transform does not go back to RAM. Its outputs go straight into the accumulator, which takes one
pair of coefficients per cycle and passes it through three registered steps:

1. Multiply both coefficients by `d^-1 = 2^(2V - 6)` (a shift plus a reduction).
2. Correct each NLP residue to the exact coefficient in `[0, q)`.
3. Split each coefficient into `B` segments and add the segments of the two newest coefficients to
   those of the `B-1` previous ones (kept as history) to form two carry-save words.

The coefficients must arrive in ascending index order.

### Modulo r (rounds 1 and 2)

Groups `0..d/4-1` are read in order and the accumulator takes their top pairs. These are
`z_0..z_(s-1)`, which is exactly the part below `r = b^s`. Words `w_0..w_(s-1)` are stored. The
carry bits of `w_(s-1)` are dropped, because they would belong to `b^s`, which is zero mod r.
The bottom pairs (`z_s..z_(d-1)`) are simply not needed.

### Division by r (round 3)

Here the *upper* words `w_s..w_(d-1)` are needed. Two things make this tricky.

First, `w_s` contains the high segments of `z_(s-1)` and `z_(s-2)`, so the accumulator must see
those coefficients first. They are the top pair of the last group, `t = d/4 - 1`. In general it
must see `z_(s-2K)` onward, with `K = ceil(B/2)` pairs (2 at the defaults).

So in this round the controller reads the last inverse stage in a rotated order:

| cycles | groups read | accumulator takes | bottom pair |
|---|---|---|---|
| `K` | `d/4-K .. d/4-1` | top pairs `z_(s-2K)..z_(s-1)` | kept in a small register file |
| `d/4 - K` | `0 .. d/4-K-1` | bottom pairs `z_s..z_(d-2K-1)` | — |
| `K` | none (replay) | the kept pairs `z_(d-2K)..z_(d-1)` | — |

The coefficient stream is thus strictly ascending from `z_(s-2K)`. The stage takes
`d/4 + K` cycles instead of `d/4`. Because it begins with the groups the previous stage writes
last, its start is delayed to `PERIOD_DIV = max(PERIOD, d/4 - K + BLAT + 4)` (21 cycles).

Second, the lower half that is thrown away still carries into the upper half. Because
`g + m*n` is divisible by r, the low words `w_0..w_(s-1)` add up to exactly `epsilon * r` for a
small integer `epsilon`. That `epsilon` follows from `w_(s-1)` alone:

- Its carry bits.
- Plus one if its low 97 bits are non-zero. The words below can then only complete it to a full
  `b`, never overflow it.

For `B = 3` the design uses the two-bit simplification. With `a1 a0` the top two bits of segment 0
of `z_(s-1)` and `b1 b0` the top two bits of segment 1 of `z_(s-2)`:

    eps[0] = (a1 ^ a0) | (b1 ^ b0) | (a1 ^ b1)
    eps[1] =  a1 & a0 & b1 & b0

`epsilon` is captured when the pair `(z_(s-2), z_(s-1))` passes and is added to the lowest stored
quotient word `w_s`. For other `B`, the general rule above is used (it is exercised by
`tb_fftm3_top_small`, with `B = 4`).

## The component-wise multiplier

`cw_multiplier` computes `y = a*b (+ c) mod q` for 226-bit signed NLP operands, one pair per cycle:

- It takes the magnitudes into `karatsuba_mult`, which recursively halves 226 bits down to at most
  17 bits: four levels, `3^4 = 81` base multipliers.
- It applies the sign afterwards.
- In round 3 it adds the stored `G` coefficient before the reduction.

Each Karatsuba level has three register rows:

1. the half sums
2. the products and `PH + PL`
3. the middle subtraction

The base multipliers are registered `*` operators that map to DSP blocks. Latency is
`BASE_LAT + 3*depth = 13` for the Karatsuba unit and 16 for the whole multiplier.

## Sequencing (`fftm3_controller`)

The controller issues one *token* per cycle: a multiplication index, or a transform group with its
stage, twiddle exponents, source and destination slots and accumulator selection. The token travels
down a delay line, so each control reaches its unit in the same cycle as the data:

- RAM read: 1 cycle
- butterfly: 3 cycles
- multiplier: 16 cycles

The outputs follow the names of the architecture:

| signal | function |
|---|---|
| `Read_Addr` | read address per slot |
| `Wrt_En`, `Wrt_Addr` | write enable and address per slot and bank |
| `BRAM_In_Sel` | RAM write source: host, multiplier or channel selector |
| `Shift_Ctrl0/1` | twiddle exponents |
| `Transf_Mode` | forward or inverse transform |

Between phases the pipeline is drained (`max(MLAT+3, BLAT+8) + 1` cycles).

A multiplication takes **957 cycles** at the defaults. Per round:

    64 (multiply) + 20 (drain) + 5*16 + 16 (IFFT) + 20 + 5*16 + 16 (FFT) + 20  = 316

That is 948 for three rounds. Add 5 + 2 for the later start and the replay of the division stage,
and 2 for the final state and the registered `done`.

The published implementation of this parameter set reports 843 cycles. Its component-wise
multiplication phase takes `base multiplier delay + 3d/4 + 1` cycles against `d` plus a drain here,
and it does not drain the pipeline between phases. This design keeps the multiplier at one
coefficient per cycle and drains between phases, which keeps the schedule simple to check.

## Using the top (`fftm3_top`)

The host does the following:

1. **Compute `n'`.** Compute `n' = -n^-1 mod 2^3104`.
2. **Transform the operands.** Split `x`, `y`, `n`, `n'` into 32 words of 97 bits, zero-pad to 64
   coefficients, and compute their length-64 NTTs over `Z_q` with `omega = 2^7`.
3. **Load the spectra.** While `busy` is low, write each spectrum with `in_we`, `in_slot`
   (0 X, 1 Y, 2 N', 3 N), `in_pos` (natural order) and `in_data` (values in `[0, q)` or any
   226-bit residue).
4. **Run.** Pulse `start` and wait for the one-cycle `done`.
5. **Read the result.** Read `Z` with `out_pos`; `out_data` follows one cycle later. The inverse
   NTT of `Z` gives 64 coefficients whose first 32 are the 99-bit carry-save words of `z`; the
   rest are zero.

To chain, load `Z` as the next `X` (or `Y`). `X` and `Y` keep their slots, and `N`/`N'` stay loaded
across multiplications.

The host-side transforms of the inputs, and the final inverse transform, are not part of this
RTL.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and uses `$urandom` stimulus against an independent
reference.

| testbench | what it checks |
|---|---|
| `tb_modq_reduce`, `tb_shift_modq` | congruence mod q and the output range, random and edge values |
| `tb_karatsuba_mult`, `tb_cw_multiplier` | exact products / residues at the stated latency, signed operands, the addend |
| `tb_fft_butterfly` | both butterflies against a modular reference, output order, latency; a second instance with `SQRT2 = 1` and random odd flags |
| `tb_sqrt2_mult` | `sqrt2(sqrt2(x)) = 2x (mod q)` and the output range at `v = 224` |
| `tb_channel_selector` | the length-32 sequence of the published example: every coefficient reaches the right bank exactly once |
| `tb_ram_sdp`, `tb_coeff_mem`, `tb_td_buffer` | read latency, read-during-write, bank and slot independence, bit-reversed group reads |
| `tb_ifft_accumulator` | coefficients of real `g + m*n` products fed in controller order. Mod r: words congruent to `Z mod r`, each below `3*2^97`. Div r: words sum exactly to `Z / r` (this fails without `epsilon`). Latency. |
| `tb_fftm3_controller` | host write decoding; per multiplication: every slot position written once per stage, write and accumulator counts, every twiddle exponent against the stage formula, group order, busy/done |
| `tb_fftm3_top` | full 3,100-bit size, top at its defaults (see below) |
| `tb_fftm3_top_small` | the same at `q = 2^32+1`, `d = 16`, `omega = 2^4`, `mu = 11` (84-bit moduli, `B = 4`) |
| `tb_fftm3_top_sqrt2` | end to end with `SQRT2 = 1`: `q = 2^32+1`, `d = 128`, `omega = sqrt(2)`, `mu = 10`; fails if no odd twiddle exponent is seen |

The end-to-end tests do the following:

- They draw random odd moduli.
- They compute `n'` and all transforms with a direct `O(d^2)` sum in wide integers, independent
  of the butterfly network.
- They run the top and inverse-transform the result.
- They check four things:
  - the upper 32 coefficients are zero and the lower ones fit in 99 bits;
  - `z` equals `(x*y + m*n)/r` exactly (or that plus `n`);
  - `z = x*y*r^-1 (mod n)` and `z < 3n`;
  - the cycle count.

The last run chains the previous `Z` in as `X`. The tests also count each mechanism and fail if
one never happens:

- round-3 multiply-add
- mod-r and div-r passes
- non-zero `epsilon`
- replayed pairs
- both channel-selector routings
- both ping-pong slots

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        rtl/fftm3_pkg.sv tb/tb_fftm3_top.sv --top-module tb_fftm3_top -j 8
    ./obj_dir/Vtb_fftm3_top

Run times:

- The full-size test takes a few minutes to simulate, most of it in the testbench's own
  wide-integer reference.
- `tb_fftm3_top_small` takes under a second.

## Departures from the published architecture

- **Stage numbering of the twiddle formula.** The published formula `P = floor(k/2^j)*2^j` is
  applied with the stages in descending `j`. The first stage processed is `j = L-1`
  (`P = 0`) and the last is `j = 0` (`P = k`). This matches the published remark that odd
  exponents occur only in stage 0.
- **Butterfly pipeline depth.** The unit is 3 cycles deep (4 with `SQRT2`), where the published unit is 10.
  The stage period and the drains are derived from `BLAT`, and change with it.
- **Ping-pong storage is always used.** The published design adds the second RAM set only when
  the butterfly pipeline is shorter than `d/8`.
- **Multiplier throughput and product order.** The multiplier handles one coefficient per cycle
  and writes products bit-reversed. The word buffer is an addition. The published text does not
  say how the bit-reversed transform input is produced.
- **Division-by-r stage order.** The rotated order of the last inverse stage, with kept pairs and
  replay, is this design's way of feeding the accumulator in ascending order.
- **Accumulator internals.** The correction to `[0, q)` before word formation and the
  sign-magnitude handling in the multiplier are this design's choices.
- **Cycle count.** See [Sequencing](#sequencing-fftm3_controller): 957 against the published 843
  for the same parameter set.

## Not built

- **Larger segment counts.** The accumulator supports `B` from 2 to 4. Sets with more segments
  per coefficient (e.g. `v = 128`, `mu = 25`, `B = 6`) are rejected by an assertion.
- **Other parameter sets.** The published implementation evaluates many sets, from 1,028 to
  15,484 bits. The RTL is parameterized for them, but only the 3,100-bit default, the small
  84-bit set and a small `omega = sqrt(2)` set (`v = 32`, `d = 128`) have been simulated. The default build accepts any odd modulus of up to 3,100 bits.
