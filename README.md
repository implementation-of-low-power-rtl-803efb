# Ordered-coefficient radix-2 FFT core

This is a small, parameterisable in-place radix-2 FFT processor, 32 points by
default, built to cut dynamic power on one particular bus: the coefficient
input of the butterfly's multipliers. In the last FFT stage every butterfly
needs a different twiddle factor. In natural order the 32-bit coefficient
word toggles about half its bits on each step. This core does two things in
that stage:

1. **It runs the butterflies in a different order.** The order is chosen so
   that successive imaginary parts of the coefficients are close in Hamming
   distance.
2. **It stores each real part either as is or negated,** whichever is closer
   in Hamming distance to the real part used just before it. A flag bit marks
   the negated ones, and a cheap correction in the multiplier undoes the
   negation.

Together these cut the coefficient-input toggles of the last stage by roughly
half: 47–56% for sizes from 16 to 1024 points (measured in simulation, see
*Verification*). The FFT result does not change, apart from a rare 1-LSB
difference explained below.

Everything else is a conventional single-butterfly, memory-based FFT. There
are two RAM banks and a ROM of coefficients. A counter drives address
generation through rotations and a parity split. One butterfly is completed
per clock.

## Block diagram

```
            FSM: counter = {HS (stage), LS (butterfly)}
              |ASEL      |LS         |HS            |SEL
              |     +----+----+      |              |
              |     |  RROM   |      |              |
              v     v         v      |              |
            +-----------------+      |              |
            |      RMUX       |  b = butterfly index|
            +-----------------+      |              |
              |b      |b       |b    |b             |
            ROT0    ROT1    PARITY  MUXC --> CROM --+--> W (flag, wr, wi)
              |a0     |a1      |p                   |
            +-----------------+                     |
            |       CAI       |  (bank addresses)   |
            +-----------------+                     v
   DATA_IN -> MUXIN -> CDI -> RAME / RAMO -> CDO -> butterfly -> XO, YO
                ^                                               |
                +-----------------------------------------------+
```

| Module | Name in the design | Job |
|---|---|---|
| `fft_ordered_core` | top | wiring, one pipeline register stage, input register |
| `fft_fsm` | FSM | load / process / output sequencing, the HS:LS counter, ASEL, SEL |
| `reorder_rom` | RROM | last-stage butterfly order (N/2 words of log2(N/2) bits) |
| `rmux` | RMUX | counter value or RROM value, chosen by ASEL |
| `addr_rot` | ROT0, ROT1 | the two data addresses of a butterfly |
| `addr_parity` | PARITY | which bank holds which of the two addresses |
| `coef_addr_mux` | MUXC | twiddle exponent = CROM address |
| `coef_rom` | CROM | {flag, real, imag} per exponent, registered read |
| `addr_interchange` | CAI | address steering to the banks |
| `dp_ram` | RAME, RAMO | N/2 x 32-bit banks, 1 write + 1 synchronous read port |
| `data_in_interchange` | CDI | write-data steering to the banks |
| `data_out_interchange` | CDO | read-data steering to butterfly X/Y |
| `muxin` | MUXIN | input samples or butterfly results into the RAMs |
| `butterfly` | butterfly | four multipliers, one subtractor/adder pair, four output adders |
| `real_coef_mult` | multiplication module | multiplier + 16 XORs for the flagged real coefficient |
| `tc_mult` | multiplier | plain 16x16 two's complement multiplier |
| `fft_pkg` | – | shared types, coefficient quantisation, the ordering procedure |

## The coefficient trick in detail

### Why reordering alone does little

A twiddle factor is `W_N^k = cos(2πk/N) − j·sin(2πk/N)`. Real and imaginary
parts cannot be reordered independently. Sorting the sequence so the
imaginary parts change little tends to make the real parts change a lot, and
the reverse also holds. So reordering whole coefficients gains only about
5–27% fewer toggles.

### Negating the real part

Across the last stage, many coefficients come in pairs that share an
imaginary part and have opposite real parts: `W^k` and `W^(N/2−k)`. The
imaginary parts are ordered first, by nearest Hamming neighbour. After that,
each real part may be replaced by its negation, and the form that is nearer
to the previous stored real part is kept. In the 32-point table,
`cos(π/8) = 7641h` is followed by `−cos(7π/8)`. Stored as is, that value
would be `89beh`, 16 bits away. Negated it is `7642h`, 2 bits away.

### Undoing the negation cheaply (`real_coef_mult`)

The stored real part `b` may be `−wr`. The multiplier forms `a·b` and keeps
bits [30:15], the 1.15 result. When the flag is set, the 16 XOR gates invert
those bits. This gives the ones' complement, `−(a·b) − 1 LSB`, which is
`a·wr − 1 LSB`. Forming the exact two's complement would need a carry
through the whole product, and this design avoids that on purpose. After the
truncation, the result differs from the unflagged product by at most one LSB
(`tb_real_coef_mult` checks this on 20000 random pairs). Each butterfly
output is halved, which absorbs most of this.

Only the two multipliers that use `wr` have the XORs. The `wi` multipliers
are plain.

### How the order is computed (`fft_pkg`)

The tables are not typed in. They are computed while the design elaborates,
for any power-of-two N up to 1024:

* **Quantisation.** `v ≥ 0` is stored as `round(v·32767)`. `v < 0` is stored
  as the bitwise complement of `round(|v|·32767)`. For N = 32 this gives
  7fff, 7d89, 7641, 6a6d, 5a82, 471c, 30fb, 18f9, 0000, e706, cf04, b8e3,
  a57d, 9592, 89be, 8276 for the real parts of `W^0 … W^15`.
* **Imaginary order (`order_exp`).** The first coefficient is the one whose
  imaginary part has the fewest ones (always `W^0`). Each next one is the
  unused coefficient whose imaginary part is nearest in Hamming distance to
  the previous one. Ties go to the smallest exponent.
* **Real form (`order_flags`).** The first real part is negated if the
  negation has fewer ones. Each later one is negated if that brings it
  strictly nearer to the real part stored before it. Equal distances keep
  the value as is.

For N = 32 the last-stage order is
0, 8, 2, 14, 1, 15, 5, 11, 6, 10, 7, 9, 4, 12, 3, 13. The exponents stored
negated are 0, 4, 6, 7, 11, 13, 14 and 15.

### Where the order is applied

In stage `s` of this addressing scheme, butterfly `b` uses exponent `b` with
only its `s` most significant bits kept. So in the last stage, butterfly `b`
uses `W^b`. Running the coefficients in a chosen order therefore means
running the butterflies in that order. RROM maps position `p` to butterfly
index `b`. RMUX passes that index instead of the counter value to *all* the
address logic (ROT0, ROT1, PARITY, MUXC), so data and coefficient stay
paired. CROM is indexed by exponent, so the earlier stages read it unchanged.
The flags are used in every stage, but only the last stage gains.

## Memory organisation and addressing

The transform is in place: N words of 32 bits ({re, im}, 1.15 each) in two
banks of N/2 words. Address `a` lives in RAME if `a` has even parity and in
RAMO otherwise, at word `a >> 1`. In stage `s`, butterfly `b` (0 … N/2−1)
works on two addresses:

```
a0 = rotl({b, 0}, s)     a1 = rotl({b, 1}, s)      (log2 N-bit rotations)
```

The two differ only in bit `s`, as a decimation-in-time stage needs, and so
they always fall in opposite banks. `parity(b)` says which address is in
which bank. CAI, CDI and CDO swap the two sides when the parity is 1. This
is why one read port and one write port per bank are enough for one
butterfly per clock.

The twiddle exponent is `b AND mask`, where the mask keeps the top `s` bits
of the (log2 N − 1)-bit index. MUXC is a row of 2:1 multiplexers.

Loading uses stage-0 addresses with the counter bit-reversed. Input pair `c`
(`x[c]`, `x[c+N/2]`) then lands at the bit-reversed locations that the
decimation-in-time flowgraph expects. Output uses last-stage addresses with
the counter in order, which gives `X[c]`, `X[c+N/2]`.

## Pipeline and timing

```
cycle t   : FSM count -> RMUX -> ROT/PARITY/MUXC -> CAI -> RAM read addresses,
            CROM address
cycle t+1 : RAM/CROM data -> CDO -> butterfly -> MUXIN -> CDI -> RAM write
            at the addresses of cycle t (registered with the parity)
```

Reading butterfly `i+1` overlaps writing butterfly `i`. There is no bubble
between stages. For N ≥ 8 the first butterfly of a stage never reads a word
that the last butterfly of the previous stage is writing, and the first
output read never does either. In the last stage this holds because `W^0`
is always first. The core asserts `8 ≤ N ≤ 1024` at elaboration. A
concurrent assertion checks at run time that no bank is read at the word
it is writing.

| Phase | Cycles |
|---|---|
| load | N/2 accepted pairs (`din_valid` may have gaps) |
| process | log2(N) · N/2 |
| output | N/2 consecutive pairs |

The first output pair is valid `log2(N)·N/2 + 1` clock edges after the edge
that takes the last input pair. That is 81 for N = 32.

## Interface (`fft_ordered_core`)

| Port | Dir | Width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (controller and pipeline registers; RAM contents are not reset) |
| `start` | in | 1 | in IDLE, begins loading a block |
| `din_valid`, `data_in` | in | 1, 64 | `data_in = {x[c], x[c+N/2]}`, each `{re[15:0], im[15:0]}`, for c = 0 … N/2−1 in order |
| `busy` | out | 1 | high from start until the last output pair |
| `dout_valid`, `data_out` | out | 1, 64 | `{X[c], X[c+N/2]}` for c = 0 … N/2−1 on consecutive cycles |
| `done` | out | 1 | one-cycle pulse with the last output pair |

The output is the DFT divided by N, because each butterfly halves its
results. Keep input magnitudes below 1.0 (for example |re|, |im| ≤ 0.7):
the halving then keeps every intermediate complex magnitude in range. The
only parameter is `N`, a power of two from 8 to 1024.

## Numerics

* Sums are formed at 17 bits and shifted right by one (truncation).
* The `D`/`S` partial sums of the butterfly are 16 bits. They cannot
  overflow while |y| < 1.
* Measured error against a double-precision DFT/N on random data: 2–6 LSB
  for N = 8 … 1024, at most 4 LSB over 1000 random 32-point blocks.

## What is this design's own choice

The source description gives the block structure, the butterfly and
multiplier structure, the memory organisation, the ordering procedure and
the coefficient set for 32 points. The following were filled in here:

* The port protocol (start/valid/done) and the order of samples at the
  ports.
* The exact rotation used by ROT0/ROT1 and the MUXC mask. The original
  refers to earlier work for both.
* Bank word index = address without its LSB.
* Synchronous-read RAMs, a registered CROM, a one-cycle register on
  `data_in`, and a register stage that delays the write addresses and the
  parity. The original block diagram drives CDI/CDO directly from PARITY;
  here the delayed parity drives both, to match the RAM latency.
* Reset style; truncating (not rounding) halving.
* CROM is indexed by exponent with the order held in RROM. The published
  32-point table lists the coefficients in processing order instead; the
  words themselves are the same.
* CROM words are 33 bits, {flag, re, im}. The original diagram labels the
  coefficient path 32 bits and the flag travels alongside.
* **Tie-breaking in the ordering.** The original flowchart and its 32-point
  example disagree where several coefficients are equally near. This core
  breaks ties towards the smallest exponent. That reproduces the first six
  entries of the published 32-point order (0, 8, 2, 14, 1, 15) but not the
  last ten, where the published order continues 7, 9, 6, 10, 11, 5, 13, 3,
  12, 4.
* **Equal distances in the flag rule.** The flowchart would negate a real
  part when both forms are equally near. The published table keeps it as is
  (`W^8`, real part 0000h), and so does this core.
* **Toggle counts.** The absolute toggle counts measured here (e.g. 222 →
  102 for N = 32) differ from the published totals (240 → 126). The way
  those were counted is not stated. The relative reduction is similar
  (54% here, 48% published).
* **Not modelled:** power, and the gate-level multiplier structure. The
  multipliers are written as `*`. The original cores used non-Booth Wallace
  trees.

## Simulating

All testbenches are self-checking and end with a `TB_RESULT checks=… failures=…`
line. With plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/fft_pkg.sv tb/tb_fft_ordered_core.sv --top tb_fft_ordered_core
./obj_dir/Vtb_fft_ordered_core
```

Replace the testbench name to run another. Elaborating large N takes a
while, because the ordering procedure is O(N²) at compile time. Building
`tb_fft_sizes`, which includes a 1024-point core, takes about a minute.

| Testbench | What it shows |
|---|---|
| `tb_fft_ordered_core` | the default 32-point core end to end: 8 blocks (impulse, tone, constant, random; with and without input gaps) against a DFT; latency; done/busy; last stage really reordered and only there; flagged coefficients used; both bank assignments used; fewer last-stage coefficient toggles than natural order |
| `tb_fft_1000_blocks` | 1000 random 32-point blocks back to back, with input gaps, every bin checked; total coefficient toggles |
| `tb_fft_sizes` (with helper `fft_size_run`) | one random block each at N = 8, 16, 64, 128, 256, 512, 1024: accuracy, latency, toggle reduction of at least 40% |
| `tb_fft_fsm` | the control sequence cycle by cycle |
| `tb_reorder_rom`, `tb_coef_rom` | the tables for N = 32 word by word, and the nearest-neighbour property for N = 16, 32, 64 |
| `tb_butterfly`, `tb_real_coef_mult`, `tb_tc_mult` | arithmetic against integer and floating-point models |
| `tb_addr_rot`, `tb_addr_parity`, `tb_coef_addr_mux`, `tb_addr_interchange`, `tb_data_in_interchange`, `tb_data_out_interchange`, `tb_muxin`, `tb_rmux`, `tb_dp_ram` | the address and steering blocks, exhaustively where the space is small |

## Verification

Every testbench passes. Each unit testbench also fails against a copy of its
module with one deliberate bug, for example a wrong rotation amount, flags
forced to zero, or ASEL stuck low.

Last-stage coefficient toggles, ordered vs natural order:

| N | 8 | 16 | 32 | 64 | 128 | 256 | 512 | 1024 |
|---|---|---|---|---|---|---|---|---|
| reduction | 64% | 53% | 54% | 56% | 49% | 49% | 50% | 47% |

Over 1000 random 32-point blocks, the coefficient word at the butterfly
toggles 102 times per block in the last stage. The same coefficients in
natural order would toggle 222 times.

Lint warnings that remain are unused bits: the discarded product bits
outside [30:15], the LSB dropped by the halving, and the address LSB that
selects the bank. All of these are intended.
