# Unified, scalable Montgomery inverter for GF(p) and GF(2^n)

Elliptic-curve arithmetic in affine coordinates needs one field inversion per
point operation, and inversion is usually many times slower than a
multiplication. This design computes the **Montgomery inverse**

    b = a^-1 * 2^(2n)  mod p          (GF(p), fsel = 0, p odd, n = bit length of p)
    b(x) = a(x)^-1 * x^(2n) mod p(x)  (GF(2^n), fsel = 1, n = degree of p(x))

in one datapath for both kinds of field. If `a` is an element in Montgomery
form (`a = A * 2^n`), `b` is `A^-1` in Montgomery form again, so the result
goes straight back into a Montgomery multiplier.

Three ideas make it small and fast:

1. **Word-serial ("scalable") datapath.** Operands live in word-addressed
   registers and every operation streams through W-bit adders one word per
   clock, least significant word first. The precision `n` is a run-time input,
   so one instance with `WORDS` words handles any `n <= W*WORDS`. A loop
   iteration over `e = ceil(n/W)` words costs `e+1` clocks.
2. **One algorithm for both fields.** The binary-extended-Euclid loop of
   Montgomery's almost-inverse algorithm is modified so that `u` and `v` are
   compared by **bit length** instead of by value. In GF(2^n) that is exactly
   the degree comparison the polynomial algorithm needs, so the control is the
   same in both fields; only the adder changes (carries switched off in
   GF(2^n)). In GF(p) the cheap comparison can make `u` negative; the sign is
   repaired in the next iteration, in parallel with the useful work, by
   two extra word adders used as negators.
3. **Three-bit shifting.** Phase I shifts `u` or `v` right by up to three bits
   when their low bits are zero; Phase II performs up to three of its modular
   doublings per pass. This removes about 40% of Phase I's shift passes and
   about 30% of Phase II's passes.

## Algorithm as implemented

Notation: all values are two's complement, `t` is a shift amount in 1..3,
`bs(x)` is the bit length.

**Initialisation pass:** `u := p, v := a, r := 0, s := 1, k := 0`.

**Phase I** (one opcode per pass, chosen from the flags of the previous pass):

| condition | operation | k |
|---|---|---|
| u >= 0 and u = 0 | leave Phase I | |
| u >= 0, u even (t trailing zeros, max 3) | `u := u/2^t, s := 2^t s` | +t |
| u >= 0, v even | `v := v/2^t, r := 2^t r` | +t |
| u >= 0, bs(u) >= bs(v) | `u := (u-v)/2, r := r+s, s := 2s` | +1 |
| u >= 0, bs(u) < bs(v) | `v := (v-u)/2, s := s+r, r := 2r` | +1 |
| u < 0, u even | `u := -u/2, s := 2s, r := -r` | +1 |
| u < 0, u odd | `v := (v+u)/2, u := -u, s := s-r, r := -2r` | +1 |

In GF(2^n) every `+`/`-` is XOR, `u` never becomes negative, and the table is
the plain polynomial almost-inverse loop. At the end `s = a^-1 2^k mod p` with
`s` in `[-2p, 2p]` (degree <= n+1 in GF(2^n)), and `n <= k <= 2n`.

**Reduction, pass A:** `u := s+p, v := s+2p`. GF(p): if `s < 0`, the new `s` is
`u`, or `v` if `u` is still negative. GF(2^n): if `s` has bit n+1, the new `s`
is `v = s + x p(x)`.

**Reduction, pass B:** `u := s-p, v := s-2p`. GF(p): take `v` if `v >= 0`, else
`u` if `u >= 0`, else keep `s`. GF(2^n): if `s` has bit n, take `u = s + p(x)`.

**Phase II:** `2n-k` modular doublings of `s` (now in `[0, p)`), several per
pass. With `b = bs(s)`:

* `b = n` (top bit set): `u := 2s - p`, `v := 2s - 2p`, one doubling;
* otherwise the top `n-b` bits are zero, so `t = min(3, n-b)` doublings fit
  in one pass: `u := 2^t s`, `v := 2^t s - p`;
* `t` is never larger than the number of doublings still owed.

The new `s` is `v` if `v >= 0`, else `u`. In GF(2^n) `u` is always the reduced
one and is always taken.

## Datapath and timing

```
            +-------------------------------------------------+
 host  ---> | register_block: u v r s (WORDS+1 words each), p |
            +-------------------------------------------------+
                 | word m of u,v,r,s,p        ^ word m-1 / word e
                 v                            |
            +-------------------------------------------------+
            | adder_block: 4 x word_slice                     |
            |   x,y operand mux -> bidir_shifter (<<0..3)     |
            |   -> wdfas (add/sub, carry reg; XOR in GF(2^n)) |
            |   -> bidir_shifter (>>0..3, one word late)      |
            +-------------------------------------------------+
                 | words written                 
                 v                               
            4 x flag_tracker (bit length, sign, low 3 bits)
                 |
            main_control (init + Phase I) / phase2_control (reduction + Phase II)
```

* **Operand format.** Each variable holds words `0..e-1` plus a top word `e`.
  The top word carries what does not fit in `n` bits: the two extra bits and
  sign of `r` and `s` (range `[-2p, 2p]`), the sign of `u`, and bit `n` of
  `p(x)`. All values are sign-extended into the top word.
* **One pass = e+1 clocks.** In clock `m` (m = 0..e) every slice reads word `m`
  of its operands. A right shift needs the low bits of the next word, so a
  slice writes result word `m-1` in clock `m`, and word `e` together with word
  `e-1` in the last clock. Left shifts and additions use the same timing.
  Reads therefore never see a word already overwritten, even when a slice
  writes the register it reads.
* **Flags.** While a result streams out, a flag tracker builds its bit length
  (last non-zero word index times W plus the bit length of that word), its
  low three bits (from word 0) and its sign (top bit of word e). They are
  committed in the last clock. At clock 0 of the next pass the controller
  chooses the opcode from them combinationally, so there are no idle clocks
  between passes.
* **Where s lives.** The reduction passes and Phase II compute two candidates
  into `u` and `v` at once. The right one is known only after the pass, from
  the signs. Instead of a copy pass, `phase2_control` keeps a pointer `s_loc`
  to the register that now holds `s`. The operand source `SRC_S` and the
  result read port both follow it.
* **Latency.** From the clock that samples `start` to the one that raises
  `done`: `(e+1) * (3 + ph1_iters + ph2_iters) + 4` clocks. The three extra
  passes are initialisation and the two reduction passes. The 4 extra clocks
  are start, two controller hand-overs and done.

Measured with 32-bit words over random primes (`tb_workloads`, 100 inversions
per size):

| n | mean k | mean clocks |
|---|---|---|
| 160 | 228 | ~1490 |
| 192 | 275 | ~2090 |
| 224 | 318 | ~2780 |
| 256 | 364 | ~3630 |

For GF(2^163) and GF(2^233), k/n is about 1.7.

## Interface of `mont_inverter`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `ld_we, ld_sel, ld_idx, ld_data` | in | while idle: write word `ld_idx` of `p` (`ld_sel=0`) or `a` (`ld_sel=1`) |
| `start` | in | one-clock pulse while idle; `fsel`, `n_bits` must stay stable until `done` |
| `fsel` | in | 0: GF(p), 1: GF(2^n) |
| `n_bits` | in | `n`: bit length of p (its top bit must be bit n-1), or degree of p(x) |
| `busy`, `done` | out | running; one-clock pulse when the result is ready |
| `rd_idx` / `rd_data` | in/out | combinational read of word `rd_idx` of the result |
| `k_out`, `ph1_iters`, `ph2_iters` | out | k, and the number of passes of each phase |

Load words `0..e` of both operands; the top word is 0 except for `p(x)` when
`n` is a multiple of W. Preconditions: `gcd(a, p) = 1` and `a != 0`. In GF(p),
`p` is odd and `a < p`. In GF(2^n), `p(0) = 1` and `deg a < n`. Results are
undefined otherwise. Parameters: `W` word width (default 32), `WORDS`
maximum words (default 5, i.e. n <= 160).

## Files

| file | contents |
|---|---|
| `rtl/inv_pkg.sv` | slice configuration, flag and opcode types |
| `rtl/wdfas.sv` | W-bit dual-field adder/subtracter |
| `rtl/bidir_shifter.sv` | word-serial shifter, left or right by 0..3 |
| `rtl/word_slice.sv` | shifter + WDFA/S + shifter, one per variable |
| `rtl/adder_block.sv` | four slices and their operand multiplexers |
| `rtl/register_block.sv` | u, v, r, s, p storage |
| `rtl/flag_tracker.sv` | bit length / sign / low bits of written results |
| `rtl/main_control.sv` | initialisation and Phase I |
| `rtl/phase2_control.sv` | reduction passes and Phase II |
| `rtl/mont_inverter.sv` | top level |
| `tb/inv_ref_pkg.sv` | reference arithmetic: gcd, polynomial arithmetic, Miller-Rabin, behavioural model of the algorithm |
| `tb/tb_<block>.sv` | self-checking test of each block |
| `tb/tb_mont_inverter.sv` | 600 random inversions at W=8, up to 32 bits, with a coverage count of every mechanism |
| `tb/tb_mont_inverter_full.sv` | default size (W=32, 160 bits), both fields |
| `tb/tb_workloads.sv` | 160/192/224/256-bit primes and degree-163/233 polynomials on an 8-word instance |

Every testbench checks results against arithmetic that does not use the RTL.
For the inverter, that means `b*a mod p` or `b(x)a(x) mod p(x)`. The testbenches
also check `k`, the pass counts and the exact clock count against the
behavioural model.

## Simulating

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/inv_pkg.sv tb/inv_ref_pkg.sv \
          tb/tb_mont_inverter.sv --top-module tb_mont_inverter
./obj_dir/Vtb_mont_inverter
```

To run another test, replace the testbench file and the top-module name.
`-y` lets verilator find each module in the file of the same name.
`-Wno-fatal` keeps width warnings from the testbenches' random stimulus from
stopping the build. Each testbench ends with `TB_RESULT checks=N failures=M`.
The full 160-bit test and the workload test each take well under a minute.

## Departures and design choices

* **Top word.** Registers have `WORDS+1` words. The extra top word is how this
  design stores the bits beyond `n` that `r` and `s` need. It is processed in
  the same (e+1)st clock in which the last result word is written back, so
  the e+1 clocks per iteration are kept.
* **Modulus register.** A separate register keeps `p`, because Phase II needs
  it after `u` has reached 0.
* **Four full slices.** Two of them stand in for the negators of a minimal
  design. Each slice has its own carry and shift registers.
* **Three-bit shifting in Phase I** applies to the `u even` and `v even`
  steps. The negative-`u` even step shifts by one bit.
* **Phase II, top bit set.** When `s` has its top bit set, the step is
  `u := 2s - p`, `v := 2s - 2p`, as in the one-bit Phase II. This is the reading
  that keeps the result reduced.
* **GF(2^n) multibit Phase II.** Shifts are chosen from the same bit-length
  test; both candidates are always reduced and `u` is always taken.
* **GF(2^n) final reduction.** It is split over the two reduction passes:
  pass A removes bit n+1, pass B removes bit n.
* **Operand loading and result reading.** The host load port, the read port,
  `start`/`done` and the asynchronous reset are this design's own interface.
* **Control overhead.** There are 4 clocks of controller overhead per inversion
  on top of the `(e+1)` clocks per pass.
* **Not reproduced.** Gate counts and delays come from a commercial 0.18 um
  flow and are not reproduced here. Competing inversion algorithms and the
  Montgomery multiplier used for comparison are outside this design.
* **Unused outputs.** `phase2_control` never drives the `r` slice, so those
  configuration bits are constant by design.
