# Programmable n-bit pseudo-random sequence generator

This is a small linear feedback shift register (LFSR) whose feedback polynomial
can be changed while it runs. Two inputs choose it. The word length `n` (2 to
16) sets the degree of the polynomial. The 3-bit pattern selector `s` picks one
of eight polynomials of that degree. That gives 120 polynomials in all. The
generator puts out one `n`-bit word per clock. After a reset it starts from the
all-zero word and comes back to it after a fixed number of clocks, the
*period*. The period depends on the polynomial. It is `2^n - 1` when the
polynomial is primitive and shorter when it is not.

Possible uses are test-pattern generation, scramblers and spreading codes. It
also gives a cheap way to get sequences of several different lengths from one
piece of hardware.

## Structure

```
             +--------------------- feedback network ----------------------+
             |  8 XNOR gates; gate p reads the stages tapped by            |
             |  polynomial (n, p) and outputs the complement of their      |
             |  parity                                                     |
             +--+--------------------------------------------------^------+
          fb[7:0]                                                  | d0..d15
                |                                                  |
            +---v---+     +----+   +----+   +----+         +-----+ |
   s[2:0] ->| 8 x 1 |---->| d0 |-->| d1 |-->| d2 |-- ... ->| d15 | |
            |  mux  |     +----+   +----+   +----+         +-----+ |
            +-------+        all 16 stages shift on every clock ----+
```

| Part | Module | What it does |
|---|---|---|
| Register | `prsg_shift_reg` | 16 D flip-flops. On each rising edge, `d0` takes the mux output and every other stage takes the stage before it. |
| Feedback network | `prsg_feedback` | 8 XNOR gates. For each pattern `p`, it forms the feedback bit of polynomial (`n`, `p`) from the current register word. |
| Pattern mux | `prsg_mux8` | An 8-to-1 mux. It passes the feedback bit chosen by `s` into `d0`. |
| Polynomial table | `prsg_pkg` | The 15 x 8 tap masks, plus the types and constants that the modules share. |
| Top | `prsg_top` | Wires the three parts together and masks the output to `n` bits. |

## How a polynomial becomes taps

`prsg_pkg::TAP_MASK[n][s]` holds each polynomial as a 16-bit mask:

* A term `x^k` (1 ≤ k ≤ n) sets mask bit `k-1`. That makes stage `d(k-1)`
  one input of the XNOR gate.
* The constant term `1` is not a tap. It stands for the gate's output, which
  goes into `d0`.
* The gate's output is the complement of the parity of all its taps.
  Inverting an XOR of the taps gives this result, and so does an even number
  of 2-input XNORs.

Example: `n = 5`, `s = 0` is `x^5 + x^3 + x^2 + x + 1`. Its taps are `d4`,
`d2`, `d1` and `d0`, so the mask is `5'h17` and `d0_next = ~(d4 ^ d2 ^ d1 ^ d0)`.

Because the feedback is XNOR and not XOR:

* The all-zero word is an ordinary state, so it can serve as the reset value.
  The first word after reset has `d0 = 1`.
* The lock-up word is all ones in the `n` active stages. It maps to itself.
  A sequence that starts from reset never reaches it.
* The `x^n` term is always a tap, so the next-state map is a permutation. The
  sequence from reset is therefore a pure cycle with no lead-in. "Period"
  below means the length of that cycle, counting the zero word.

### The 120 polynomials

For each `n`, the eight polynomials follow a pattern. Many are not primitive,
so their periods vary widely. The table below lists the selector values that
give the full period `2^n - 1`:

| n | s with period 2^n - 1 |
|---|---|
| 2 | all eight (every entry is `x^2+x+1`) |
| 3 | 0, 1, 3, 4, 6 |
| 4 | 2, 4, 6 |
| 5 | 0, 5, 6, 7 |
| 6 | 0 |
| 7 | 4, 6, 7 |
| 8 | 0 |
| 9 | 4 |
| 10 | 6 |
| 11 | 0, 5 |
| 12 | none (the longest is s = 2, period 3810) |
| 13 | 0 |
| 14 | none (the longest is s = 3, period 16382) |
| 15 | 4 |
| 16 | none (the longest is s = 6, period 57337) |

All other entries give shorter cycles. Examples are period 8 for `n = 5, s = 1`
and period 60 for `n = 16, s = 4`. The table is kept exactly as it was
published, including the entries that are not primitive, because the design
is meant to offer sequences of different lengths. `tb/tb_prsg_ref_pkg.sv`
lists every polynomial and its period.

The published period for `n = 16, s = 3` (`x^16 + x^14 + x^11 + 1`) is 2045.
That polynomial, wired the same way as the other 119 entries, has a period of
2046. All 119 other entries match their published periods exactly. The RTL
keeps the polynomial as printed, and the testbench expects 2046.

### Worked example, n = 5

Here are the words from reset, written as `q[0:4]` in hex with `q[0]` as the
most significant bit:

| s | polynomial | period | words |
|---|---|---|---|
| 0 | x^5+x^3+x^2+x+1 | 31 | 00 10 08 04 02 11 18 1C 0E 17 0B 15 0A 05 12 09 14 1A 1D 1E 0F 07 13 19 0C 16 1B 0D 06 03 01 |
| 1 | x^5+x^4+x+1 | 8 | 00 10 08 14 0A 05 02 01 |
| 4 | x^5+x+1 | 21 | 00 10 08 14 0A 15 1A 0D 06 13 19 1C 0E 17 1B 1D 1E 0F 07 03 01 |

`tb_prsg_top` checks all eight `n = 5` sequences word for word.

## Interface and timing (`prsg_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Clock. One word per rising edge. |
| `rst` | in | 1 | Synchronous reset, active high. The register becomes all zeros on the next edge. |
| `n` | in | 5 | Word length. Values below 2 run as 2 and values above 16 run as 16. |
| `s` | in | 3 | Pattern selector. |
| `q` | out | [0:15] | The register word. `q[i]` is stage `d(i)`. Bits `q[n]` to `q[15]` read 0. |

`q` is declared with an ascending range, `[0:15]`. Read as a vector, `q[0]`
is then its most significant bit. For `n = 5`, the 5-bit number `q[0:4]` is
the usual hex word (00, 10, 08, ...).

Timing:

* While `rst` is high, `q` is 0.
* The first edge after `rst` falls loads the first word. For every
  polynomial, that word has only `q[0]` set.
* Each later edge loads the next word.
* After one period, `q` is 0 again and the cycle repeats.
* `n` and `s` are used every cycle. Changing either without a reset lets the
  generator continue from the current register word with the new polynomial.
  Whether it then lands on that polynomial's reset cycle depends on the word.
  Assert `rst` for one clock when a known sequence is needed.

All 16 stages always shift, including those beyond `n`. Their contents never
reach the feedback, and the output hides them.

## Choices made in this design

The original description fixes the structure: 16 flip-flops, eight XNOR
feedback gates, an 8x1 mux in front of `d0`, and the 120 polynomials with their
periods. It also fixes the signal names `clk`, `rst`, `n`, `s` and `q[0:n-1]`.
These points are this design's own choices:

* Reset is synchronous and active high, and it clears to zero.
* `n` is 5 bits wide, and values outside 2..16 are clamped.
* Output bits beyond the word length are forced to 0.
* The feedback network is a constant tap table ANDed with the register word,
  followed by a reduction XNOR. The original only shows the gates for
  `n = 5`.
* The period of `n = 16, s = 3` follows the printed polynomial (2046), not the
  printed length (2045).

Published silicon results are not reproduced here: a 45 nm layout of
174.078 µm² drawing 0.1096 mW at 1.08 V. They depend on the cell library and
the place-and-route flow, not on the RTL.

## Verification

Every testbench checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_prsg_mux8` | Every input word with every selector value (2048 checks). |
| `tb_prsg_shift_reg` | A random bit stream. Every stage is checked each cycle against the bit that entered `i+1` clocks earlier. Also checks that reset takes effect only at the edge. |
| `tb_prsg_feedback` | All 32 port values of `n` (clamping included). For each, 300 register words, including all zeros and all ones, and all eight feedback bits. |
| `tb_prsg_top` | End to end at the default size. See the list below. |

`tb_prsg_top` runs in this order:

1. The eight published `n = 5` sequences, word by word.
2. Every one of the 120 polynomials from reset until the word returns to zero.
   Each word is compared with a reference model, and each period with the
   published length.
3. Forty pattern and word-length switches without a reset, plus a reset in
   the middle of a sequence.
4. Out-of-range `n` values (0, 1, 17, 24 and 31).

It counts each of these mechanisms and fails if one never happened. It runs
about 330,000 checks over about 300,000 clocks and finishes in about two
seconds.

The reference data is in `tb/tb_prsg_ref_pkg.sv`. It holds the polynomials as
exponent lists, the periods and the `n = 5` sequences. It is written
independently of the tap masks in `rtl/prsg_pkg.sv`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/prsg_pkg.sv tb/tb_prsg_ref_pkg.sv rtl/prsg_*.sv tb/tb_prsg_top.sv \
    --top-module tb_prsg_top -Mdir obj_top -o sim
./obj_top/sim
```

For another testbench, replace `tb_prsg_top` with `tb_prsg_feedback`,
`tb_prsg_mux8` or `tb_prsg_shift_reg`.

## Changing it

* **Different polynomials.** Edit a row of `TAP_MASK` in `rtl/prsg_pkg.sv`,
  using bit `k-1` for each term `x^k`. Then update the matching
  `POLY`/`CYCLE_LEN` entries in `tb/tb_prsg_ref_pkg.sv`.
* **More patterns per length.** Raise `NUM_PATTERNS` and add columns to the
  table. The mux is a plain indexed select, and `pattern_t` widens with
  `NUM_PATTERNS`. The mux module's name still says 8.
* **Longer registers.** `prsg_shift_reg` takes any `WIDTH` of 2 or more. The
  package's `N_MAX`, `word_len_t` and `TAP_MASK` must grow with it.
