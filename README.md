# Pipelined numerical function generator with non-uniform piecewise polynomials

This RTL computes a fixed numerical function `y = f(x)`, such as `cos(pi*x)`,
`sqrt(x)` or `1/x`, to full `N`-bit accuracy, with one result per clock cycle.
Storing `f` directly would need a table of `2^N` words. Instead, the domain of
`x` is cut into segments, and on each segment `f` is replaced by a polynomial of
order `K`. The segments are **non-uniform**: each one is as wide as the error
budget allows, so flat parts of the function need few segments and steep parts
get more. The cost is a circuit that turns `x` into its segment number. Here that
circuit is an **LUT cascade**: a chain of small lookup tables that reads `x`
a few bits at a time.

The default build evaluates `cos(pi*x)` for `0 <= x <= 1/2` with 24-bit input
and output and second-order polynomials. The domain needs 74 segments, and the
table holds 128 of them. Every one of the 2^22 + 1 inputs in the domain is
within 2^-23 (one output LSB) of the exact value. This has been checked
exhaustively in simulation.

## Datapath

```
 x ──┬──────────────────────────────────────────────┐
     │                                              │ (delayed)
     ▼                                              ▼
 segment index encoder ── i ──► coefficients table ──► -q_i ──► adder: d = x - q_i
 (LUT cascade, 8 LUTs)          (2^U words)                        │
                                 │ A_K(i) … A_0(i)                 │
                                 ▼                                 ▼
                  v = A_K ─► [ × d , + A_{K-1} ] ─► … ─► [ × d , + A_0 ] ─► round, saturate ─► y
                             horner_stage                horner_stage
```

The polynomial on segment `i` is written around the segment centre `q_i`. It is
evaluated by Horner's rule:

```
g(x, i) = ((c_K(i)·d + c'_{K-1}(i))·d + …)·d + c'_0(i),    d = x − q_i
```

This needs `K` multipliers instead of about `K²/2`. Because `q_i` is the centre
of its segment, `|d|` is at most half the widest segment. That is 2^15 input
LSBs at the defaults, so `d` is 16 bits wide instead of 24, and every multiplier
shrinks to match.

| module | role |
|---|---|
| `nfg_pkg` | default configuration and the number formats |
| `seg_index_encoder` | `x` → segment index, a pipelined chain of `lut_cell`s |
| `lut_cell` | one LUT of the cascade |
| `coef_rom` | `-q_i` and the scaled coefficients, one word per segment |
| `dx_adder` | `d = x + (−q_i)`, kept to `DW` bits |
| `horner_stage` | one multiplier and one adder of Horner's rule |
| `nfg_top` | everything wired together, with output rounding and a valid pipeline |

## Fixed-point formats

Inputs and outputs are two's complement with one integer bit. The value is
`code · 2^-(N-1)`, so the range is [-1, 1). An `N`-bit generator must be
accurate to `2^-(N-1)`.

The coefficients have very different magnitudes, because `c'_j` multiplies
`d^j`. So each one is stored with its own scale, chosen so that every Horner
step uses the **same** shift. Let `m = N-1`, `G` be the guard bits and
`DB = bits of max|d|`. Then:

* `A_j = round(c'_j · 2^(m + G + (DB − m)·j))`, with `d` counted in input LSBs;
* `v_K = A_K`, and `v_j = floor((v_{j+1}·d + 2^(DB−1)) / 2^DB) + A_j`;
* `y = saturate(floor((v_0 + 2^(G−1)) / 2^G))`.

`v_j` carries `m + G + DB·j` fraction bits. Each rounding step adds at most
`2^-(m+G+1)` to the final result, whatever `j` is. With `G = 4` and `K ≤ 3`,
the error budget splits as follows:

* `2^-(m+2)` for the polynomial approximation;
* `2^-(m+1)` for the final rounding;
* less than `2^-(m+2)` for the internal steps.

The total stays within `2^-m`. For `K = 4` and `5` this bound is not
guaranteed, but the included tables were checked exhaustively. All coefficients share one width `AW`, and all
partial results one width `VW`. Those widths, `DB` and `U` come from the table
that is in use. The defaults in `nfg_pkg` belong to the default table.

`cos(0) = 1` cannot be represented with one integer bit. Such outputs saturate to
`1 − 2^-m`, exactly one LSB from the true value.

## The segment index encoder

The index function maps `x` to the number of segment ends below `x`. It is a
monotone staircase with `T = 2^U` steps. The cascade reads `x` in offset binary
(sign bit inverted, so unsigned order equals numeric order), most significant
bits first:

* the first LUT reads the top `N − (NCELLS−1)·CELL_W` bits (10 at the defaults);
* each further LUT reads `CELL_W` (2) more bits, plus the *rails* from the LUT
  before it.

After the top `P` bits are known, `x` lies in a block of `2^(N−P)` codes. On
that block the rest of the staircase can only be one of two things:

* constant, equal to the index `b` of the block's first code; or
* the single block that starts in segment `b` and also contains the end of
  segment `b`.

There is at most one such block for each `b`. So the rails carry `{h, b}`:
`U + 1` bits, where `h` marks the second case. A LUT that receives `h = 0` only
passes `b` on. A LUT that receives `h = 1` knows which block it is in. That
block is the one holding segment end `e_b`, so the LUT can compute the index
and flag of each sub-block from the list of segment ends. The last LUT's `b` is
the segment index.

The LUT contents are therefore not stored. They are **computed when the ROMs
are initialised**, from the list of segment ends (`*_bnd.hex`). Any
non-uniform segmentation of up to `2^U` segments works without redesign. This
encoding is always valid. It is not claimed to be the smallest cascade for a
given segmentation: a decomposition tuned to one function can often do with
fewer rails. At the defaults the cascade holds 65,536 ROM bits in eight 1024 x 8 LUTs,
and the coefficient table holds 13,824. `CELL_W` trades cascade memory
against pipeline depth: `NCELLS = 5`, `CELL_W = 3` is three cycles shorter,
but it needs 98,304 bits.

## Timing and interface

`nfg_top` ports: `clk`, `rst_n`, `in_valid`, `x[N-1:0]`, `out_valid`, `y[N-1:0]`.

* One sample per cycle, no back-pressure.
* Latency `NCELLS + 3 + 2K` cycles (15 at the defaults):
  * one cycle per LUT;
  * one for the table read;
  * one for `d`;
  * two per Horner step (a register after the multiplier and after the adder);
  * one for rounding.
* With `U = 0` the first two items are absent and the latency is `2 + 2K`.
* `rst_n` is synchronous and active low. It clears only the valid pipeline; the
  data registers are not reset.
* Inputs outside the function's domain use the polynomial of the first or last
  segment. Their results are not meaningful.

## Tables and how to make new ones

Two files set the function. Both are read with `$readmemh`, by paths relative
to the directory the simulator runs in. The default is the project root:
`rtl/...`.

* `nfg_<f>_k<K>_n<N>_bnd.hex`: `2^U` lines. Line `i` holds the last input code
  of segment `i` in offset binary. The last line is unused.
* `nfg_<f>_k<K>_n<N>_coef.hex`: `2^U` words `{−q_i (N bits), A_K, …, A_0}`,
  with `A_0` in the least significant `AW` bits.

They were produced as follows:

1. **Segmentation, greedy from the left end of the domain.** A segment
   `[s, e]` is made as wide as possible while the Chebyshev error bound holds:
   `2(e−s)^(K+1) / (4^(K+1)(K+1)!) · max|f^(K+1)| ≤ 2^-(m+2)`.
   The end `e` is found bit by bit, from the most significant bit down.
2. **Split to a power of two.** The widest segment is halved repeatedly until
   there are `2^U` segments. This fills the table, which has `2^U` words
   anyway, and shortens `d`.
3. **Coefficients.** On each segment, `f` is interpolated at the `K+1`
   Chebyshev nodes. The result is re-expanded in powers of `(x − q_i)`, with
   `q_i = floor((s_i + e_i)/2)`, and scaled as described above.
4. **Check.** The datapath was modelled bit for bit and every input of the
   domain was checked. `AW` and `VW` were taken from the largest values seen.

A check on step 1: the published segment counts for 24-bit `√(−ln x)` on
(0, 1) and `arcsin(x)` on [0, 1), at orders 1 to 5, are reproduced exactly by
this segmentation with a budget of `2^-(m+2)`. For `√(−ln x)` the counts are
8230, 698, 213, 111 and 75; for `arcsin(x)` they are 3067, 256, 81, 45 and 31.
Neither function is among the included tables. Both leave the one-integer-bit
output range. Near their singular ends they also produce segments one or two
codes wide. There the common coefficient format described above would need
second-order coefficients of about 2^46.

Included tables:

| table set | function, domain | N | K | segments → words | DB | AW | VW | worst error |
|---|---|---|---|---|---|---|---|---|
| `cos_k2_n24` (default) | cos(πx), [0, 1/2] | 24 | 2 | 74 → 128 | 15 | 28 | 29 | 1 LSB (at saturation) |
| `cos_k1_n16` | cos(πx), [0, 1/2] | 16 | 1 | 110 → 128 | 7 | 20 | 21 | 1 LSB |
| `cos_k3_n24` | cos(πx), [0, 1/2] | 24 | 3 | 15 → 16 | 18 | 28 | 28 | 1 LSB |
| `cos_k4_n24` | cos(πx), [0, 1/2] | 24 | 4 | 6 → 8 | 19 | 28 | 29 | 1 LSB |
| `cos_k5_n24` | cos(πx), [0, 1/2] | 24 | 5 | 3 → 4 | 20 | 28 | 29 | 1 LSB |
| `sqrt_k2_n24` | √x, [1/32, 1) | 24 | 2 | 108 → 128 | 17 | 28 | 28 | 0.81 LSB |
| `recip_k2_n24` | 1/(1+x), [0, 1), i.e. 1/x on [1, 2) | 24 | 2 | 64 → 64 | 17 | 28 | 28 | 1 LSB |
| `cos_k5_n15` | cos(πx), [0, 1/2] | 15 | 5 | 1 → 1 | 13 | 20 | 20 | 1 LSB |
| `cos_k4_n11` | cos(πx), [0, 1/2] | 11 | 4 | 1 → 1 | 9 | 16 | 16 | 1 LSB |

**Choosing the order.** For 24-bit cos(πx) the segment count falls steeply
with the order: 1737 segments at first order (a 2048-word table), then 74, 15,
6 and 3 for orders 2 to 5. Each extra order adds a multiplier and an adder row
and two cycles of latency. A first-order 24-bit table is not included: its
2048-word coefficient file is much larger than the others.

To use another set, override `N, K, U, DB, AW, VW, BND_FILE, COEF_FILE` (and
optionally `NCELLS, CELL_W`) on `nfg_top`. The testbenches below do this.

**Single segment.** A low-accuracy, high-order generator may need only one
segment. For cos(πx) that happens up to 15 bits at fifth order and up to 11
bits at fourth order. Set `U = 0` for such a build:

* the encoder and the table are left out;
* the coefficients become constants, read once from the one-word
  coefficient file (no segment-end file is needed);
* the latency drops to `2 + 2K`.

## Verification

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=F`, and each has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_nfg_top` | default build, unmodified parameters. See below. |
| `tb_nfg_k1`, `tb_nfg_k3`, `tb_nfg_sqrt`, `tb_nfg_recip` | the other table sets, the same way (first and third order, other functions) |
| `tb_nfg_k4`, `tb_nfg_k5` | the single-segment builds (`U = 0`), the same way |
| `tb_nfg_k4_n24`, `tb_nfg_k5_n24` | fourth and fifth order at 24 bits (8 and 4 table words), the same way |
| `tb_lut_cell` | first and inner LUTs against the `{h, b}` encoding, worked out from the segment ends by linear search |
| `tb_seg_index_encoder` | index of every code next to a segment end and of random codes, 8-cycle latency, one input per cycle |
| `tb_coef_rom` | read port against the table file, increasing `q_i` |
| `tb_dx_adder` | `d = x − q_i` over the full `DW` range |
| `tb_horner_stage` | exact rounding arithmetic, 2-cycle latency |

`tb_nfg_top` applies every input of the domain, with random idle cycles. Each
output is checked against `cos(pi*x)` computed in double precision, with an
error of at most one LSB, and against the 15-cycle latency. The run must also
show that:

* all 128 segments were used;
* idle cycles occurred;
* the output saturated;
* full-rate runs longer than the pipeline occurred.

`tb_nfg_top` and the variant testbenches all run in a few seconds.

Simulate with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nfg_pkg.sv tb/tb_nfg_top.sv --top-module tb_nfg_top
./obj_dir/Vtb_nfg_top
```

## How this relates to the method it implements

Taken from the method:

* the architecture: an LUT-cascade segment index encoder, a coefficient table
  that also stores `−q_i`, an adder forming `x − q_i`, and `K` multiplier/adder
  rows in Horner form, fully pipelined;
* greedy non-uniform segmentation driven by the Chebyshev error bound;
* segments centred at `q_i`;
* a table of `2^u` words, filled by halving large segments;
* the accuracy target of `2^-(n-1)` for `n` bits;
* 24-bit precision with second-order polynomials as the main operating point;
* the benchmark functions.

This implementation's own choices:

* the rail encoding of the cascade, and its LUT sizes;
* computing the LUT contents at ROM initialisation;
* one common coefficient width and one shift per Horner step, instead of
  per-unit widths from a full error analysis;
* the error-budget split and `G = 4`;
* `q_i` rounded down to an input code;
* register placement and the valid signal;
* saturation at 1.0;
* the input offset used to express `1/x` on [1, 2) and the restriction of `√x`
  to [1/32, 1). The original domains need a second integer bit.

Limits to keep in mind:

* The cascade LUTs are filled by a loop in an `initial` block, over segment
  ends read with `$readmemh`. Simulators run this loop as written. Synthesis
  tools differ in whether they evaluate such a loop over file data. Check the
  ROM contents after synthesis. A flow that only accepts plain
  memory-initialisation files needs the contents written out instead.
* At the defaults the design needs about 19 M4K-sized (4.6 kbit) RAM blocks:
  16 for the cascade and 3 for the coefficients. It also needs about sixteen
  9x9 multiplier elements. These are estimates, not synthesis results.
* The tables are generated offline. Changing the function means new table
  files and the matching `DB/AW/VW/U` parameters.
* One shift of `DB` bits per Horner step suits functions whose segments are all
  of similar width. Functions with a singular end point need much wider
  coefficients in this format, or a per-segment scale, which is not built.
