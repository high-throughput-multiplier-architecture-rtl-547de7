# HTCC elliptic-curve point multiplier over GF(2^m)

This is an elliptic-curve scalar multiplier for binary curves. It computes
`G = s·R` for a point `R` on `q² + p·q = p³ + x·p² + y` over GF(2^M), and it
consumes **one key bit per clock cycle**. A 163-bit multiplication takes
exactly 163 cycles, and 233- or 283-bit ones take 233 or 283 cycles. Each
cycle, one large combinational block computes both candidates of a
double-and-add step at once: the doubling `2G` and the sum `2G + R`. The key
bit then picks one. This is the "high-throughput concurrent computation"
(HTCC) idea from the article *High Throughput Multiplier Architecture for
Elliptic Cryptographic Applications*, which this RTL implements. Points are
kept in projective coordinates, so no field inversion happens anywhere in the
loop.

The default configuration is GF(2^163) with the NIST pentanomial. A single
parameter `M` selects 233 or 283 bits; `nist_poly()` then supplies the NIST
reduction polynomial for that field.

## Coordinates and group formulas

An affine point `(p, q)` is held as `(A, B, C)`, with `p = A/C²` and
`q = B/C³`. The affine point enters as `(p, q, 1)`. Any triple with `C = 0` is
the point at infinity; the accumulator starts as `(1, 1, 0)`.

**Doubling (first group operation, FGO)**, `htcc_point_double`:

```
C3 = A1·C1²
A3 = A1⁴ + y·C1⁸
B3 = A1⁴·C3 + (A1² + B1·C1 + C3)·A3
```

This uses 5 multiplications and 5 squarings. A point with `C1 = 0` doubles to
a point with `C3 = 0`, so infinity needs no special handling here.

**Addition (second group operation, SGO)**, `htcc_point_add`:

```
T  = A1·C2² + A2·C1²          K = B1·C2³ + B2·C1³
C3 = C1·C2·T
A3 = x·C3² + K·(K + C3) + T³
B3 = (K + C3)·A3 + C1²·T²·(K·A2 + B2·C1·T)
```

This uses 15 multiplications and 5 squarings. Both formula sets were checked
against textbook affine arithmetic (see *Verification*).

## One key bit per cycle

```
            +---------------- accumulator G (htcc_acc_register) <------------+
            |                                                               |
            v                                                               |
   htcc_group_unit:  2G ---------------------------------> FGO ---+         |
                      |                                           |  mux1   |
                      +--> 2G + R --> SGO --+                     +--(key)--+--> register panel
                           (T, K)           |  mux2                |             G_P G_Q G_R
   htcc_preprocess: 1R --------------------(00)                    |
                    2R --------------------(01)--> SGO' -----------+
                           SGO ------------(10)
                      htcc_select_logic picks 00/01/10
```

* The **counter** (`htcc_counter`) handles `start`. In that cycle it asserts
  `load`, which captures the key, the curve constants and the base point, and
  clears `G` to infinity. It then steps the key bit index from `M-1` down to
  0, one index per cycle, and pulses `done` after the last step.
* The **pre-processing box** (`htcc_preprocess`) converts the affine base
  point to `1R = (p, q, 1)`. It also computes `2R` with a second doubling unit
  on the load cycle. Both are held in registers for the run.
* The **combined group block** (`htcc_group_unit`) doubles `G` and adds `R`
  to the result, all within the same cycle.
* **mux1** (`htcc_mux1`) keeps `2G + R` when the key bit is 1 and `2G` when it
  is 0. This is left-to-right double-and-add: `G = 2G; if s[j] then G = G + R`.
* The chosen point is written back to the **accumulator**. In the last step it
  is also written to the **register panel** (`htcc_register_panel`), whose
  outputs `g_p`, `g_q`, `g_r` are the `A`, `B`, `C` of the result.

Every key bit costs the same one cycle, so the run time does not depend on the
key.

## Where the addition formula breaks, and what 1R/2R are for

This part of the design is the least obvious. The projective addition formula
is only valid for two finite, distinct points. The loop meets two situations
where it fails, and `htcc_select_logic` replaces the formula's output through
`mux2`:

| situation                        | how it is detected          | mux2 | substituted value |
|----------------------------------|-----------------------------|------|-------------------|
| `2G` is infinity (`G` still 0)   | `C` of `2G` is zero         | 00   | `1R` (0 + R = R)  |
| `2G = R`                         | `T = 0` and `K = 0`         | 01   | `2R` (R + R)      |
| `2G = −R`                        | `T = 0`, `K ≠ 0`            | 10   | formula gives `(K², K³, 0)`, a valid infinity |
| all other cases                  |                             | 10   | computed sum      |

The first case happens at the first set bit of every key, because the
accumulator starts at infinity. Keys with leading zeros work because doubling
infinity stays infinity. The `2G = R` case needs the running multiple `k` of
`R` to satisfy `2k ≡ 1` modulo the order of `R`. That cannot happen for keys
below the order of `R`, but it does happen for larger keys, for example with a
base point of small order. The end-to-end test triggers it with a base point of order three.

The architecture names the pre-processing box with its `1R` and `2R` outputs,
the three-input mux2 and a "select logic" block. It does not state the rule
that drives mux2. The rule above is this design's own: it is the one rule
under which those parts make the multiplier correct for every key.

## Field arithmetic

* `gf2m_mul` is a combinational multiplier: MSB-first shift, add and reduce,
  fully unrolled (`M` steps). Each step multiplies the partial product by `p`,
  folds the bit leaving position `M-1` back in with the reduction tail, and
  adds `m_in` if the current bit of `n_in` is set.
* `gf2m_sqr` is a linear squarer. It spreads the bits to the even positions,
  then reduces the upper half from the top down.
* `htcc_pkg::nist_poly(M)` returns the polynomial tail (`h(p) − p^M`):
  * `M = 163`: `p⁷ + p⁶ + p³ + 1`
  * `M = 233`: `p⁷⁴ + 1`
  * `M = 283`: `p¹² + p⁷ + p⁵ + 1`

  For any other `M`, pass `POLY` explicitly.

## Interface and timing (`htcc_point_mult`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle request, honoured only while `busy` is low |
| `key` | in | M | scalar `s` (captured at start) |
| `base_p`, `base_q` | in | M | affine base point `R` (captured at start) |
| `curve_x`, `curve_y` | in | M | curve constants, `curve_y ≠ 0` (captured at start) |
| `busy` | out | 1 | high for the M step cycles |
| `done` | out | 1 | one-cycle pulse; the result is valid from this cycle on |
| `g_p`, `g_q`, `g_r` | out | M | result `(A, B, C)`; `g_r = 0` means infinity |

`done` rises M clock edges after the edge that sampled `start`. A new
multiplication may start in the same cycle `done` is high. The result stays
in the panel until the next multiplication completes. To get the affine
point, compute `p = g_p / g_r²` and `q = g_q / g_r³` outside the design.

## Cost and clock rate

The loop takes the one-cycle-per-bit schedule literally. The combined block
therefore holds 20 full-width multipliers, and the pre-processor's doubling
unit adds 5 more. Each multiplier is an `M × M` AND/XOR array, so at
`M = 163` this is roughly 25 × 26,500 AND gates plus as many XORs. The
critical path runs through about six multipliers in series, each `M` levels
deep. Expect a very large design with a low clock rate. The published
resource and frequency figures (a few thousand LUTs, about 200 MHz at 163
bits) are far below what this schedule needs. The published run times (about
3.7 µs at about 207 MHz for 163 bits) also correspond to roughly 770 clock
cycles, not 163. Treat those figures as
belonging to an implementation whose internal structure is not described.
This RTL reproduces the function and the cycle count, not those numbers. To
get a faster clock, pipeline or share the multipliers; that changes the
number of cycles per key bit.

## Files

| file | contents |
|------|----------|
| `rtl/htcc_pkg.sv` | sizes, reduction polynomials, mux2 select encoding |
| `rtl/gf2m_mul.sv`, `rtl/gf2m_sqr.sv` | field multiplier and squarer |
| `rtl/htcc_point_double.sv`, `rtl/htcc_point_add.sv` | FGO and SGO formulas |
| `rtl/htcc_group_unit.sv` | combined 2G / 2G + R block |
| `rtl/htcc_preprocess.sv` | 1R / 2R pre-processing box |
| `rtl/htcc_select_logic.sv`, `rtl/htcc_mux2.sv`, `rtl/htcc_mux1.sv` | candidate selection |
| `rtl/htcc_counter.sv` | run sequencing |
| `rtl/htcc_acc_register.sv`, `rtl/htcc_register_panel.sv` | accumulator and result registers |
| `rtl/htcc_point_mult.sv` | top level |
| `tb/htcc_ref_pkg.sv` | affine reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the NIST-curve test |

## Verification

Each testbench checks the design against `tb/htcc_ref_pkg.sv`. That package
implements the field and the curve with different algorithms: a schoolbook
product, Fermat inversion, and affine chord-and-tangent formulas. It compares
projective results by cross-multiplying (`A = p·C²`, `B = q·C³`). Random test
curves are built by drawing a point and the constant `x` at random, then
solving for `y`.

* `tb_htcc_point_mult` runs the top at its default size (163 bits). It covers
  random keys on random curves; keys 0, 1, 2, 3 and short keys; a base point
  of order three (which forces both degenerate cases); a start request during
  a run; inputs changing during a run; and back-to-back runs. Every latency
  must be exactly 163 cycles. The test counts how often each selection path
  was used and fails if one never was.
* `tb_htcc_point_mult_nist` runs the NIST curves B-163, B-233 and B-283 with
  one instance each, at `M = 163, 233, 283`. It uses a random key, the group
  order `n` (result must be infinity), `n−1` (must be `−G`) and `n+1` (must
  be `G`).
* There are unit testbenches for every other module.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/htcc_pkg.sv tb/htcc_ref_pkg.sv \
          tb/tb_htcc_point_mult.sv --top-module tb_htcc_point_mult
./obj_dir/Vtb_htcc_point_mult
```

Each testbench prints `TB_RESULT checks=N failures=F`. The full-size test
builds in about half a minute and runs in a few seconds.

## Choices made here

These points are not fixed by the architecture description and were decided
for this RTL:

* The doubling and the addition are chained inside one cycle. The addition
  takes `2G` as its input.
* The select-logic rule and the precomputation of `2R` (described above).
* The handshake (`start`/`busy`/`done`) and the asynchronous active-low reset.
* Operands are captured at start.
* The curve constants are run-time inputs, so any curve over the chosen field
  works.
* The result is left in projective coordinates. No inversion unit is
  included.
* Squarings use a dedicated linear squarer.
* The design is a plain double-and-add and offers no protection against side
  channels. Its cycle count is independent of the key, but its switching
  activity is not.
