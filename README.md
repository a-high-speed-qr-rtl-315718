# Householder QR decomposition processor for 4x4 MIMO, one matrix per clock

A MIMO receiver with a tree-search detector does not need the channel matrix `H` itself. It
needs an upper-triangular `R` and the rotated receive vector `Q'y` from a QR decomposition
`H = QR`. With five carrier-aggregated LTE-A bands and 4x4 antennas that is up to 72 million
decompositions per second. On top of that, closely spaced handset antennas give
ill-conditioned channels, where Gram-Schmidt loses orthogonality in fixed point.

This RTL computes the decomposition with Householder reflections, which remain stable in that
case. Three ideas keep the cost low:

1. **Only `R` and `Q'y` are produced.** Each reflection is applied to `y` as soon as it is
   known, so `Q` is never formed and never multiplied out.
2. **Real-valued decomposition, half the columns.** Each complex entry `a+ib` becomes the 2x2
   block `[a -b; b a]`, so the 4x4 complex problem becomes an 8x8 real one. The two columns of
   each pair are tied together: the even column is `J` times the odd one, where `J` maps every
   row pair `(a, b)` to `(-b, a)`. They stay tied through the transform. So only the four odd
   columns are ever carried, and the even columns of `R` are filled in at the output.
3. **Both reflections of a pair at once.** The second reflector of a pair is built directly
   from the first column's data (the `G` trick below). It does not wait for the first
   reflection to finish. One pipeline stage therefore eliminates a whole column pair.

The hardware is a systolic chain of `N = 4` stages, one per column pair. Each stage is a
column of arithmetic units followed by a register bank. The stages shrink by one unit each
(4, 3, 2, 1 matrix columns), because each pair leaves fewer columns behind. A new matrix enters
every cycle, and its result leaves `N` cycles later.

## Interface (`qrd_top`)

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears the valid flags only) |
| `in_valid` | in | 1 | `h_*`/`y_*` carry a new problem this cycle |
| `in_ready` | out | 1 | the problem is taken this cycle; always 1 unless folded |
| `h_re[N][N]`, `h_im[N][N]` | in | 13-bit signed, 12 fraction bits | `H[row][col]`, entries in [-1, 1) |
| `y_re[N]`, `y_im[N]` | in | same | receive vector |
| `out_valid` | out | 1 | result present, exactly `N` cycles after `in_valid` (`N*(FOLD+1)` when folded) |
| `r[2N][2N]` | out | 32-bit signed, 20 fraction bits | real `R`, zero below the diagonal |
| `qty[2N]` | out | same | `Q'y` |

Real row `2i` / `2i+1` stands for the real / imaginary part of complex row `i`. The same goes
for columns. `R` keeps the 2x2 block structure: `r[2k][2c+1] = -r[2k+1][2c]` and
`r[2k+1][2c+1] = r[2k][2c]`. Its diagonal pairs are equal, `r[2k][2k] = r[2k+1][2k+1]`, and
`r[2k][2k+1] = 0`. The output has no back-pressure. A result is valid for one cycle only.

## One stage, step by step (`hh_stage`, `hh_pivot`, `hh_update`)

A stage receives the `NC` unreduced odd columns, each with `M = 2*NC` rows (pivot column
`x1` first), and the same `M` rows of `y`. The pivot unit `hh_pivot` computes:

```
alpha = sign(x1[0]) * ||x1||                    (sign(0) = +1)
v1    = x1 + alpha*e0         d1 = alpha*(alpha + x1[0])    (= v1'v1 / 2)
G     = -x1[1] / (alpha + x1[0])
z     = J*x1 - G*v1           (the even column after reflection 1; z[0] = 0)
v2    = z, with v2[0] = 0 and v2[1] = z[1] + alpha
d2    = alpha*(alpha + v2[1]) (= v2'v2 / 2)
```

The shortcut rests on two facts. The even column `J*x1` is orthogonal to `x1`, so its dot
product with `v1` is just `alpha * (J*x1)[0] = -alpha*x1[1]`. That product is why `G` is the
whole first reflection of the even column. The even column also has the same length as `x1`,
so its second reflector reuses `alpha`, and that sign is the numerically safe one. The stage's
diagonal of `R` is `-alpha` in both rows of the pair. Note that `d2` is *not* equal to `d1` in
general: the lead element of `z` differs from `x1[0]`. So `d2` is computed separately.

Every other column and `y` goes through an `hh_update` unit. It applies
`c <- c - v*((v'c)/d)` with `v1`, then with `v2`. Dot products are accumulated at full product
width and rounded once. Rows 0 and 1 of each result are final rows of `R` (or entries of
`Q'y`). Rows 2 and up feed the next stage. The pivot column's own result is known in advance,
`(-alpha, 0, ...)`, and is not computed.

**Pivot normalisation.** A reflector does not change when its column is scaled. So `hh_pivot`
first shifts the pivot column left by a power of two (0 to 16 bits, from a leading-zero count)
until its largest entry is at least 0.5. `v1`, `v2` and the reciprocals all describe the
shifted column, and only `-alpha` is shifted back. Without this, `1/d` overflows the word for
the tiny last pivots of channels with condition number in the hundreds.

The arithmetic units `fx_sqrt` (digit-by-digit square root) and `fx_div` (restoring
division, saturating, `x/0 = 0`) are combinational. A zero pivot column therefore gives
`v = 0`, and its reflection becomes the identity.

## Pipeline and alignment (`qrd_top`, `delay_line`)

Stage `k` (0-based) handles pair `k` and holds `N-k` odd columns of `2(N-k)` rows. It emits
rows `2k` and `2k+1` of `R` and of `Q'y` one cycle after it receives its data. The rows of
stage `k` then pass through `N-1-k` more register banks (`delay_line`), so a complete `R` and
`Q'y` appear together. The output logic fills in the even columns from the pair rule.
Latency is 4 cycles, throughput 1 decomposition per cycle. A 72 MHz clock therefore gives
72 M decompositions/s, and 15 MHz gives the 15 M/s needed without carrier aggregation.

## Folding (`FOLD`)

The default, `FOLD = 1`, is the fully unfolded pipeline described above. Setting `FOLD = F > 1`
on `qrd_top` (or in `qrd_pkg`) trades area for clock rate. It keeps the same throughput per
second, but the clock must be `F` times faster:

- Each stage keeps its pivot unit, but has only `ceil(NC/F)` column units instead of `NC`.
- When a stage takes an input, it copies the input into a hold register. Over the next `F`
  cycles it feeds the column units the columns (and `y`) in groups: group `f` is vectors
  `f*U .. f*U+U-1`.
- The stage raises `out_valid` for one cycle after the last group. Its output columns are
  only guaranteed in that cycle.
- `in_ready` is high when the stage is idle or in its last group. An input is accepted at a
  clock edge where `in_valid` and `in_ready` are both high. The source must hold `in_valid`
  and the data until then.
- One matrix is accepted every `F` cycles. Latency is `N*(F+1)` cycles, because each stage
  spends one cycle capturing its input.
- The later stages are never overrun, since each frees itself at the rate the one before it
  delivers. An assertion in `qrd_top` checks this.

A folding factor of 3 at 225 MHz gives 75 M decompositions/s, which covers the 72 M/s target.

## Number format

All internal values are Q11.20: 32-bit two's complement with 20 fraction bits (`qrd_pkg`:
`WD`, `FR`). Products are truncated. Column norms of the 8x8 real matrix stay below 3, so the
integer range is mostly headroom for the reciprocals. The 13-bit input width is the one
shown to give near floating-point results. The internal width is a choice made for this
RTL, not a measured optimum.

## Departures and limits

- The even columns are never computed. They are derived from the odd ones, which is exact
  because the combined transform of each pair keeps the block structure.
- `d2` is computed from `v2` itself rather than taken equal to `d1` (see above).
- The architecture counts 4, 3, 2 and 1 arithmetic units in the four stages, one per complex
  column still in play. Here each stage also has a column unit for `y`, so in RTL terms the
  stages hold 5, 4, 3 and 2 units (pivot unit included).
- Pivot normalisation, the Q11.20 format, truncating rounding, reset and valid behaviour
  are choices of this implementation.
- Each stage is one combinational cloud between register banks, with one square root and
  three divisions in series with two dot-product updates. That matches one result per clock
  but makes a long critical path. Meeting 72 MHz in a real process may need the stage split
  into more pipeline cuts. The latency counted in the testbenches would then change.
- The folded variant's schedule is this implementation's own (see *Folding*). The pivot
  unit is never folded, only the column units are.
- `Q` is not available, by design.

## Files

| file | contents |
|---|---|
| `rtl/qrd_pkg.sv` | sizes (`N`, `IN_W`, `WD`, `FR`), fixed-point type, multiply helpers |
| `rtl/fx_sqrt.sv`, `rtl/fx_div.sv` | square-root and division units |
| `rtl/hh_pivot.sv` | reflector pair generation for one column pair |
| `rtl/hh_update.sv` | applies both reflectors to one column or to `y` |
| `rtl/hh_stage.sv` | one systolic stage with its register bank, unfolded or folded |
| `rtl/delay_line.sv` | register-bank chain for output alignment |
| `rtl/qrd_top.sv` | real-valued decomposition, stage chain, output assembly |
| `tb/qrd_ref_pkg.sv` | floating-point textbook Householder QR used as reference |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_qrd_cond`, `tb_qrd_fold` and `tb_qrd_scale` |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by itself (each has a
cycle watchdog). With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qrd_pkg.sv tb/qrd_ref_pkg.sv \
    tb/tb_qrd_top.sv --top-module tb_qrd_top -Mdir obj -o sim && ./obj/sim
```

(`-y rtl -y tb` lets Verilator find the other modules by file name.) Tests:

- `tb_qrd_top`: 400 random channels at full size (no parameter overrides), in bursts with
  idle cycles. Every `R` and `Q'y` entry is compared with a floating-point Householder QR of
  the full 8x8 real matrix. It also checks that latency is exactly 4 cycles and that
  back-to-back inputs give back-to-back results. It counts that back-to-back results, idle
  inputs, positive, negative and zero pivot lead elements all occurred. The largest error
  seen is about 3e-5.
- `tb_qrd_fold`: the same test on `qrd_top` with `FOLD = 3`. It checks results 3 cycles apart
  and a latency of 16 cycles, and counts inputs held off by `in_ready`.
- `tb_qrd_cond`: channels `U*diag(1, s, s^2, 1/kappa)*W` with random unitary `U`, `W` and
  condition numbers 10, 200, 400, 600 and 800. These are checked through identities that need
  no reference: `R'R = H'H`, `R'(Q'y) = H'y` and `||Q'y|| = ||y||`. Each entry is within
  2e-3, and the mean squared error of `R'R` is about 1e-12.
- `tb_qrd_scale`: the same test with `N = 3` (a 3x3 complex channel, three stages). It shows
  that the chain, the alignment and the pair rule scale with `N`.
- `tb_hh_stage`: one stage, unfolded and with `FOLD = 3`, against two steps of the reference
  QR. It includes the folded handshake timing.
- `tb_hh_pivot`, `tb_hh_update`, `tb_fx_sqrt`, `tb_fx_div`, `tb_delay_line`: unit tests
  against floating-point arithmetic.

To change the word format, edit `WD` and `FR` in `qrd_pkg`. `N` is a parameter of `qrd_top`,
and the stages size themselves from it. The reference package handles real sizes up to 8
(`MAXR`), which limits the testbenches, not the RTL.
