# Folded, retimed bit-level FIR filter with a minimum-register input reorderer

This is an FIR filter built from a small number of shift-and-add rows instead of
full multipliers. The computation

    y(n) = sum_{j=0}^{kc-1} c_j * x(n - j)

uses `kc` coefficients of `mc` bits each. Split into single coefficient bits, it becomes a
chain of `L = kc * mc` elementary operations. Each operation is "AND one input word with one
coefficient bit, weight the result by that bit's `2^i`, and add it to a running sum". In a
plain semi-systolic array, each operation is one row of AND gates and full adders, so there
are `L` rows. This design *folds* the chain onto `K` rows. Each row runs `N` operations one
after another, so `L = K * N`. The filter then takes one input word and gives one output
every `N` clock cycles.

Folding the chain directly would need negative delays between some rows. The chain is
therefore *retimed* first. After retiming, no delay is needed anywhere between operations,
but the rows no longer all work on the same input sample: within one folding period they
use up to `K - kc + 1` different input words. A small **input reordering module** holds
these words. It uses the minimum number of registers: `K` words, the worst case at `kc = 1`.
Each row reads the one word it needs from it.

`kc` and `mc` can be changed at run time, as long as `kc * mc = K * N` and `mc >= N`. With
the default `K = N = 4`, the same hardware runs one 16-bit coefficient, two 8-bit
coefficients or four 4-bit coefficients. Coefficients can be rewritten while the filter
runs, for use as the datapath of an adaptive filter.

## The operation chain and how it is folded

Number the operations `p = 0 .. L-1`. Operation `p` handles:

* bit `i = p mod mc` of coefficient `j = p / mc` (integer division),
* and runs on row `s = p / N` in time slot `r = p mod N` of each folding period.

So row `s` runs operations `s*N .. s*N+N-1`, in order. Its register holds the running sum
from one slot to the next. In slot 0 it starts from the sum that row `s-1` finished in the
slot before. Row 0 starts from zero. The sum needs `K` folding periods to pass through all
rows. Row `K-1` finishes a complete output at the end of every period.

The coefficients are stored as one `L`-bit vector. Bit `p` of the vector is bit `i` of
coefficient `j`, that is, coefficient `j` sits in bits `[j*mc +: mc]`. This layout does not
depend on `mc` in the way that matters: row `s` in slot `r` always reads bit `s*N + r`.

## Retiming: which input word each row uses

In the unfolded chain, each coefficient boundary carries one sample delay. That delay is
what makes coefficient `j` meet an older sample than coefficient `j+1`. Folding puts one
register (the row register) after every operation. It also requires this for each edge
between operations `U` and `V` with folding slots `u` and `v`:

    D = N*w - 1 + v - u >= 0

Here `w` is the edge's delay. This gives:

| edge p -> p+1 | D | retiming constraint r(p) - r(p+1) <= |
|---|---|---|
| inside a row, no coefficient boundary | 0 | 0 |
| row boundary (p mod N = N-1), no coefficient boundary | -N (infeasible) | -1 |
| coefficient boundary inside a row | +N | +1 |
| both boundaries together | 0 | 0 |

One solution is:

    r(p) = floor((L-1-p)/mc) - floor((L-1-p)/N)

It runs from `kc - K` at `p = 0` to `0` at `p = L-1`. It stays at or below zero only if
`mc >= N`, which is the reason for that limit.

After retiming, every delay sits exactly on a row boundary. It is absorbed by the row
register, so the folded circuit needs no extra delay registers between rows. The cost is
on the input side. Operation `p` now needs the input word that arrived

    d(p) = s - j = floor(p/N) - floor(p/mc)

folding periods earlier, with `0 <= d <= K - kc`. A sum that starts in row 0 in period
`m0` reaches row `s` in period `m0 + s`. There, coefficient `j` meets the word of period
`m0 + j`, which is the filter equation.

Example, `K = N = 4`. Each entry is `(j, i, d)` for slots 0 to 3 of a row:

| row | mc = 4 (kc = 4) | mc = 8 (kc = 2) | mc = 16 (kc = 1) |
|---|---|---|---|
| 0 | (0,0..3, 0) | (0,0..3, 0) | (0,0..3, 0) |
| 1 | (1,0..3, 0) | (0,4..7, 1) | (0,4..7, 1) |
| 2 | (2,0..3, 0) | (1,0..3, 1) | (0,8..11, 2) |
| 3 | (3,0..3, 0) | (1,4..7, 2) | (0,12..15, 3) |

When `mc` is not a multiple of `N`, a coefficient boundary can fall inside a row. For
example, with `K = 6`, `N = 2`, `mc = 3`, row 1 runs (coefficient 0, bit 2, d = 1) and then
(coefficient 1, bit 0, d = 0). The row switches to a newer word in the middle of the period.

`fold_ctrl` computes `i` and `d` for every row in every cycle without dividing. The start
of row `s` is the start of row `s-1` moved on by `N` positions. Since `mc >= N`, such a move
crosses at most one coefficient boundary.

## Input reordering with the minimum number of registers

Each word is live for `K - kc + 1` folding periods, and a new one arrives every `N` cycles.
So `K - kc + 1` words are live at once, which is the minimum register count. `kc` can change
at run time, so `input_reorder` provides the worst case, `K` word registers. All words have
the same lifetime, so a simple forward allocation reaches the minimum:

* A word enters register 0.
* It moves one register onward at every period boundary.
* Register `d` always holds the word from `d` periods ago.

A row reads register `d(p)` through a `K`-to-1 multiplexer. With `kc > 1` the registers
beyond `K - kc` hold words that no row reads.

## Interface and timing

Top module `folded_fir_top`. Parameters, defaults in brackets:

* `K` [4]: rows.
* `N` [4]: folding factor.
* `W` [8]: data width.
* `MC_RESET` [8]: coefficient length after reset.

The output width is `W + K*N`, enough for any legal `(kc, mc)`. Data and coefficients are
unsigned.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset, which clears all state |
| `x_in[W]` | in | input sample, taken at the rising edge that ends a cycle where `x_take` = 1 |
| `x_take` | out | high in slot N-1, once every N cycles; the source holds `x_in` valid then |
| `cfg_we`, `cfg_mc` | in | request coefficient length `mc` |
| `cfg_err` | out | one-cycle pulse: the request was illegal (`mc` does not divide K*N, or `mc < N`) and was ignored |
| `mc` | out | coefficient length in force |
| `coef_we`, `coef_wdata[K*N]` | in | write a coefficient vector (layout above) |
| `coef_pending` | out | a written vector is waiting for the period boundary |
| `y[W+K*N]` | out | filter output, updated once per period |
| `y_strobe` | out | one-cycle pulse with each update of `y` |
| `y_valid` | out | high with an update whose sum was formed with a single setting |

Number the accepted samples `s[0], s[1], ...`, and treat `s[t]` as 0 for `t < 0`. An update
of `y` that follows `q` accepted samples is then

    y = sum_{j=0}^{kc-1} c_j * s[q - 1 - K + j]

Coefficient `kc-1` multiplies the newest sample used. That sample is `K - kc + 1` samples
older than the newest one accepted. The throughput is one sample per `N` cycles.

**Changes while running.** A new length or coefficient vector is held until the end of
the current folding period, so every operation of one period uses a single setting.
Partial sums already in the rows still carry the old setting. `y_valid` therefore stays
low for the next `K` updates after a change, and after reset. `y` and `y_strobe` keep
running during that time. A coefficient-update unit driving `coef_we` sees its effect on
the output `K` periods later. An adaptation rule has to allow for that delay.

## Modules

| file | role |
|---|---|
| `rtl/fir_fold_pkg.sv` | default sizes, `clog2_min1`, `mc_legal` |
| `rtl/fold_ctrl.sv` | slot counter; coefficient-length register; per-row bit index `i` and word delay `d` |
| `rtl/input_reorder.sv` | `K` input word registers (forward allocation) and the per-row read multiplexers |
| `rtl/coef_store.sv` | `L`-bit coefficient register with a shadow copy applied at period boundaries; per-row bit read |
| `rtl/fold_pe.sv` | one folded row: AND partial product, `2^i` shift, adder, row register |
| `rtl/folded_fir_top.sv` | wires `K` rows, the controller, the reorderer and the coefficient store; output register |

In the unfolded array, each row of cells sits at a fixed bit offset. A folded row handles a
different bit weight in every slot, so `fold_pe` applies the weight with a shifter.

## Simulation

Each testbench is self-checking. It ends by printing `TB_RESULT checks=<n> failures=<m>`,
and a watchdog ends it if it hangs. For example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/fir_fold_pkg.sv tb/tb_folded_fir_top.sv --top-module tb_folded_fir_top
    ./obj_dir/Vtb_folded_fir_top

| testbench | what it checks |
|---|---|
| `tb_folded_fir_top` | default sizes, end to end. Lengths 8, 4 and 16, coefficient updates during operation, illegal requests. Every valid output is checked against the formula above; the input and output periods are checked to be N; `y_valid` timing is checked. |
| `tb_folded_fir_top_k6n2` | the same at K = 6, N = 2 with all five legal lengths (2, 3, 4, 6, 12), including boundaries inside rows |
| `tb_fold_ctrl` | slot, `i` and `d` for every row against division; `d <= K - kc` and reaching `K - kc` for every length; request handling |
| `tb_input_reorder` | each row's word equals the word from `d` shifts ago, for random `d` |
| `tb_coef_store` | bit `s*N + slot` per row; a vector takes effect only at the boundary |
| `tb_fold_pe` | row register against `base + cbit * x * 2^i` |

A two-state simulator is enough: everything that is read is reset.

## What is fixed by the method and what is a choice here

These parts follow from the folding and retiming method:

* the operation chain;
* the mapping of operations to rows and slots;
* the retiming and the resulting word delays `d = s - j`;
* the limits `mc >= N` and `kc * mc = K * N`;
* the register bound of `K` input words;
* one sample every `N` cycles.

These are choices of this implementation:

* **Sizes.** `K = N = 4`, `W = 8` and `mc = 8` after reset are example values. Any `K`,
  `N` and `W` elaborate.
* **Number format.** Unsigned data and coefficients, as plain AND-gate partial products
  imply. Signed operation would need Baugh-Wooley style sign handling, which is not built.
* **Register allocation.** The allocation is a shift-by-one-per-period register file with
  read multiplexers. It meets the minimum register count, but it is not a copy of any
  particular cycle-level allocation table.
* **Bit weighting.** The `2^i` weighting in a folded row is done by a barrel shifter.
* **Port protocol.** This includes the period-boundary application of changes and the
  `y_valid` rule.
* **Coefficient updates.** No coefficient-update (adaptation) algorithm is included. New
  coefficients come in through `coef_we`/`coef_wdata`.
