# Low-complexity post-detection processor for MIMO SC-FDMA

In an SC-FDMA uplink (the LTE uplink), every received sample mixes all the
symbols of a block. That happens because the transmitter spreads the symbols
with a DFT before mapping them to sub-carriers. A maximum-likelihood search
over a whole block is far too expensive. A linear MMSE equaliser is cheap but
leaves symbol errors.

This design is a second stage that sits after an MMSE detector. It cleans up
the MMSE decisions at low cost:

1. Slice the MMSE soft outputs `z` to the nearest QAM points, giving `zhat`.
2. Measure how well `zhat` explains the received block `Y` through the
   effective channel `Heff`. The measure is the Manhattan distance
   `MD_init = ||Y - Heff*zhat||_1`, where `|Re|+|Im|` takes the place of a
   squared magnitude.
3. For every symbol `p` and every nearby constellation point `c`, measure the
   same distance with only symbol `p` changed to `c`. The smallest of these
   distances for symbol `p` is its *EP metric*. A small EP metric means some
   other point explains the data well, so the symbol is likely wrong.
4. Sort the EP metrics. Take the `NS` symbols with the smallest metrics as the
   erroneous ones. Replace each of them with its best candidate if that
   candidate's distance is below `MD_init`.

The hardware does all of this with one row of `Heff` per clock, plus a
one-symbol-per-clock sorter. It never forms the full distance of any candidate
vector directly.

## The incremental distance trick

Changing only symbol `p` from `zhat_p` to `c` changes the residual by one
column of `Heff`:

    Y - Heff*z'  =  e + Heff[:,p] * (zhat_p - c),      e = Y - Heff*zhat

So each row `t` needs only one complex residual `e_t`, shared by all symbols,
and then one cheap correction per candidate:

    MD(p,c) = sum_t |Re r| + |Im r|,    r = e_t + Heff[t][p] * (zhat_p - c)

The candidates are the grid neighbours of `zhat_p`. With odd-integer QAM
levels the step is 2, so `zhat_p - c` has components in {-2, 0, +2}. The
product `Heff[t][p]*(zhat_p - c)` is therefore only shifts and adds. The one
real multiplier array in the design is the `P` complex products
`Heff[t][j]*zhat_j` that form `e_t`.

## Datapath and timing

```
 z ──► qam_map (×P) ──► zhat ─┐
                              ▼
 Heff row t, y_t ──► residual_unit (4 stages) ──► e_t, Heff[t][*]
                              │
              ┌───────────────┼──────────────────────┐
              ▼               ▼                      ▼
        pmd (symbol 0) … pmd (symbol P-1)      md_init_acc
        NC distances each                      MD_init
              │
              ▼  (end of block)
        clg + min_unit per symbol ──► EP bank (P metrics, points)
                                           │ one entry per clock
                                           ▼
                                      ep_sorter (NS smallest)
                                           ▼
                                      crs ──► O1..OP
```

| Module | Role |
|---|---|
| `mimo_pkg` | default sizes, QAM level count, candidate offset table |
| `qam_map` | the "Map" slicer: nearest odd level, clipped to the outer level |
| `residual_unit` | `e_t = y_t - Heff[t]*zhat` in 4 register stages (inputs, products, adder tree, subtract). It delays the `Heff` row and `zhat` along with the data. |
| `pmd` | one per symbol: accumulates the `NC` candidate distances over the block |
| `md_init_acc` | accumulates `|Re e_t| + |Im e_t|`, giving `MD_init` |
| `clg` | candidate list generator: neighbour points and whether each lies inside the constellation |
| `min_unit` | the "Min" block: the smallest valid candidate distance (EP metric) and its point |
| `ep_sorter` | keeps the `NS` smallest EP metrics in an insertion list. It takes one entry per clock. |
| `crs` | candidate replacement: writes the selected candidates over `zhat` when they beat `MD_init` |
| `mimo_pdp_detector` | top: row counter, banks between the stages, output registers |

**Input schedule.** On each `in_valid` clock the top takes row `t` of `Heff`
(`h_re/h_im`, `P` elements) and element `t` of `Y`. It counts `t` from 0 to
`P-1` internally. The soft MMSE outputs `z_re/z_im` are sampled together with
row 0 only. There is no back-pressure. Rows may arrive back to back, and
`in_valid` may drop for any number of clocks.

**Throughput and latency.** A block takes `P` clocks to stream in. The sorter
also needs `P` clocks, one EP metric per clock. The design overlaps the two:
while block *n* is being sorted, block *n+1* is accumulating. Between them sit
two register banks:

- the EP bank, loaded at the end of accumulation;
- the sort-stage copy of `zhat` and `MD_init`, taken on the sorter's first
  clock.

With these banks, blocks can follow each other with no gap, at one block per
`P` clocks. `out_valid` pulses `P + 6` clocks after the clock that took the
last row. Those clocks are: 4 in the residual pipeline, 1 for the last
accumulation, 1 to load the EP bank, `P` to sort, then the output register.

**Reset.** `rst_n` is asynchronous and active low. It clears only the control
state: valid bits, the row counter, the sorter state and its list. Data
registers are always qualified by a valid flag.

## Number formats

- QAM points are the odd integers `-(L-1) … L-1` on each axis, with
  `L = sqrt(Q)`. They are not normalised. `Heff` and `Y` must use the same
  integer scale, so that `y = Heff*s + w` for integer `s`.
- `z` has `ZW` bits with `ZFRAC` fractional bits. The value `z = 1.0` means
  the level `+1`.
- Internal widths are derived from the input widths and `P`, so nothing
  saturates: `EW` for the residual and `MDW` for the distances.
- The outputs `o_re/o_im` are `PTW`-bit levels. `o_replaced` flags the changed
  symbols. `o_md_init` is the distance of the unchanged estimate.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `P` | 24 | symbols per block, `M × Mt` (DFT length 12, one LTE resource block, × 2 layers) |
| `Q` | 16 | QAM order (64 is also supported) |
| `HW`, `YW`, `ZW`, `ZFRAC` | 12, 16, 10, 4 | input word lengths |
| `NC` | 8 | candidates per symbol: 4 axis neighbours, then 4 diagonal ones. `NC = 4` keeps only the axis neighbours. |
| `NS` | 2 | symbols selected as erroneous per block |

## What comes from the source architecture and what is this design's own

The architecture this RTL follows gives the following:

- the block structure: Map, CLG, complex multipliers with an adder tree in
  four stages, PMD and Min blocks, an `|Re|+|Im|` accumulator for the initial
  estimate, the Sorter and CRS;
- the Manhattan-distance metric;
- one row of `Heff` and one element of `Y` per clock;
- sorting the EP metrics over `P` clocks with minimal hardware;
- output of the minimum metrics, their constellation points and the indices
  of the erroneous symbols.

It does not give word lengths, the candidate set, the number of symbols
selected, the replacement rule, the handshake or the exact latency. Those are
choices made here. They are marked as such in the header of each file.

Known departures and gaps:

- **Single candidate pass.** The method is described as browsing *more*
  candidates for the less reliable symbols. Here every symbol browses the same
  `NC` nearest neighbours, and the `NS` selected ones are replaced by their
  best neighbour. There is no wider second search.
- **Independent replacements.** The `NS` replacements are made
  independently. The distance of the joint change is not re-checked.
- **Not included:** the MMSE equaliser and IDFT that produce `z`; the SC-FDMA
  transmitter and receiver front end (DFT, sub-carrier mapping, IFFT/FFT,
  cyclic prefix); the soft-output variant for coded systems; and the
  linear-block-code and encryption stages. Their structure is not specified
  in enough detail to design.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_mimo_pdp_detector` runs the top at its default parameters over 100
  random blocks:
  - The blocks use diagonally dominant random channels and noisy soft
    estimates.
  - Some blocks are back to back; others have random gaps.
  - The expected outputs come from a brute-force model. It evaluates
    `||Y - Heff*z'||_1` over the whole modified vector, not the incremental
    form.
  - It checks every symbol, the replace flags, `MD_init`, the `P+6` latency
    and the `P`-clock block spacing.
  - It also requires each of these to happen at least once: a replacement, a
    block without one, a corrected wrong decision, an off-constellation
    candidate, Map clipping, back-to-back blocks and input gaps.
- `tb_mimo_pdp_detector_q64` runs the same test for 64-QAM with `P = 8`.
- The leaf testbenches test each block against an independent model:
  - `qam_map` is tested exhaustively for 16- and 64-QAM.
  - `clg` is tested on every constellation point.
  - `residual_unit` and `pmd` are tested with random streams, gaps and early
    restarts.
  - `ep_sorter` is tested with many ties.
  - `min_unit` and `crs` are tested with random vectors.

Simulating with Verilator, for example the top:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/mimo_pkg.sv \
    tb/tb_mimo_pdp_detector.sv --top-module tb_mimo_pdp_detector -o sim
./obj_dir/sim
```

The testbenches set every variable they read, and they use `$urandom` for
stimulus, so they run correctly on a two-state simulator.

To change the block size or constellation, override `P` and `Q` on
`mimo_pdp_detector`. The internal widths follow automatically. `Heff` and `Y`
must keep `|y|` within `YW` bits.
