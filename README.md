# Parity protection for a bit-partitioned 3D SRAM with one parity bit per word

A bit-partitioned 3D SRAM stacks K dies. Each physical row runs across all of
them: the low-order slice of a row sits in the bottom die and the high-order
slice in the top die. To survive multi-bit upsets, an SRAM usually
bit-interleaves N words along a row. A burst of up to N adjacent upset cells
then hits each word at most once, and a single parity bit per word detects it.
If each die is interleaved on its own, every die needs N parity cells per row,
so a row needs N x K parity cells in all.

This design interleaves the N words across the whole stack instead. The rows
of all dies, read bottom to top, form one long line. That line has the layout
of an ordinary N-way interleaved row: the N·W data cells come first, then the
N parity cells. The line is cut into K equal slices, one per die. Each word is
then spread over every die and has a single parity bit. All N parity cells of
a row fall into the top die. The stack holds 1/K of the parity cells of
per-die interleaving. Inside any one die, a burst of up to N adjacent cells
is still always detected.

The cost is coverage across dies. A particle can upset cells in two dies of
the same row, and those upsets can hit the same word an even number of times.
That word's single parity bit does not change, so the error goes unnoticed.
The scheme accepts this, for memories whose contents can be re-fetched from
a lower level (caches, register files). It detects errors only and corrects
none.

## The interleaved line and how it is cut

With N words of W bits per row, L = N·W data cells, S parity sets (S = 1
normally) and K dies:

| cell of the long line            | holds                              |
|----------------------------------|------------------------------------|
| `b*N + w`  (0 ≤ b < W, 0 ≤ w < N) | bit b of word w                    |
| `L + s*N + w`                    | parity bit of set s for word w     |
| die d                            | cells `d*C .. d*C + C-1`, C = (L + S·N)/K |

The small layout used by the unit tests shows this most clearly. It has
N = K = 4, 16-bit words, 68 cells per row and 17 cells per die row. In the
table, `w.b` means bit b of word w:

| die | its 17 cells of the row |
|-----|---------------------------|
| 1 (bottom) | 0.0 1.0 2.0 3.0 0.1 1.1 2.1 3.1 0.2 1.2 2.2 3.2 0.3 1.3 2.3 3.3 0.4 |
| 2 | 1.4 2.4 3.4 0.5 … 3.7 0.8 1.8 |
| 3 | 2.8 3.8 0.9 … 3.11 0.12 1.12 2.12 |
| 4 (top) | 3.12 0.13 … 3.15 p0 p1 p2 p3 |

Die slices do not start on a word boundary, so each die row begins at a
different word. This is the "shifted" look of the layout. No hardware undoes
the shift: joining the die outputs end to end gives the plain interleaved
order back. On reads, the N-to-1 column multiplexers therefore sit directly
on the joined sense-amplifier outputs, as in a planar interleaved array. No
extra routing stage is needed.

The sliced line needs (L + S·N) to be a multiple of K. All the configurations
of interest satisfy this with N = K. The top module stops elaboration with
`$error` when it is not satisfied.

## Datapath

```
 wr_data ─┬─ parity_gen ─┐
          └──────────────┴─ line_writer ── line data/mask ─┐   (tst_* port can
                                                          │    replace them)
            ┌──────────────┬──────────────┬──────────────┐│
            │ bp_sram_die 0│ bp_sram_die 1│ ...  die K-1 │◄┘  slice d → die d
            └──────┬───────┴──────┬───────┴──────┬───────┘
                   └── concatenated line (rd_line) ┘
                                 │
                     word_selector (N-to-1 muxes)
                                 │ data, parity
                          parity_checker ── rd_syndrome, rd_err
```

* `bp3d_edc_pkg` holds the layout rules: the cell of a data bit, the cell of
  a parity bit, and which parity set a bit belongs to.
* `line_writer` puts one word and its parity at the word's cells of the line.
  It raises a write mask for exactly those cells, so the other N-1 words of
  the row stay as they are.
* `bp_sram_die` is one die. It is a ROWS x C cell array with a bit-masked
  write port and a registered read port. The read register stands in for
  the sense amplifiers.
* `word_selector` holds one N-to-1 multiplexer per data bit, plus one per
  parity set.
* `parity_gen` and `parity_checker` do the XOR reduction and the comparison.
* `bp3d_edc_sram` is the top. It instantiates K dies and wires the slices.

## Interface and timing of `bp3d_edc_sram`

* The word address is `{row, word_sel}`. The N words of a row are
  consecutive addresses.
* **Write:** raise `wr_en` with `wr_addr` and `wr_data`. The word and its
  generated parity are written at the next rising edge, across all dies.
* **Read:** raise `rd_en` with `rd_addr`. In the following cycle `rd_valid`
  is 1, together with `rd_data`, `rd_parity`, `rd_syndrome` and `rd_err`
  (1 = mismatch). `rd_line` holds the whole row as read from all dies. A new
  read can start every cycle.
* **Same row, same cycle:** when a row is read and written in the same
  cycle, the read returns the old contents.
* **Test port:** `tst_wr_en`, `tst_row`, `tst_mask` and `tst_data` write
  arbitrary cells of a row directly, with no parity generation. This port
  presets memory and injects upsets. It wins over `wr_en`, and an assertion
  warns if both are raised in the same cycle.
* **Reset:** `rst_n` is asynchronous and active low. It clears only the read
  path. Like an SRAM, the array powers up with arbitrary contents, so write
  a word before relying on its parity.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_WAYS` | 4 | interleaving degree N, which is also the number of words per row |
| `K_DIES` | 4 | number of dies |
| `DIE_DATA_BITS` | 128 | data cells per die row |
| `ROWS` | 4096 | rows per die |
| `PAR_SETS` | 1 | parity bits per word |

The defaults describe a 256 KB memory. It has 4 dies of 4096 x 128 data
cells. Each physical row holds one 64-byte line, split into four 128-bit
words, and each die row has 129 cells. The memory holds 16,384 parity cells,
against 65,536 for per-die interleaving. Two larger configurations have the
same capacity:

* N = K = 8 with 64-bit die rows, 32,768 parity cells against 262,144;
* N = K = 16 with 32-bit die rows, 65,536 parity cells against 1,048,576.

## Two parity sets (`PAR_SETS = 2`)

This option doubles the parity cells to close most of the cross-die gap.
Parity set 0 covers the bits of a word that lie in even-numbered dies, and
set 1 covers those in odd-numbered dies. Upsets in two adjacent dies now fall
under different parity bits and are detected. The 2·N parity cells are
appended at the end of the line, so they sit in the top die or dies. The
published scheme does not say where these cells are placed, so this
placement is a choice of this design. So is the rule that a bit's set is
decided by its die: because the layout shifts from die to die, `parity_gen`
needs `word_sel` to know the set of each bit.

## What is detected

* Any odd number of upsets among a word's cells (its data cells plus its
  parity cell) is detected.
* A burst of up to N adjacent cells inside one die row is always detected,
  because adjacent cells belong to different words. This includes bursts
  that reach into the parity cells.
* Upsets of the same word in two dies are missed with one parity set. The
  end-to-end tests inject exactly this case and check that it goes unflagged
  with `PAR_SETS = 1` and is flagged with `PAR_SETS = 2`.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_bp_sram_die` | masked writes and reads against a reference array: one-cycle latency, read-first, data held while idle |
| `tb_parity_gen`, `tb_parity_checker` | parity against a population count, single/double flips, the two-set split |
| `tb_line_writer`, `tb_word_selector` | placement of every bit, with cells of the 4-die/16-bit layout above (last cell of die 1 = bit 4 of word 0, first cell of die 2 = bit 4 of word 1, p0..p3 at the end of die 4) |
| `tb_bp3d_edc_sram` | end to end at reduced size for N = K = 4, the same with two parity sets, and N = K = 8. It runs random traffic, back-to-back reads, same-row read/write, single upsets, in-die bursts and cross-die double upsets, all against an independent reference model of the line, and requires each of these to occur |
| `tb_bp3d_edc_sram_full` | the top at default parameters: writes and reads back all 16,384 words, then injects parity-cell upsets, 4-cell bursts and cross-die double upsets |
| `tb_particle_strike` | Monte Carlo campaign, 10,000 particles each on six full-size 256 KB configurations: N = K = 4, 8 and 16, each with one and with two parity sets; details below |
| `tb_fig8_campaign` | 100,000 particles on the default memory, with rates reported for each batch of 10,000 |

In `tb_particle_strike`, a particle enters the top die and upsets a roughly
Gaussian-sized patch of cells in each die it crosses: σ is chosen so that 98%
of bursts are at most N cells wide. It then refracts at random angles and
moves one die down, with a 100 µm die pitch and a 284 nm cell. Every read of
a struck row is checked against the parity of its upset cells. The
testbench prints the share of particles whose corrupted words were all
flagged, for this design and for per-die parity. The strike model is only a
sketch of the published one. Its rates show the trend: the design trails
per-die parity, and the gap grows with N. They do not reproduce the
published figures. A typical run gives about 99.3% for this
design against 99.7% for per-die parity at N = K = 4, and 98.0% against
99.3% at N = K = 16. With two parity sets the design comes within about
0.1 percentage point of per-die parity, or beats it.

To run a testbench with Verilator, the package must come first:

```
verilator --binary --timing --top-module tb_bp3d_edc_sram -y rtl -y tb +libext+.sv \
          rtl/bp3d_edc_pkg.sv tb/tb_bp3d_edc_sram.sv && obj_dir/Vtb_bp3d_edc_sram
```

The full-size and particle-strike tests each take seconds to build and under
a minute to run.

## Departures from the published scheme

* The published scheme describes the layout, the read multiplexers and the
  parity check. The write path is added here: bit-masked single-word writes
  with parity generated on the fly. Also added are the test port, the
  read-first rule and the reset behaviour.
* The published example is described as a "64-bit 64-entry" register file,
  but it is drawn with 16-bit words and 17-cell die rows. The unit tests use
  the drawn layout. The defaults use the 256 KB cache configuration that the
  published evaluation uses.
* Sense amplifiers and through-silicon vias are not modelled as separate
  parts. The die's read register and the concatenation of the die outputs
  stand in for them.
* Where the extra parity cells of the two-set option go is this design's
  choice, as noted above.
* Parity is even parity: an all-zero word has parity 0.
