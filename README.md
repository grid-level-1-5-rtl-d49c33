# GRID Level-1.5 trigger

A pipelined trigger stage for the gamma-ray silicon tracker of the AGILE instrument. A charged
particle (mostly a proton, electron or positron) that enters the tracker from the side fires one of
the lateral anti-coincidence (AC) panels. It then leaves a track that starts near that panel. This
logic looks at which TAA1 front-end chips fired and where they lie relative to the fired panel. From
that it decides whether the event looks like such a particle. Three geometric tests run in parallel:

* **NEAR**: did a chip fire in the few columns next to the fired panel?
* **COEF**: how large an area does the track cover (column span and view span)?
* **DIS**: how far from the panel is the track, on its first and on its last view?

Each test gives one bit. A final look-up table combines the bits into the Level-1.5 trigger. The
thresholds and the combination are not wired into the logic. They live in three tables that the
ground loads by telecommand (TC), so the cut can be retuned in flight without changing the hardware.

## Input data: two trigger matrices and four panels

The tracker has two projections, X and Z. The trigger bits of each form a 12 x 12 matrix:

* row `i` is ST view (tracker plane) `i`, row 1 first;
* column `j` is TAA1 chip `j`, in the order the chips sit in the detector.

In the RTL a matrix is `logic [11:0][11:0]`, indexed `[i-1][j-1]`, so bit 0 of a row is column 1.

The four AC lateral sides are numbered 1 to 4. Two of them run parallel to the strips of each
projection and flank its matrix:

| matrix | panel next to column 1 | panel next to column 12 |
|--------|------------------------|-------------------------|
| X      | side 2                 | side 4                  |
| Z      | side 1                 | side 3                  |

Sides 2 and 4 are therefore opposite each other, and so are 1 and 3. "Two adjacent sides" always
means one X side and one Z side. Each side delivers three trigger signals, which are ORed into one
side bit.

Each projection also has a View Trigger Strobe from the upstream majority logic (`strobe_x`,
`strobe_z`).

## Access procedure: which logic an event gets (`l15_access`)

| fired AC sides                 | strobes                    | decision                          |
|--------------------------------|----------------------------|-----------------------------------|
| exactly one                    | its projection's active    | 1M logic on that matrix           |
| exactly one                    | its projection's inactive  | FEF (front-end freeing)           |
| two adjacent                   | both active                | 2M logic on both matrices         |
| two adjacent                   | exactly one active         | 1M logic on the active one        |
| anything else                  | –                          | FEF or rejection, chosen by TC    |

"Anything else" includes no side fired, two opposite sides, three or four sides, and two adjacent
sides with neither strobe active. These all follow the configuration bit `other_fef`
(1 = FEF, 0 = reject).

The access procedure also tells each matrix processor which edge its fired panel is on
(`x_from_right` = side 4 fired, `z_from_right` = side 3 fired). Every later step measures columns
from that panel.

## Per-projection processing (`l15_matrix_proc`)

All four steps are combinational and are built once for X and once for Z. Columns are counted from
the fired panel: distance 0 is the column next to it, and distance 11 the far column.

1. **Sub-matrix** (`l15_submatrix`). Each row is ORed. The first and the last fired rows
   `i_fr`, `i_lr` (1-based) bound the band of views the track crossed. All fired chips lie in that
   band, so the later searches can look at the whole matrix.
2. **NEAR** (`l15_near`). The bit is set if any chip fired in the `n` columns closest to the panel.
   `n` is `n_x` or `n_z`, set by TC. `n = 0` never fires, and `n >= 12` covers the whole matrix.
3. **COEF quantities** (`l15_coef_calc`). `j_fc` and `j_lc` are the columns of the closest and the
   farthest fired chip. The outputs are `dW = |j_lc - j_fc|` (column span) and
   `dZ = |i_lr - i_fr|` (view span), each 4 bits wide.
4. **DIS quantities** (`l15_dis_calc`). On view `i_fr` and on view `i_lr`, the distance of the
   closest fired chip from the panel, as a chip count (0 = the adjacent chip). The outputs are
   `DIS_fv` and `DIS_lv`, each 4 bits wide.

An empty matrix gives zero for everything.

Worked example: X with side 2 fired (the panel next to column 1). Chips (view 3, column 2),
(view 5, column 4) and (view 8, column 9) fired. Then `i_fr = 3` and `i_lr = 8`, so `dZ = 5`.
`j_fc = 2` and `j_lc = 9`, so `dW = 7`. `DIS_fv = 1` and `DIS_lv = 8`. NEAR fires for `n >= 2`.

## The three look-up tables

| table      | address (MSB first)                                  | size     | module               |
|------------|------------------------------------------------------|----------|----------------------|
| COEF       | `{dW_x, dZ_x, dW_z, dZ_z}`                           | 65536 x 1 | `l15_coef_trigger`  |
| DIS        | `{DIS_fv_x, DIS_lv_x, DIS_fv_z, DIS_lv_z}`           | 65536 x 1 | `l15_dis_trigger`   |
| Level-1.5  | `{X-NEAR, Z-NEAR, COEF, DIS, 1M flag}`               | 32 x 1    | `l15_output_trigger`|

The three differences between 1M and 2M logic are applied where the results are used:

* the NEAR bit of the projection that is not processed is forced to 0;
* its two nibbles in the COEF and DIS addresses are forced to 0;
* the 1M flag is set in the Level-1.5 address.

The Level-1.5 table therefore sees whether the partial bits came from one projection or from two.

Any of the four partial tests can be switched off by TC:

* a disabled NEAR bit reads 0;
* a disabled COEF or DIS stage skips its table read and reads 0.

The tables are plain arrays (`l15_lut`) with one write port and one synchronous read port. That maps
onto a block RAM: 131104 bits in all. They are not reset, so load them before the first event.
Whether a set Level-1.5 bit means "keep" or "reject" is decided by the table contents. The logic
passes the bit on unchanged.

## Telecommand port (`l15_tc_regs`)

Each clock with `tc_we` high does one write:

| `tc_target`        | effect                                                       |
|--------------------|--------------------------------------------------------------|
| `TC_CFG` (0)       | configuration register loaded from `tc_wdata[12:0]`          |
| `TC_COEF_LUT` (1)  | COEF table bit `tc_addr` set to `tc_wdata[0]`                |
| `TC_DIS_LUT` (2)   | DIS table bit `tc_addr` set to `tc_wdata[0]`                 |
| `TC_L15_LUT` (3)   | Level-1.5 table bit `tc_addr[4:0]` set to `tc_wdata[0]`      |

Configuration layout (`l15_cfg_t`):

| bits   | field       | reset value |
|--------|-------------|-------------|
| [3:0]  | `n_x`       | 2           |
| [7:4]  | `n_z`       | 2           |
| [8]    | `near_x_en` | 1           |
| [9]    | `near_z_en` | 1           |
| [10]   | `coef_en`   | 1           |
| [11]   | `dis_en`    | 1           |
| [12]   | `other_fef` | 1           |

Loading both large tables takes 131072 writes. Change the configuration only while no event is in
the pipeline: the NEAR settings and `other_fef` are used in the first clock, and the COEF/DIS
enables in the second.

## Timing (`l15_trigger`)

One event can enter per clock (`ev_valid` with the matrices, `ac_trig` and the strobes). Its
decision appears exactly 3 clocks later, on `out_valid`:

| clock edge | what is registered                                                     |
|------------|------------------------------------------------------------------------|
| 1          | access decision, both projections' results, masked NEAR bits           |
| 2          | COEF and DIS table reads                                               |
| 3          | Level-1.5 table read; `out_*` outputs                                  |

Outputs per event:

* `out_mode`: the access decision;
* `out_trigger`: the Level-1.5 bit;
* `out_fef`, `out_reject`: the access procedure stopped processing;
* `out_near_x`, `out_near_z`, `out_coef`, `out_dis`: the partial bits, for housekeeping.

For FEF and rejected events, `out_trigger` and the partial bits are 0. Reset is synchronous and
active low. It clears the valid pipeline and restores the configuration defaults.

## Files

`rtl/` holds the design, one module or package per file:

* `l15_pkg`: shared sizes, the `acc_mode_t`, `tc_target_t`, `l15_cfg_t` and `proj_q_t` types;
* `l15_trigger`: the top level;
* `l15_access`, `l15_tc_regs`, `l15_matrix_proc`;
* `l15_submatrix`, `l15_near`, `l15_coef_calc`, `l15_dis_calc`;
* `l15_coef_trigger`, `l15_dis_trigger`, `l15_output_trigger`, `l15_lut`.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. They share a reference model,
`tb/l15_ref_pkg.sv`. The model works from the list of fired chips in 1-based coordinates and does
not reuse the RTL's structure.

`tb_l15_trigger` runs the whole design at its default size. It:

* loads all three tables by TC;
* runs 40 bursts of 500 random events, each burst under a different configuration;
* reloads every table halfway;
* checks every decision and the 3-clock latency against the model;
* fails if any mechanism never occurred: 2M, 1M on X or Z, FEF by either rule, rejection, each
  partial bit, each disable, a panel on either edge, or a table reload.

The simulation itself takes about a second.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/l15_pkg.sv tb/l15_ref_pkg.sv tb/tb_l15_trigger.sv --top-module tb_l15_trigger
./obj_dir/Vtb_l15_trigger
```

Each testbench ends with `TB_RESULT checks=N failures=M`. Lint with
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/l15_pkg.sv rtl/l15_trigger.sv`.
It reports only unused signals: values that are computed but not needed further on. These are the
per-side AC bits, the row ORs and the column indices `j_fc`/`j_lc` inside each projection, the
record fields `any_hit`, `i_fr`, `i_lr` and `near_hit` after the first pipeline stage, and the top three TC data
bits.

The matrix size is a parameter (`N_ROWS`, `N_COLS`, default 12). The 4-bit quantities allow at most 16 rows
and columns. The testbenches' reference model is written for 12 x 12.

## What comes from the specification and what was chosen here

Taken from the specification:

* the 12 x 12 matrices and the panels flanking them;
* the access rules;
* the three algorithms and their 4-bit quantities;
* the 16-bit COEF and DIS table addresses and the 5-bit Level-1.5 address;
* the 1M zeroing rules;
* the TC-programmable `n` values, enables and tables.

Choices made in this design, where the specification does not fix them:

* **Span names.** The text and the block diagrams of the specification disagree on which span is
  called dW and which dZ. The diagrams are followed: dW is the column span and dZ the view span.
  With the other reading, the two nibbles of each projection would swap places in the COEF address.
* **Field order.** The tables' address fields are placed in the order the specification lists
  them, most significant first. It only asks for "a fixed order".
* **DIS counting.** Distances count the chips between the panel and the hit, so the adjacent column
  gives 0. Counting the hit chip itself would add 1.
* **Uncertain access case.** Two adjacent sides with neither strobe active go to the rule-5 choice.
  One drawing of the procedure would send them to 1M logic instead.
* **Own choices.** The following are all this design's own: the clocking, the 3-clock pipeline, the
  one-bit table words, the synchronous table reads, the TC port format, the configuration layout
  and reset values, the 1M flag polarity (1 = 1M), and the result for an empty matrix.

Not included:

* the majority trigger logic that makes the View Trigger Strobes;
* the TAA1 front end;
* the AC panels;
* the FEF procedure itself. This design only requests it, on `out_fef`.
