# FPIX1 pixel readout chip in SystemVerilog

FPIX1 is a column-based readout chip for a hybrid pixel detector: an array
of 160 rows by 18 columns of 50 x 400 µm pixel cells. It is meant to sit a
few millimetres from a colliding beam and feed a first-level track trigger.
So it must read out fast and sparsely: only hit cells are sent, and they are
sent in time order, one crossing at a time.

The key idea is **indirect, command-driven addressing**. A hit cell does not
store a timestamp. Each column has four *EOC Sets* at its bottom end. A Set
holds one bunch-crossing number (BCO) and broadcasts one command to every
cell of the column. A cell that is hit attaches itself to the Set that was
broadcasting `INPUT` at that moment. After that it answers only that Set's
`OUTPUT` or `RESET` command. The timestamp lives once per column and
crossing, not once per cell.

This RTL models the digital behaviour of the chip at the clock level. It
includes a behavioural model of the analog front end.

## Structure

```
fpix1_top
├── 18 x column c
│   ├── 160 x fpix1_frontend     behavioural: discriminator + 3 ADC comparators
│   ├── fpix1_column             160 x fpix1_pixel, token chain, wired-ORs, bus
│   └── fpix1_eoc                end-of-column logic
│       ├── fpix1_prio_enc       which Set issues INPUT
│       ├── 4 x fpix1_eoc_set    timestamp register + command FSM + comparators
│       ├── fpix1_col_ctrl       column token / EOC token / bus enable
│       └── fpix1_adc_enc        3 ADC flip-flops -> 2-bit value
└── fpix1_chip_ctrl              CBCO counter, RBCO, readout modes, output
```

`fpix1_pkg` holds the sizes, the command type `cmd_e` and the word formats.

## The life of a hit

1. **Listening.** In each column, at most one Set broadcasts `INPUT`
   (`LISTEN` state). The priority encoder chooses it at a BCO clock edge: the
   lowest-numbered free Set.
2. **Taking the hit.** When a cell's discriminator fires while `INPUT` is on
   its command lines, the cell stores the hit and the number of that Set. It
   also raises the wired-OR `HFastOR`. The Set copies the current BCO (CBCO)
   into its timestamp register SBCO. The Set keeps broadcasting `INPUT` until
   the next BCO clock edge (`LATCHED` state), so every cell hit in the same
   crossing joins the same Set. At that edge the Set falls silent (`IDLE`),
   and the priority encoder hands `INPUT` to the next free Set. While the cell
   takes its hit, the three ADC comparators set three set-only flip-flops.
3. **Waiting.** The Set now watches two comparators:
   * SBCO = RBCO (the requested BCO, while the chip control presents it):
     the Set broadcasts `OUTPUT`.
   * SBCO = CBCO on the bits not masked by `reset_mask`: the Set broadcasts
     `RESET` for one clock. The stored crossing is dropped and the Set is
     freed. The mask sets the delay. With all 8 bits compared, a crossing is
     dropped 256 crossings after it was taken. If only the low k bits are
     compared, it is dropped after 2^k crossings.
4. **Readout of a column.** Under `OUTPUT`, each attached cell requests the
   bus (combinationally, with no clock) and raises `RFastOR`. The column
   controller sends the column token `CTkin` up from row 0 right away,
   before the column owns the chip bus. The token skips every cell that is
   not requesting, so it rests at the lowest requesting cell. When the EOC
   token `ETkin` arrives, that cell's word goes on the bus. The cell clears at
   the next edge, and the token moves on to the next requesting cell: one
   cell per readout clock. The cell being read withdraws its share of
   `RFastOR`. So `RFastOR` is low during the read of the last cell, and the
   controller knows that this is the last one.
5. **Column hand-over.** After the last cell, the controller passes the EOC
   token to the next column (`ETkout`). A column with nothing to send passes
   the token through combinationally. The next column's first cell is
   already selected by its early `CTkin`, so it drives the bus on the very
   next clock. No clock is lost between columns.

A cell that holds a hit ignores hits that arrive while a different Set is
inputting. A column can buffer four crossings. A fifth crossing with hits
in that column, before any of the four is read or reset, is lost.
`col_full` shows this state.

## Chip control and output format

`fpix1_chip_ctrl` counts CBCO on `bco_tick` and runs one readout at a time:

* **Continuous mode** (`mode = 0`): a read pointer trails CBCO. Every ended
  crossing (pointer ≠ CBCO) is requested in turn.
* **External trigger mode** (`mode = 1`): a BCO number is accepted on
  `trig_valid`/`trig_ready`. The read pointer follows CBCO, so when the mode
  returns to continuous, readout resumes at the present crossing.

One readout presents RBCO for three clocks. In the first, the Sets compare.
In the second, the column controllers arm. In the third, the chip control
looks at the armed flags. If no column armed, nothing is sent. Otherwise the
output is a header word followed by one word per hit cell, in column order
and then row order, with `dv` high on each word:

| word   | bit 15 | bits 14..8    | bits 7..0 |
|--------|--------|---------------|-----------|
| header | 1      | chip_id[6:0]  | BCO[7:0]  |

| word | bit 15 | bits 14..10 | bits 9..2 | bits 1..0 |
|------|--------|-------------|-----------|-----------|
| hit  | 0      | column      | row       | ADC       |

`dout`/`dv` are registered on the rising clock edge. They are stable at the
falling edge, which is where the receiver samples them. From the header
onwards, a crossing leaves on consecutive clocks.

Latency in continuous mode, when the chip is idle, is as follows. The clock
edge that takes `bco_tick` ends crossing b. The next edge starts the
evaluation of RBCO, which takes three clocks, and one more clock registers
the header. So the header appears on `dout` after the fifth rising edge
following the tick edge.

## Front end and ADC

`fpix1_frontend` is a behavioural model, not logic. It stands for the
charge-sensitive amplifier, the shaping stage, the discriminator and the
three flash-ADC comparators. It takes the pulse amplitude in electrons
(`amp_e`, 16 bits) and compares it with the discriminator threshold `thr_e`
and the three ADC thresholds `adc_thr_e`. These four levels are shared by all
cells, as on the chip, where they are DC inputs. Noise, time walk and
amplifier recovery are not modelled. The end of the column turns the three
ADC flip-flops into 2 bits. The highest set flip-flop decides, so a missing
lower bit does not lower the value.

## Top-level ports

| port | meaning |
|------|---------|
| `clk`, `rst_n` | readout clock, asynchronous active-low reset |
| `bco_tick` | one-`clk` pulse per rising edge of the BCO clock |
| `amp_e[c][r]` | front-end amplitude of cell (row r, column c), electrons |
| `thr_e`, `adc_thr_e[3]` | discriminator and ADC thresholds |
| `kill[c][r]` | disable a (noisy) cell |
| `mode`, `trig_valid`, `trig_bco`, `trig_ready` | readout mode and trigger |
| `reset_mask` | CBCO bits ignored by the reset comparator |
| `chip_id` | 7-bit identifier sent in each header |
| `cbco`, `col_full` | current BCO; columns whose four Sets are busy |
| `dout`, `dv` | output word and data valid |

Parameters: `ROWS` = 160, `COLS` = 18 and `AMP_W` = 16 on the top. The
package sets 4 Sets per column, an 8-bit BCO and a 16-bit output word. The
chip control has `EVAL_CYC` = 3.

## What follows the chip and what is this design's choice

These follow the chip description:

* the 160 x 18 array;
* the four Sets per column;
* the four commands and the association rule;
* the priority encoder working at the BCO clock;
* the SBCO/RBCO and masked SBCO/CBCO comparators;
* the token skip, with one cell per clock and `RFastOR` marking the last
  cell;
* early `CTkin` and the `ETkin`/`ETkout` chain;
* the two readout modes;
* the output order: chip ID and timestamp, then addresses and ADC values,
  with a data-valid bit.

These are this design's own choices:

* **One clock domain.** On the chip the BCO clock and the readout clock are
  separate. Here everything runs on the readout clock, and the BCO clock is
  a strobe.
* **Widths and layout:** the BCO width (8 bits), the chip-ID width (7 bits)
  and the whole output word layout.
* **The chip-control sequencer**, including the read pointer, the three-clock
  RBCO evaluation, and sending nothing for an empty crossing. A triggered
  crossing without hits also returns nothing.
* **Lowest-first priority** of the Sets.
* **The extra `rd_en` qualifier** in the cells. The cell holding the early
  column token clears only when the EOC takes its word.
* **Wired-OR lines and tri-state buses** are modelled as OR reductions of
  AND-gated signals.
* **The `kill` input.** The chip can disable noisy cells, but how it does so
  is not specified. Likewise the programming interface: thresholds, masks and
  mode are plain ports here.
* **The order of the EOC token:** from column 0 up.

Not modelled: the analog circuits themselves, bias generation, the
programming interface, pads, and the timing of the real token skip (about
190 ps per cell on silicon). In the RTL, the token skip is one combinational
chain of 160 cells per column.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The end-to-end test `tb_fpix1_top` runs the
full 160 x 18 chip with default parameters. It covers continuous readout,
trigger mode, a column filling up and losing a crossing, reset by the CBCO
mask, killed cells and back-to-back column hand-overs. It counts each of
these and fails if one never happens.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpix1_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/fpix1_pkg.sv tb/tb_fpix1_top.sv
./obj_dir/Vtb_fpix1_top
```

Replace the top module name to run another testbench, for example
`tb_fpix1_eoc`. These are the block tests:

* `tb_fpix1_pixel`;
* `tb_fpix1_column`, a full 160-cell column;
* `tb_fpix1_eoc_set`, `tb_fpix1_prio_enc`, `tb_fpix1_col_ctrl` and
  `tb_fpix1_adc_enc`;
* `tb_fpix1_eoc`, which runs an EOC cell with a full column, including
  overflow and reset;
* `tb_fpix1_chip_ctrl`, which runs the chip control against a model of the
  columns;
* `tb_fpix1_frontend`.

The full-size top takes a few minutes and several GB of memory for the C++
compiler to build. Its simulation runs in under a second.
