# S-CNN visual processor: a SIMD array of Simplicial CNN cells

This is synthesizable SystemVerilog for a small SIMD image processor. It is a
14 x 14 array of identical cells. Each cell runs one step of a Simplicial
Cellular Neural Network (S-CNN) on its 3 x 3 neighbourhood.
The cell computes the composition `F o G` of two piecewise-linear functions:

* `G` is a function of the nine inputs `u` of the neighbourhood.
* `F` is a function of the nine states `x` of the neighbourhood.

Over a program cycle the cell integrates the one-bit result. The count
becomes the cell's new 8-bit state.

The cells do no arithmetic on the function values. All the work is comparison
and selection:

* **Values become time.** A cycle ramp `s = 0..255` is broadcast on each row.
  Every cell encodes its input and its state as one bit each, `UPwm` and
  `XPwm`. A bit is 0 while the value is greater than `s` and 1 otherwise, so
  an 8-bit value becomes the width of a pulse.
* **Neighbourhoods become addresses.** At each step a cell collects the nine
  `UPwm` bits of its neighbourhood into a 9-bit word `W_u`. The nine `XPwm`
  bits form `W_x`. At a given step these words name the simplex (vertex) of
  the function's domain that the neighbourhood is in.
* **Functions become shared tables.** `G` and `F` are 512-bit lookup tables,
  one bit per vertex. They are stored once, in the state machine's program
  memory, and shared by all cells. The tables are never sent as data. The
  memory sweeps an inner ramp `r = 0..255` and, with each `r`, puts two table
  bits on a 2-bit row bus: `T[r]` and `T[256 + r]`. Each cell compares
  `W[7:0]` with `r`. On a match it keeps the bit that `W[8]` selects.
  Sending two bits at a time halves the sweep to 256 cycles.
* **Logic and integration.** Each cell combines `F(W_x)` and `G(W_u)` with a
  programmed two-input Boolean function, `FoG`. A counter adds the result.
  After all 256 steps the count (saturated to 8 bits) is written into the
  state register `X`. Running program cycles again iterates the network.

The chip is laid out over three stacked tiers. The cell is split to match.
Everything about `u` is in the top tier: the input register, the photodiode
and A/D latch, the `UPwm` encoder and the `G` lookup. Everything about `x` is
in the middle tier: the state register, the `XPwm` encoder, the `F` lookup,
`FoG` and the counter. Only one signal crosses between the two halves of a
cell: the latched `G` bit (`g_via`). It stands for the single through-wafer
via per cell. The bottom tier holds the program memory and the state machine.

## Block map

```
scnn_vpu                       top
 +- io_interface               host command port, configuration registers
 +- scheduler                  state machine: A/D cycle, program cycle, inner loop
 |   +- ramp_gen x2            cycle / A/D ramp (8 bit) and inner ramp (8 bit)
 +- lut_memory                 four program banks ("two double banks")
 |   +- lut_bank x4            G table, F table (512 bits each), FoG function
 +- cell_array                 ROWS x COLS cells, 3x3 neighbourhood wiring
     +- scnn_cell              one cell
         +- pixel_frontend     photodiode, sample-and-hold, comparator (behavioural model)
         +- cell_tier3         U register, A/D latch, pwm_encoder, vertex_latch (G)
         +- cell_tier2         X register, pwm_encoder, vertex_latch (F), fog_unit, integ_counter
```

`scnn_pkg` holds the shared constants, the `sync_t` bundle of row
synchronisation lines, the host opcodes and the configuration struct.

## Row buses and synchronisation lines

Each cell row has its own signals, shared by all cells of that row:

* an 8-bit bus;
* a 2-bit `G` bus and a 2-bit `F` bus;
* the synchronisation lines, `sync_t`.

Each column has an output bus, driven by the cell of the selected row. The
8-bit row bus carries a different thing in each phase, and the sync lines say
which:

| phase              | 8-bit bus           | line                          | cell action                               |
|--------------------|---------------------|-------------------------------|-------------------------------------------|
| host load          | data                | `load_u` / `load_x` + select  | selected cell writes U or X               |
| encode             | cycle ramp `s`      | `enc_strobe`                  | latch `UPwm = !(U > s)`, `XPwm = !(X > s)` |
| evaluate (x256)    | inner ramp `r`      | `eval_en` (+ G/F bits)        | if `W[7:0] == r`: latch `T[{W[8], r}]`    |
| FoG                | -                   | `fog_strobe`                  | counter += `tt[{F, G}]`                   |
| transfer           | -                   | `transfer`                    | X <= counter                              |
| A/D ramp (x256)    | digital ramp        | `adc_ramp`, `adc_last`        | first comparator trip latches bus into U  |

In this RTL all rows are driven with the same values. A cell is addressed by
a row select and a column select together.

### Neighbourhood word

Bit `k` of `W` is the PWM bit of the neighbour at row offset `k / 3 - 1` and
column offset `k % 3 - 1`. Bit 0 is north-west, bit 4 is the cell itself and
bit 8 is south-east. Bit 8 selects the table half. Outside the array the
neighbour bits are the configurable constants `bnd_u` and `bnd_x`. Because
`W[7:0]` is 8 bits wide, exactly one inner-ramp value matches per sweep, so
the latches never need clearing.

## Timing

All logic runs on one clock with an asynchronous active-low reset. The
schedule of a program cycle is:

```
clear | { enc | eval r=0..255 | drain | fog } x 256 | transfer
  1   |   1   |      256      |   1   |  1         |    1       = 2 + 259*256 = 66,306 cycles
```

The memory read is synchronous. The inner ramp value is therefore delayed
along with the bits, and the `drain` cycle lets the last broadcast (r = 255)
reach the cells. `cfg.iterations` repeats the whole program cycle (0 counts
as 1).

The A/D (imager) cycle takes `1 + int_time + 1 + 256` cycles:

1. Photodiode reset.
2. Integration for `int_time` cycles.
3. Sample-and-hold, which arms the cell latches.
4. A rising digital ramp on the row buses.

During step 4 the top outputs `dramp` and `adc_active`. The off-chip analog
ramp, the `vramp` input, must follow `dramp`. A cell latches the digital ramp
value in the first cycle its comparator sees `vramp` above the held
photodiode voltage. A pixel that never trips latches 255.

## Host interface

Commands use a valid/ready handshake (`host_valid`, `host_ready`, `host_op`,
`host_addr`, `host_wdata`). Reads return `host_rdata` with `host_rvalid` one
cycle after they are taken.

| op            | address                                     | effect                              |
|---------------|---------------------------------------------|-------------------------------------|
| `OP_WR_U/X`   | `[15:8]` row, `[7:0]` column                | load a cell's U or X                |
| `OP_RD_U/X`   | same                                        | read a cell's U or X                |
| `OP_WR_LUT`   | `[15:8]` bank, `[6]` 0=G 1=F, `[5:0]` byte  | table bit `a` is byte `a/8`, bit `a%8` |
| `OP_WR_FOG`   | `[15:8]` bank                               | `wdata[3:0]` = FoG truth table      |
| `OP_WR_CFG`   | `[1:0]`: 0 bank, 1 iterations, 2 int_time, 3 boundary (`wdata[0]` u, `[1]` x) | |
| `OP_RUN_PROG` | -                                           | run program cycles on the active bank |
| `OP_RUN_ADC`  | -                                           | run one A/D conversion              |
| `OP_RD_STAT`  | -                                           | `rdata[0]` = busy                   |

The FoG truth table is indexed by `{F, G}`. For example, `4'b1000` is AND,
`4'b0110` is XOR and `4'b1010` passes G through.

While an operation runs, the interface takes only two kinds of command:

* status reads;
* writes to a bank other than the active one.

Any other command is held off by `host_ready` until the operation ends.
This lets the host load the next program while the current one runs.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS`, `COLS` | 14, 14 | array size |
| `DW` | 8 | width of U, X, counter and cycle ramp (must be >= 8) |
| `NBANKS` | 4 | program banks |

The table size (512 bits) and the inner ramp (8 bits) follow from the 3 x 3
neighbourhood. They are constants in `scnn_pkg`.

## What follows the source design, and what is chosen here

These points follow the source design:

* the 14 x 14 array;
* the 8-bit input, state and result;
* the 9-bit neighbourhood word and the 512-bit G and F tables;
* one set of tables shared by all cells;
* the two table bits broadcast per inner-ramp step, chosen by bit 9 of the word;
* the PWM encoding rule;
* the split of cell parts between tiers, with a single crossing signal;
* the counter feeding the state register;
* four banks, each holding F, G and FoG;
* row buses and column output buses;
* the single-slope A/D conversion and direct cell loading.

The following are this design's own choices:

* The bit order of W and the choice of which table bits are broadcast
  together (`T[r]` and `T[256 + r]`).
* The FoG encoding as a 4-bit truth table.
* Counter saturation at 255. A program cycle has 256 steps, so without it the
  count could reach 256.
* Constant boundary bits.
* The phase order and cycle counts of the scheduler.
* The host command set.
* Repeated program cycles.
* Writing an idle bank while another runs.
* Reset values and all encodings.

Not built:

* **Masks.** The comparator blocks are drawn as "comparator, latch and masks",
  but the function of the masks is not described anywhere, so there is no
  mask logic.
* **Overlap of I/O with computation.** The source mentions pipelining. The
  only overlap built here is reprogramming an idle bank.
* **Per-cell lookup tables.** These are mentioned only as a generalisation.

Not digital logic:

* The through-wafer via is a plain wire.
* The pads are the top's ports.
* The off-chip analog ramp is the `vramp` input.
* The photodiode, sample-and-hold and comparator are a behavioural model,
  `pixel_frontend`. It is not meant for synthesis. It models voltages as
  16-bit codes: the diode resets to `16'hFFFF` and discharges by `light` per
  integration cycle.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. The testbenches for
`cell_array`, `scnn_cell` and `scnn_vpu` compare against `tb/scnn_ref_pkg.sv`.
That package is a reference model of the S-CNN program cycle, written from the
algorithm rather than from the RTL.

`tb_scnn_vpu` runs the whole design at its default size, 14 x 14, through the
host port only, in about two seconds of simulation. It covers:

* programming three banks;
* loading and reading back every cell;
* a program cycle on bank 0, with its cycle count checked;
* two chained program cycles on bank 1 with boundary bits set, while bank 2
  is reprogrammed and the active bank is refused;
* an A/D conversion of a light image that includes dark pixels that never trip;
* a saturating program on the converted image.

It counts each of these mechanisms and fails if any of them never happened.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_scnn_vpu rtl/scnn_pkg.sv tb/scnn_ref_pkg.sv tb/tb_scnn_vpu.sv
./obj_dir/Vtb_scnn_vpu
```

Replace `tb_scnn_vpu` with any other testbench to run it instead. Add
`-Wno-fatal` if lint warnings stop the build.

Lint warnings that remain:

* Unused bits of the `sync_t` bundle. Each tier uses only its own lines.
* `SYNCASYNCNET` on `rst_n`. Reset is asynchronous in the flops and is also
  used synchronously to gate immediate assertions.
