# Median filter on a shiftable content-addressable memory

A running median needs the samples of a window kept in sorted order, and a
new sample placed in that order every clock. This design keeps up to 64
samples (8 bits each) sorted in descending order in a row of 64 processor
elements (PEs). Inserting or deleting a sample takes one clock, whatever the
number of stored samples. Each PE compares the sample with its own item in
parallel, like a content-addressable memory (CAM). Then every item that must
move shifts one place at once, like a shift register. A multiplexer reads the
item of any rank from the row. The median of k stored samples is therefore on
the output right after the clock edge that takes the last sample, with no
extra cycle.

The architecture is the "optimized delete-and-insert" (ODI) sorter on a
shiftable CAM (SCAM) described by Lee, Hsieh and Tsai for a 64-sample median
filter chip. This RTL rebuilds its logic function at register-transfer level.
It is not a copy of the original two-phase transistor circuit.

## The idea: LE group and GT group

Take the stored items in descending order and a new sample `d`. The items
split into two contiguous groups:

* **GT group**: items greater than `d`, on the left (large end).
* **LE group**: items less than or equal to `d`, on the right.

Each PE `i` computes one bit, `C_i = (d >= item_i)`. Along the row the C bits
read `0 0 … 0 1 1 … 1`. The boundary is the single PE where `C_i = 1` and its
left neighbour's `C_{i-1} = 0`.

* **Insert** (`shc = 0`): every LE item moves one PE to the right. The boundary
  PE takes `d`. The item in the last PE falls out of the right end.
* **Delete** (`shc = 1`): every LE item moves one PE to the left. The first LE
  item (the one equal to `d`) is overwritten, and a zero enters the last PE.

Example with five PEs:

| row before      | operation  | row after        |
|-----------------|------------|------------------|
| 25 16 10 2 0    | insert 20  | 25 20 16 10 2    |
| 25 16 10 2 0    | delete 16  | 25 10 2 0 0      |

Nothing is searched or moved item by item. The only state change is one
parallel shift of the LE group, plus one load.

Two points matter to a user:

* **Ties.** An equal item belongs to the LE group. A new sample therefore goes
  to the left of items equal to it. This does not change the order of values.
* **Deleting a value that is not stored.** Delete removes the first LE item.
  If no item equals `d`, the largest item below `d` is removed instead. A
  running-window user deletes only samples it inserted earlier, so this case
  never happens there.

## The processor element

Each PE (`scam_pe`) has two cells.

**Sort cell** (`sort_cell`). One 8-bit register with five functions:

* shift right: take the left neighbour's item;
* shift left: take the right neighbour's item;
* load: take the input sample;
* hold;
* reset: clear to zero.

Its item goes to both neighbours, to the compare cell and to the selection
unit.

**Compare cell** (`compare_cell`). A magnitude comparator and three gates:

```
C_i  = din >= item_i
shr  = en & C_i & ~shc                 insert: LE items take the left item
shl  = en & C_i &  shc                 delete: LE items take the right item
load = en & C_i & ~C_{i-1} & ~shc      insert: boundary PE takes din
```

At the boundary PE both `shr` and `load` are high. The sort cell gives
`load` priority, so the boundary PE stores the new sample. Its old item still
moves to its right neighbour, whose `shr` is high. The full priority is
shift left, then load, then shift right, then reset.

Each `C_i` comes from its own comparator, which sees the broadcast sample
directly. Nothing ripples along the row. The critical path is one 8-bit
comparison, one gate and one neighbour's bit, whatever the row length.

## Reading an order: the selection unit

`selection_unit` is an N-to-1 multiplexer indexed by `order`. Rank 0 is the
largest item. After k samples have been inserted into a cleared chip, the
items sit in PEs 0 … k-1 and zeros fill the rest. The median is rank
`(k-1)/2`, the minimum of the window is rank `k-1`, and the maximum is rank 0.
The output is combinational, so it is valid in the same cycle as the row.

The row's two ends are also outputs. `max_out` is PE 0 and `min_out` is the
last PE. These are the "shift ports".

## Running windows and 2-D filtering

The chip handles one sample per clock. A sliding window therefore costs one
delete (the oldest sample) plus one insert (the newest sample) per new sample:
2 clocks.

For a k×k image window that slides one column, the steps are:

1. delete the k samples of the column that leaves;
2. insert the k samples of the column that enters.

That is 2k clocks per output pixel. The column samples come from line delays
outside the chip. Windows of up to 64 samples fit: 3×3, 5×5, 7×7 and 8×8.

## Cascading

A full row has four edge signals:

* the carry `casc_cout` (`C` of the last PE);
* the two edge items, `max_out` and `min_out`;
* the inputs that replace the missing neighbours: `casc_cin`, `casc_lin` and
  `casc_rin`.

To sort 128 samples with two chips A and B, give both the same `din`, `en`,
`shc` and `clr`, and connect them like this:

```
A.casc_cin = 0         A.casc_lin = 0         A.casc_rin = B.max_out
B.casc_cin = A.casc_cout  B.casc_lin = A.min_out  B.casc_rin = 0
```

Items then flow across the chip boundary exactly as they do between two PEs.
A single chip ties all three cascade inputs to zero. A `casc_cin` of 0 acts as
an item of infinite value left of PE 0.

## Interface of `odi_chip`

| port         | dir | width   | meaning |
|--------------|-----|---------|---------|
| `clk`        | in  | 1       | all state changes at the rising edge |
| `rst_n`      | in  | 1       | asynchronous clear of all items, active low |
| `en`         | in  | 1       | perform the operation this cycle |
| `shc`        | in  | 1       | `OP_INSERT` (0) or `OP_DELETE` (1), type `scam_pkg::scam_op_e` |
| `clr`        | in  | 1       | synchronous clear of all items (new input set); wins over `en` |
| `din`        | in  | W       | sample to insert or delete |
| `order`      | in  | log2 N  | rank to output, 0 = maximum |
| `median_out` | out | W       | item of rank `order` |
| `max_out`    | out | W       | PE 0 item |
| `min_out`    | out | W       | last PE item |
| `casc_cin`, `casc_lin`, `casc_rin` | in | 1, W, W | cascade inputs, 0 for a single chip |
| `casc_cout`  | out | 1       | cascade carry |

Parameters: `N` = 64 entries and `W` = 8 bits, the sizes of the original chip.

Timing: present `din`/`shc`/`en` before a rising edge. At that edge the row
is updated. After the edge, `median_out`, `max_out` and `min_out` show the new
state, and `casc_cout` shows the comparison of the current `din`. There is no
pipeline. Throughput is one insert or delete per clock.

**Full chip.** Inserting into a full chip pushes the smallest item out. It is
visible on `min_out` before the edge. A sample smaller than every item of a
full chip is dropped, because no PE sees `C = 1`.

## Where this RTL departs from the original circuit

* **Clocking.** The original uses a two-phase non-overlapping clock. Controls
  are formed in phase 1, and at the same time neighbour items are "pre-shifted"
  into a buffer inverter of each bit cell. The data is stored in phase 2. Here
  a single rising-edge register replaces both phases. The pre-shift gates and
  the buffer have no counterpart.
* **Load versus shift-right priority.** The original cell description lists
  shift-right ahead of load. Its compare-cell equations, however, raise both
  at the insert position. The RTL lets load win, which produces the sorted
  result the algorithm requires.
* **Own additions:**
  * the `en` input, for idle cycles;
  * the asynchronous `rst_n` (the original only states that the contents start
    at zero);
  * `clr` winning over an operation in the same cycle;
  * the cascade port names and wiring;
  * the binary `order` input. The original pin list (67 pins) is not known.
* **Behaviour the original leaves open.** The original does not say what
  happens when a full row takes another sample, or when a value that is not
  stored is deleted. The behaviour described above (smallest item pushed out,
  too-small sample dropped, largest item below the value removed) follows from
  the shift rules and is what the RTL does.
* **Selection circuit.** The original's "dynamic selection circuit" is a plain
  multiplexer here.
* **Not built.** The following are outside the RTL:
  * the transistor cells, with their weak keeper inverter;
  * the pads;
  * the line delays of a 2-D filter;
  * an ascending-order variant (smaller items on the left), which is possible
    but not the main configuration.

## Files

| file | content |
|------|---------|
| `rtl/scam_pkg.sv` | default sizes, `scam_op_e`, `sort_ctrl_t` |
| `rtl/sort_cell.sv` | one stored word |
| `rtl/compare_cell.sv` | comparator and control gates |
| `rtl/scam_pe.sv` | one PE (sort cell + compare cell) |
| `rtl/scam_array.sv` | row of N PEs with cascade edges; asserts the row stays sorted |
| `rtl/selection_unit.sv` | rank multiplexer |
| `rtl/odi_chip.sv` | top level: SCAM row and selection unit |
| `tb/*_tb.sv` | self-checking testbenches, one per module |
| `tb/odi_image_median_tb.sv` | 3×3 … 8×8 sliding-window image median filters |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops.

Build and run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/scam_pkg.sv tb/odi_chip_tb.sv --top-module odi_chip_tb -o sim
./obj_dir/sim
```

Replace `odi_chip_tb` with any other testbench name. To lint the RTL, run
`verilator --lint-only -Wall -Irtl rtl/scam_pkg.sv rtl/odi_chip.sv`. The only
warning is about the copy of the sample handed out of the last PE, which
nothing reads.

## How far it is verified

Every module has a self-checking testbench against an independent model:

* the cells are driven with random controls;
* `scam_array_tb` runs the five-entry example above and 3000 random
  insert/delete/idle/clear operations on an 8-entry row with many ties;
* `odi_chip_tb` runs at full size (64 × 8) with no parameter overrides.

`odi_chip_tb` checks the following:

* the median after every one of 64 inserts, with no extra cycle;
* every rank of the full chip;
* overflow through `min_out`;
* loads at the first and last PE;
* ties, idle cycles, deletes of stored and unstored values, and clear;
* a 9-sample running median;
* two cascaded chips against a 128-entry model, with items crossing the chip
  boundary.

`odi_image_median_tb` filters a 20×20 image with impulse noise using 3×3,
5×5, 7×7 and 8×8 windows. It checks every output pixel against a direct
median and checks the 2k clocks per pixel.

Timing and area are not characterised. The original chip reached 50 MHz in a
1.2 µm process. Any figure for this RTL depends on the target technology.
