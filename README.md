# RaPiD-Benchmark: a reconfigurable pipelined datapath in SystemVerilog

RaPiD is a coarse-grained reconfigurable array for repetitive, pipelined
computations such as filters, convolutions, matrix products, DCTs and
motion estimation. It does not work at the bit level like an FPGA. It is a
linear chain of word-wide functional units (ALUs, multipliers, small RAMs,
registers) joined by segmented 16-bit buses. An application is mapped onto
the chain as one deep pipeline.

The central idea is the split of the control bits into two kinds:

* **Hard control.** Most bits decide which unit drives which bus
  segment, how many pipeline registers sit on a connection, and unit modes.
  These bits stay fixed for the whole application and live in a static
  configuration memory, as in an FPGA.
* **Soft control.** A minority of bits change from cycle to cycle:
  multiplexer selects, ALU operations, RAM write and address-step bits.
  They are not stored per cell. A short *instruction word* enters at the
  left end of a second, one-bit-wide reconfigurable fabric (the *control
  path*). It flows along beside the data. Small LUTs and optional inverters
  in each cell turn it into that cell's soft control bits.
* **The instruction word itself** comes from a few tiny loop controllers
  that run the application's loop nest.
* **Data** is streamed in and out of memory by address generators and
  FIFOs.

The RTL here builds the configuration that was proposed as the benchmark
design:

* 16 cells, each with 3 ALUs, 3 RAMs of 64 words, 6 general-purpose
  registers and one 16x16 multiplier.
* 14 data tracks and 32 control tracks.
* 4 loop controllers.
* 3 input and 3 output streams with 16-entry FIFOs.

## Words, tags and the lock-step clock

A data word is 17 bits: 16 data bits plus a *tag* bit (`word_t` in
`rapid_pkg`). A functional unit can be configured to set the tag on
overflow. A tag on any operand is carried into the result, so an overflow
shows up in the output stream instead of being lost.

There is one global advance signal, `adv`. It is high when both of these
hold:

* the instruction generator has a word;
* no stream wants to read an empty input FIFO or write a full output FIFO.

When `adv` is low, every pipeline register holds: ALU and multiplier
registers, RAMs, bus-connector delays, control-path registers and the
instruction stream. Data and control therefore stay aligned through any
stall, and a program never has to count memory latencies.

## The datapath cell (`dp_cell`)

### Units and their order

Left to right, a cell holds these units (the layout follows the
benchmark's floorplan):

`GPR0 RAM0 ALU0 GPR1 RAM1 ALU1 GPR2 | MULT GPR3 GPR4 RAM2 ALU2 GPR5`

There are 14 unit outputs. They are numbered as follows in the hard
driver-enable matrix `hc.drv[output][track]`:

| out | unit | out | unit |
|---|---|---|---|
| 0 | GPR0 | 7 | MULT high half |
| 1 | RAM0 | 8 | MULT low half |
| 2 | ALU0 | 9 | GPR3 |
| 3 | GPR1 | 10 | GPR4 |
| 4 | RAM1 | 11 | RAM2 |
| 5 | ALU1 | 12 | ALU2 |
| 6 | GPR2 | 13 | GPR5 |

There are 20 unit inputs, each with its own 15:1 multiplexer (`track_mux`):
code 0 is ground, and code k is track k-1. Each select is 4 soft bits, so
the 20 selects give 80 of the cell's 104 soft bits.

| mux | input | mux | input |
|---|---|---|---|
| 0 | GPR0 | 10 | GPR2 |
| 1 | RAM0 data | 11 | MULT a |
| 2 | RAM0 address | 12 | MULT b |
| 3 | ALU0 a | 13 | GPR3 |
| 4 | ALU0 b | 14 | GPR4 |
| 5 | GPR1 | 15 | RAM2 data |
| 6 | RAM1 data | 16 | RAM2 address |
| 7 | RAM1 address | 17 | ALU2 a |
| 8 | ALU1 a | 18 | ALU2 b |
| 9 | ALU1 b | 19 | GPR5 |

Multiplexers 0–10 read the left half of the cell's tracks and 11–19 the
right half. The difference matters only on tracks that are split in the
middle.

### Units

* **ALU (`rapid_alu`).** It has 6 soft bits: a 4-bit operation, carry in
  and accumulate. The operations are:
  * pass;
  * add and subtract, signed or unsigned for overflow;
  * absolute difference;
  * AND, OR, XOR and NOT;
  * min and max.

  Carry in and the status output let two ALUs form a 32-bit add. With
  accumulate set, operand a is replaced by the ALU's own output register,
  which is how multiply-accumulate is built. The status output gives
  carry/borrow, a<b, or "result non-zero", depending on the operation.
  Status goes to the control path without delay. Hard bits: a tag-on-overflow
  enable and the output ConfigDelay.
* **Multiplier (`booth_mult`).** A radix-4 Booth multiplier in two pipeline
  stages:
  * stage 1 forms two partial sums;
  * stage 2 adds them, optionally rounds, and shifts right by 0–31.

  Both 16-bit halves of the 32-bit result are separate outputs, each with
  its own ConfigDelay. The 8 hard bits are shift[4:0], signed, round and
  tag enable.
* **RAM (`local_ram`).** 64 words, with a registered read and
  read-before-write. Soft bits: write enable and counter increment. A hard
  bit chooses the address source: the data word on the address input, or
  a local counter that steps when the increment bit is set. A RAM is
  therefore a FIFO, a delay line or a lookup table without any address
  arithmetic in the datapath.
* **General-purpose register (`gp_register`).** A multiplexer followed by a
  ConfigDelay. It holds constants, adds pipeline delay, or moves a value
  from one track to another.

### ConfigDelay

Every unit output passes through a `config_delay`. This is a chain of
three registers plus a 4:1 multiplexer, set by 2 hard bits to 0, 1, 2 or 3
cycles of delay. This is how a mapping balances pipeline depths without
spending units on it. Bus connectors carry the same structure.

### Tracks, segments and bus connectors

A track is cut into segments. Each segment is a shared bus with one
tristate driver per unit output; the hard bit `hc.drv[o][t]` enables
output o on track t.

Tristate buses are modelled as a *priority chain* (`bus_segment`): the
lowest-numbered enabled driver wins, and an undriven segment reads 0. In
silicon this mirrors the daisy-chained priority that keeps two drivers
from fighting while configuration bits change. In RTL it keeps everything
two-state and synthesizable.

The segmentation chosen for the 14 tracks uses exactly the benchmark's
15 bus connectors per cell:

| tracks | segments | connectors |
|---|---|---|
| 0–1 | half-cell | none (fixed breaks) |
| 2–3 | one per cell | none |
| 4–8 | one per cell | one at the left cell edge (connector t-4) |
| 9–13 | half-cell | at the left edge (connector t-4) and in the middle (connector t+1) |

A `bus_connector` joins two adjacent segments. Its mode is open, drive
right or drive left, and it passes through its own ConfigDelay. A row of
connectors set to drive right with delay 1 is a pipelined bus across the
whole array, the most common structure in mappings.

## The control path (`cp_cell`)

Under each datapath cell sits a control-path cell with 32 one-bit control
tracks:

* **Segments and connectors.** One segment per track per cell, and one
  connector per track at the left cell edge (open/right/left plus
  ConfigDelay).
* **Three 3-LUTs (`lut3`).** Each has three 5-bit track selects, an 8-bit
  truth table and a ConfigDelay, and can drive any track.
* **ALU status drivers.** Each of the three ALU status bits can be driven
  onto any track.
* **104 optional inverters (`optional_inverter`), one per soft bit.** Each
  selects ground or a track (6-bit select, 0 = ground), optionally inverts
  it, registers it and passes it through a ConfigDelay.

A soft bit that is constant for the application selects ground and sets or
clears its invert bit. So a constant costs no instruction bits, which is
why the instruction word can be short.

The 104 inverter outputs form the cell's soft bits in the order of
`dp_soft_t`: 20 multiplexer selects, then 3 ALU fields, then 3 RAM fields.
Because of the inverter's register, soft control reaches a unit one cycle
after the bit sits on its control track, plus any ConfigDelay on the way.

At the left end of the array each control track's first segment can take
any instruction bit (`edge_cfg_t.ib_sel[t]`: 0 = none, k = bit k-1).

## The instruction generator (`instr_gen`)

There are four programmed controllers (`loop_sequencer`). Each executes
*C-instructions* of 35 bits, `{op[2:0], cnt[15:0], arg[15:0]}`:

| op | C-instruction | effect |
|---|---|---|
| 0 | `halt` | stop |
| 1 | `inst CNT I` | issue instruction word I, CNT times |
| 2 | `loop CNT LAST` | run the C-instructions from the next one up to LAST, CNT times |
| 3 | `signal NUM` | release controller NUM's next (or current) wait |
| 4 | `wait I` | issue word I every cycle until a signal arrives |

Loops nest through a counter stack. A C-instruction can close several
loops at once. All of them are resolved in the same cycle, so no gap
appears in the instruction stream at the edge of a loop nest.

Each controller hands out `(word, count)` entries. `merge_repeat` repeats
each entry's word `count` times. It issues one merged word per advance:
the bitwise OR of the current words of all running controllers. If a
running controller has no word ready, nothing is issued (`instr_stall`).
This keeps parallel loops in step. `ctrl_sync` keeps one pending flag per
controller:

* a `signal` sets the flag;
* a `wait` consumes the flag;
* a signal that arrives before the wait is remembered.

## Streams (`stream_manager`)

There are three input and three output streams. Each has two parts:

* **An address generator (`addr_gen`).** This is the same loop sequencer,
  with a payload of `{stride, base}`, followed by a repeater that adds the
  stride on each repeat. One C-instruction can therefore describe a whole
  strided run.
* **A 16-entry show-ahead FIFO (`stream_fifo`).**

The memory interface (`mem_if`) works as follows:

* It has three external ports. Port p is shared by input stream p and
  output stream p, with round-robin arbitration.
* Each port has a ready input for back-pressure, and reads return one
  cycle after the request.
* An input stream issues a read only when its FIFO has room for every read
  still in flight. A FIFO therefore never overflows, however slow the
  memory is.

Input FIFO s drives the left-end data segments selected by
`edge_cfg_t.in_drv[s]`. Output FIFO s takes the right-end track chosen by
`edge_cfg_t.out_sel[s]`. The read and write strobes are soft bits too: six
more optional inverters (`edge_cfg_t.strm`) read the right end of the
control path. A FIFO access is therefore programmed through the
instruction word like any other control.

The array halts (adv low) when a strobe reads an empty input FIFO or
writes a full output FIFO.

## Configuration image (`config_mem`)

The configuration is one flat vector made of these records:

* `NCELLS` `cell_cfg_t` records (cell c in bits
  `[c*CELL_CFG_BITS +: CELL_CFG_BITS]`), each holding:
  * `dp_hard_t`: driver enables, delays, connectors, unit modes;
  * `cp_cfg_t`: inverter, LUT, status-driver and control-connector settings;
* one `edge_cfg_t` in the top bits.

It is written as 16-bit words, in any order, through
`cfg_we/cfg_addr/cfg_wdata`: word k holds bits `[16k+15:16k]`. Reset and
power-up clear it, which turns every driver off.

Build an image by filling those structs and casting them into the vector,
as `tb/tb_rapid_top.sv` does. A field of `dp_soft_t` can be located by
setting it in an otherwise zero struct and finding the set bits.

## A worked mapping

`tb/tb_rapid_top.sv` runs a complete mapping on the full 16-cell array.
It is the best place to see how everything fits together. The mapping is:

* **Data path.** Input streams x and y enter on data tracks 4 and 5. ALU0
  of cell 0 combines them. Its result is driven onto track 6, which is set
  as a pipelined bus (one register per connector) through the other 15
  cells to output stream 2.
* **Control.** Instruction bit 0 selects add or subtract, through two
  optional inverters that drive ALU0's opcode bits. Bit 1 is the input-read
  strobe, carried on a zero-delay control track. Bit 2 is the output-write
  strobe, carried on a control track with one register per cell, so it
  arrives exactly when the result does.
* **Programs.** Controller 0 runs `signal 1; loop 3 {inst 20 add; inst 12
  sub}; inst 17 drain; halt`. Controller 1 waits for the signal before
  issuing its own words.
* **Stalls.** The testbench's memory model withholds ready on an input
  port and then on the output port. This causes FIFO-empty and FIFO-full
  halts in the middle of the run.

The test checks all of the following:

* every result word in memory;
* that each result leaves exactly 16 array cycles after its operands
  entered;
* that there is one array cycle per instruction word;
* that the loop, signal/wait, instruction stall, empty halt and full halt
  each occurred.

## A 16-tap FIR filter

`tb/tb_rapid_fir.sv` maps the first benchmark application onto the
16-cell array and checks 285 outputs of y[m] = sum over j of h[j]·x[m-j].

* **Coefficients.** Input stream 1 sends h[0..15] onto data track 5. That
  track has one register per cell, so cell k sees the stream k cycles
  late. One instruction bit, on a zero-delay control track, strobes the
  write enable of RAM0 in every cell at the same moment. Cell k therefore
  stores h[15-k]. RAM0's address comes from ground (word 0), and it is
  read every cycle onto the cell-local track 2.
* **Input.** Input stream 0 drives track 4, which runs through all cells
  with zero-delay connectors, so every cell sees x at the same time.
* **Multiply-add.** Each cell's multiplier forms h·x on track 3. ALU0 adds
  the partial sum arriving from the cell to its left. Even cells read
  track 7 and write track 8, odd cells the reverse. The ALU's output
  register is the one pipeline stage per cell. Output stream 2 takes cell
  15's sum from track 7.

The program is six `inst` C-instructions. It issues one word per cycle,
so the array produces one output per cycle whenever memory keeps up. The
test checks that exactly one array cycle is spent per instruction word
while memory stalls at random. Two timing rules show up in the program:

* a strobe acts one array cycle after its word;
* a RAM shows a written word one cycle after the write.

## A block-matching kernel

`tb/tb_rapid_sad.sv` runs the inner step of motion estimation: the sum of
absolute differences between an 8x8 block and a candidate position.

* ALU0 of cell 0 forms |x − y| from two input streams.
* ALU1 adds that into its own output register, using the accumulate soft
  bit.
* One instruction bit drives the accumulate bit. It is low for the first
  pixel of each block, which restarts the sum.
* A second bit writes the finished sum to an output stream.
* The C-program is a `loop` over the candidates. Each of the 24 sums is
  checked.

A full search would give each cell its own candidate. That needs the same
configuration replicated with different delays, which the test does not
cover.

## Throughput of the benchmark applications

All figures assume a 100 MHz array clock, at which 16 multipliers give
1.6 G multiply-accumulates per second.

| application | per-cycle work | rate | fits the 16-cell array |
|---|---|---|---|
| 16-tap FIR | 16 MACs | 100 M samples/s | yes: 16 multipliers |
| 1024-tap FIR | 64 taps per multiplier | 1.56 M samples/s | yes: 1024 coefficients in 3072 RAM words |
| 2-D convolution, 4x4 | 16 MACs | 100 M pixels/s | yes: 3 memory accesses per cycle on 3 ports |
| 128x128 matrix multiply | 2^21 MACs | 763 matrices/s | yes, with tiling |
| 8x8 DCT | 1024 MACs per block | 1.56 M blocks/s | yes |
| motion estimation, 8x8 block in 24x24 window | 289 x 64 differences | about 86.5 K blocks/s | yes: 640 words of local memory |

## Departures and open points

These choices are not fixed by the RaPiD-Benchmark description, or
differ from it:

* **Track segmentation and connector placement.** The benchmark fixes only
  the counts (14 tracks, 15 connectors, 14 outputs, 20 multiplexers), so
  the placement is a choice.
* **ALU.** The operation set and its encoding are chosen here, as is the
  meaning of the status bit.
* **Encodings.** The RAM control bits and the C-instruction format are
  this design's own.
* **Control bus connectors.** The benchmark's area table lists 104 per
  cell. This design uses 32, one per control track at the cell edge; the
  104 inverter input multiplexers do the rest of the selection.
* **Optional-inverter select.** The benchmark calls it 32:1. Here it has 33
  codes, because ground must also be selectable for constant soft bits.
* **Merge rule.** The merger issues nothing while any running controller
  is out of words. Other rules would be possible.
* **Streams and memory ports.** Stream-to-port pairing, round-robin
  sharing and the one-cycle read latency are this design's model of
  external memory. Memory-mapped sensors are reached only through ordinary
  addresses.
* **Not built:**
  * the inter-row bus connectors that join several rows of cells;
  * a host processor;
  * the external memories.

  The three memory ports are brought out of the top level.

Lint reports combinational loops (UNOPTFLAT) through the bus segments.
These paths exist in the netlist because any driver can reach any track.
A loop closes only for a contradictory configuration. The affected modules
explain this in their headers.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/rapid_pkg.sv $(ls rtl/*.sv | grep -v rapid_pkg) tb/tb_rapid_top.sv \
  --top-module tb_rapid_top -Mdir obj_top
obj_top/Vtb_rapid_top
```

`tb_rapid_top`, `tb_rapid_fir` and `tb_rapid_sad` run the whole array at its default size
(16 cells); most of their run time is the Verilator build. The block testbenches (`tb_dp_cell`,
`tb_instr_gen`, `tb_stream_manager`, ...) run in seconds. They build their
stimulus with `$urandom` and compute expected values independently.

## Files

The package and primitives:

* `rtl/rapid_pkg.sv`: sizes, word and configuration record types, opcodes.
* `rtl/config_delay.sv`, `track_mux.sv`, `bus_segment.sv`,
  `bus_connector.sv`: interconnect primitives.

Datapath:

* `rtl/rapid_alu.sv`, `booth_mult.sv`, `local_ram.sv`, `gp_register.sv`:
  functional units.
* `rtl/dp_cell.sv`: the datapath cell.

Control path:

* `rtl/optional_inverter.sv`, `lut3.sv`, `cp_cell.sv`: the control path.

Instruction generator:

* `rtl/loop_sequencer.sv`, `ctrl_sync.sv`, `merge_repeat.sv`,
  `instr_gen.sv`.

Streams:

* `rtl/addr_gen.sv`, `stream_fifo.sv`, `mem_if.sv`, `stream_manager.sv`.

Top level:

* `rtl/config_mem.sv`, `rapid_top.sv`.
