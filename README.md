# Pulsed-latch shift register feeding a small SRAM

A long shift register is mostly storage: between two stages there is no logic
at all, so the size and power of each stage matter far more than its speed.
A latch opened by a short clock pulse is about half the size of a master-slave
flip-flop, but a chain of such latches opened by one shared pulse does not
work: while the pulse is high, a latch's output changes and the next latch,
also open, passes the new value straight on. Data races through several
stages in one cycle.

This design makes a chain of pulsed latches behave as a shift register by
giving the latches **different pulses, fired in reverse order**: a latch is
opened only after the latch it feeds has already captured the old value and
closed again. To keep the number of distinct pulses small, the chain is cut
into groups of four latches that all share the same five pulses, and each
group ends in an extra **temporary latch** that holds the bit leaving the
group until the next group has taken it.

The 256-bit register built this way collects serial data; its parallel
contents are then written as one word into a small static RAM of 8 rows of
256 cells, addressed by a 3-bit row address, and read back through bit-line
sense amplifiers.

## How one shift works

A sub shift register holds data latches Q1..Q4 and a temporary latch T.
Five pulsed clocks, `CLK_pulse<T>`, `<4>`, `<3>`, `<2>`, `<1>`, follow each
rising clock edge in that order, one at a time, never overlapping:

| order | pulse          | latch written | takes            |
|-------|----------------|---------------|------------------|
| 1     | `CLK_pulse<T>` | T             | Q4               |
| 2     | `CLK_pulse<4>` | Q4            | Q3               |
| 3     | `CLK_pulse<3>` | Q3            | Q2               |
| 4     | `CLK_pulse<2>` | Q2            | Q1               |
| 5     | `CLK_pulse<1>` | Q1            | serial input, or T of the previous group |

Every latch is written while its input is constant, because the latch that
drives it is written later. The same five pulses go to all 64 groups at once.
The bit leaving group *g* is first copied into T of group *g*, and only at the
very end of the sequence (pulse `<1>`) is it copied into Q1 of group *g+1*;
by then Q4 of group *g* has already been overwritten, which is why T is
needed. The cost is one latch per four bits (320 latches for 256 bits); the
gain is that five pulses serve any length.

After rising edge *n* the latches hold:

* `Q(i)` = serial input sampled at edge *n−i+1* (Q1 is the newest bit);
* `T` of group *g* = the same bit as Q1 of group *g+1*.

So the register as a whole is an ordinary 256-stage serial-in, parallel-out
shift register that moves one bit per clock.

## Making the five pulses

`delayed_pulse_clock_gen` chains five identical clock-pulse circuits. Each one
passes its clock through a delay element and an inverter, ANDs the clock with
that delayed inverted copy (a pulse as long as the delay plus one inverter,
starting at the rising edge), and restores the delayed clock with a second
inverter to drive the next circuit. The first circuit's pulse becomes
`CLK_pulse<T>`, the next ones `<4>`, `<3>`, `<2>`, `<1>`; each goes through a
clock buffer. Because each stage's clock is the previous stage's clock
delayed by its own pulse width plus one inverter, the pulses follow one
another with a one-inverter gap. Falling clock edges produce no pulses.

The delay values are not fixed by anything outside this design; the defaults
in `sram_pl_pkg` are:

| constant      | value  | effect                                        |
|---------------|--------|-----------------------------------------------|
| `T_DELAY_PS`  | 200 ps | delay element                                 |
| `T_INV_PS`    | 50 ps  | each inverter                                 |
| `T_BUF_PS`    | 100 ps | clock buffer                                  |
| pulse width   | 250 ps | `T_DELAY_PS + T_INV_PS`                       |
| pulse pitch   | 300 ps | `T_DELAY_PS + 2*T_INV_PS`                     |
| last pulse ends | 1.55 ns after the edge | `T_BUF_PS + 4*300 + 250`      |

Two timing rules follow. The clock must stay high longer than 1.55 ns, or the
falling edge cuts the later pulses short. And the serial input must be stable
from the rising edge until the last pulse has ended. The testbenches use a
10 ns clock and change inputs on the falling edge.

These two modules (`clock_pulse_circuit`, `delayed_pulse_clock_gen`) are
**behavioural models**: their function exists only through `#` delays. They
simulate correctly with `verilator --timing`, but a synthesis tool drops the
delays, turning every pulse into `clk & ~clk = 0`; the shift register latches
are then never opened and are optimised away. A silicon or FPGA
implementation has to provide the generator as a hand-built delay chain
(custom cells or placed delay primitives) behind the same five outputs.
Everything else is synthesizable as written.

## The memory

Each storage cell is the classic six-transistor cell: two cross-coupled
inverters holding a bit, and two pass transistors joining its two nodes to a
pair of bit lines, BL and ~BL, while the row's word line is high. The RTL keeps
this organisation but not the transistors:

* `wordline_decoder` raises the word line of row `addr` when the memory is
  enabled.
* Write: the write drivers put the shift register word on BL and its
  complement on ~BL; on the clock edge every cell of the selected row takes
  it (`sram_array`). A column whose two lines are both high (not driven)
  keeps its value.
* Read: both lines start precharged high; each selected cell pulls down the
  line on its 0 side. `sram_array` outputs the resulting levels.
* `sense_amp` reads each pair: the line still high tells the value. The
  sensed word is registered into `dout`.

### Top-level ports (`sram_pl_top`)

| port         | dir | width | meaning                                   |
|--------------|-----|-------|-------------------------------------------|
| `clk`        | in  | 1     | clock; also drives the pulse generator    |
| `rst`        | in  | 1     | active-high asynchronous reset            |
| `in`         | in  | 1     | serial data into the shift register       |
| `en`         | in  | 1     | memory enable                             |
| `load`       | in  | 1     | 1 = write, 0 = read (when `en` = 1)       |
| `addr`       | in  | 3     | row address                               |
| `dout`       | out | 256   | last word read                            |

Per rising clock edge:

| `en` | `load` | operation                                              |
|------|--------|--------------------------------------------------------|
| 0    | x      | idle: no word line, `dout` holds                       |
| 1    | 1      | write: row `addr` ← shift register word before this edge |
| 1    | 0      | read: `dout` ← row `addr`, visible right after the edge |

The shift register shifts on every edge whatever `en` and `load` are. A word
written at edge *n* has bit *i* equal to `in` sampled at edge *n−1−i*
(bit 0 newest, bit 255 oldest). `rst` clears the shift register and `dout`;
the cells, like real SRAM cells, are not reset and start with arbitrary
contents.

## Module map

```
sram_pl_top
├── pl_shift_register          256-bit serial-in, parallel-out register
│   ├── delayed_pulse_clock_gen   five ordered pulses   (behavioural)
│   │   └── clock_pulse_circuit ×5                      (behavioural)
│   └── sub_shift_register ×64    4 data latches + 1 temporary latch
│       └── pulsed_latch ×5
├── wordline_decoder           addr → one-hot word lines
├── sram_array                 8 × 256 cells on word/bit lines
└── sense_amp                  bit-line pairs → registered dout
```

`sram_pl_pkg` holds the shared sizes, the delay constants and the
`mem_op_e` operation type.

| parameter  | default | where                                      |
|------------|---------|--------------------------------------------|
| `WIDTH`    | 256     | word / shift register length               |
| `SUB_BITS` | 4       | data latches per group (five pulses = `SUB_BITS`+1) |
| `ADDR_W`   | 3       | row address width; rows = 2^`ADDR_W`       |

`WIDTH` must be a multiple of `SUB_BITS` (checked by an elaboration
assertion). Changing `SUB_BITS` changes the number of pulses, and the clock
high phase must grow with it: `T_BUF_PS + SUB_BITS*300 + 250` ps with the
default delays.

## What is fixed and what was chosen here

Taken from the design being reproduced: the pulsed latch as storage element;
the grouping into 4-bit sub shift registers with a temporary latch each; the
five pulses and their reverse order; the structure of the pulse circuit
(delay, two inverters, AND, buffer); the 256-bit length; the 6T cell with
word line and bit-line pair and its read and write behaviour; the SRAM's
port list (`clk`, `rst`, `in`, `en`, `load`, `addr[2:0]`, `dout[255:0]`, 264
signals in all).

Chosen in this implementation, with nothing to go on beyond port names:

* what `en` and `load` do (table above), and that the register keeps
  shifting regardless;
* 8 rows, read from the 3-bit address;
* a registered, one-cycle read and a clocked write instead of a
  word-line-pulse timed macro;
* asynchronous reset of every latch and of `dout`;
* all delay values;
* the behaviour of undriven or non-complementary bit-line pairs;
* bit order of the word;
* `pl_shift_register` brings its 64 temporary latches out as port `t`, for
  observation only (the top leaves them unconnected).

Not modelled at all: the transistor-level cell and the analog sense
amplifier (the RTL captures their logic function only), and any FPGA or
process-specific timing.

## Simulating

All files use `` `timescale 1ps/1ps ``. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/sram_pl_pkg.sv \
          tb/sram_pl_top_tb.sv --top-module sram_pl_top_tb
./obj_dir/Vsram_pl_top_tb
```

`--timing` is required: the pulse generator runs on delays. Each testbench
checks itself against an independent reference model and prints
`TB_RESULT checks=N failures=M`; each has a watchdog.

| testbench                  | what it shows                                             |
|----------------------------|-----------------------------------------------------------|
| `pulsed_latch_tb`          | transparent during the pulse, holding otherwise, reset   |
| `clock_pulse_circuit_tb`   | 250 ps pulse per rising edge, none on falling edges, 300 ps clock delay |
| `delayed_pulse_clock_gen_tb` | exact pulse windows in order T,4,3,2,1; never two at once; one each per cycle |
| `sub_shift_register_tb`    | one group under bench-made pulses vs. a 5-latch model     |
| `pl_shift_register_tb`     | full 256-bit register with its generator vs. a shift model, 768 cycles, reset |
| `pl_shift_register_32_tb`  | 32-bit configuration filled with ones: T1..T8 rise one after another, 4 cycles apart |
| `wordline_decoder_tb`      | all addresses, enabled and not                            |
| `sram_array_tb`            | full, partial and blocked writes; reads; precharge with no word line |
| `sense_amp_tb`             | differential sensing, hold, reset                         |
| `sram_pl_top_tb`           | whole design at full size, ~3300 random writes/reads/idles, read latency, reset, every mechanism counted |
| `sram_pl_top_fill_tb`      | whole design, directed: fill with ones, write row 2, walking-bit word in every row |

Each full-size run takes well under a minute.
