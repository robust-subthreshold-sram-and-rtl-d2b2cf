# Ultra-low power asynchronous FIFO with self-adaptive power gating

A wireless body-area sensor node spends most of its life collecting samples
slowly and only briefly ships them out. Its data buffer, a FIFO, dominates the
node's area and power, and at sub-1 V supplies most of that power is leakage
in the storage array. This FIFO cuts the leakage with one observation: in a
first-in first-out memory, which words hold data follows from the accesses
alone. A word fills when the write pointer passes over it and empties when the
read pointer passes over it. So each word can have its own supply switched off
while it is empty, with no extra bookkeeping beyond a set/reset latch per word.

The RTL here describes that FIFO at its original size, 256 words of 16 bits
(4 kb), with independent read and write clocks (5 MHz and 200 kHz in the
target node). It also holds a logic model of a second cell from the same work,
a single-port subthreshold 10T SRAM cell with auto-compensation. That cell is
not used by the FIFO and sits beside it in the top level.

## Structure

```
subthreshold_memory_top
├── ulp_fifo                    the FIFO (pins CEN, CLK_R, REN, CLK_W, WEN, D, Q)
│   ├── read_ctrl               READ, RD, R2 pulses from CLK_R
│   ├── write_ctrl              WRITE, WR pulses from CLK_W, write data register
│   ├── logic_pointer  (read)   256-bit one-hot ring, wordlines = ptr & RD
│   ├── logic_pointer  (write)  256-bit one-hot ring, wordlines = ptr & WR
│   ├── adaptive_power_ctrl     per-word CTRL_CELL / CTRL_READ
│   └── fifo_array              256 x 16 sram7t_cell + power switches + sense latches
└── ac10t_cell                  single-port auto-compensation cell, own pins
```

`ulp_fifo_pkg` holds the default sizes (`FIFO_WORDS = 256`, `FIFO_WIDTH = 16`).
All modules take `WORDS` and `WIDTH` parameters.

## Pins and commands

| Pin      | Dir | Meaning                              |
|----------|-----|--------------------------------------|
| `cen`    | in  | chip enable, active low              |
| `clk_r`  | in  | read clock                           |
| `ren`    | in  | read enable, active low              |
| `clk_w`  | in  | write clock                          |
| `wen`    | in  | write enable, active low             |
| `d[15:0]`| in  | write data                           |
| `q[15:0]`| out | read data                            |

| CEN | REN | WEN | Operation                                           |
|-----|-----|-----|-----------------------------------------------------|
| 1   | x   | x   | chip disabled: every word switched off, data lost   |
| 0   | 1   | 1   | hold                                                |
| 0   | 0   | 1   | read at the rising `clk_r` edge                     |
| 0   | 1   | 0   | write at the rising `clk_w` edge                    |
| 0   | 0   | 0   | read and write together, each on its own clock      |

There is **no full or empty flag**. The system that fills and empties the
FIFO keeps count, as a sensor node's controller does when it waits for "nearly
full" before transmitting. Reading an empty word returns zeros and still moves
the read pointer. Writing into a full FIFO overwrites the oldest word. Both
mistakes break the pointer order until the chip is disabled once. In this RTL,
raising `cen` also returns both pointers to word 0. That is this design's
choice; the original gives the pointers no reset.

## Timing: one clock, three pulses

Each side turns its clock into pulses by gating it with a one-cycle flag. This
is the part that needs the most care when the design is changed.

Read side (`read_ctrl`), with REN sampled low at rising edge *k*:

```
CLK_R   __/‾‾‾‾\____/‾‾‾‾\____
READ    __/‾‾‾‾‾‾‾‾‾‾\________     one cycle, from edge k to edge k+1
RD      __/‾‾‾‾\______________     READ & CLK_R : read wordline on, sense latch open
R2      _______/‾‾‾‾‾\________     READ & ~CLK_R: word marked consumed, switched off
rptr    ====word n===X=word n+1=   shifts at edge k+1
Q       ---X== word n ===========  follows the bitlines during RD, held after
```

Q is valid from the falling edge after the command edge and stays until the
next read. Reads can be issued on every `clk_r` cycle.

Write side (`write_ctrl`), with WEN and D sampled at rising edge *k*:

```
CLK_W   __/‾‾‾‾\____/‾‾‾‾\____
WRITE   __/‾‾‾‾‾‾‾‾‾‾\________
WR      _______/‾‾‾‾‾\________     WRITE & ~CLK_W: write wordline on, word switched on
wptr    ====word m===X=word m+1=
```

D is registered at edge *k* (`din_q`), so the source may change D right after
the edge. The word takes the data while WR is high and keeps it when WR falls
at edge *k+1*. This register is this design's choice; the original only says
the write driver puts the data on the write bitlines.

The pointers shift at the edge that ends a READ or WRITE cycle. The wordline
of a word is its pointer bit ANDed with RD or WR, so at most one read wordline
and one write wordline are ever on.

Because the two clocks are unrelated, a word must not be read before its write
pulse has ended, and must not be written again before its read cycle has
ended. The controller's own counts guarantee this. The FIFO does not check it.

## Per-word power states

`adaptive_power_ctrl` keeps one bit per word, `CTRL_CELL`. `fifo_array` turns
it and `CTRL_READ` into two virtual rails per word. Each rail has a PMOS and
an NMOS switch, so it is never left floating:

| Word state             | CTRL_CELL | CTRL_READ | V_VDD (cells) | V_GND (read-buffer foot) |
|------------------------|-----------|-----------|---------------|--------------------------|
| empty                  | 1         | 0         | GND           | VDD                      |
| write, 1st half        | 1         | 0         | GND           | VDD                      |
| write, 2nd half (WR)   | 0         | 0         | VDD           | VDD                      |
| holding data           | 0         | 0         | VDD           | VDD                      |
| read, 1st half (RD)    | 0         | 1         | VDD           | GND                      |
| read, 2nd half (R2)    | 1         | 0         | GND           | VDD                      |

`CTRL_CELL` changes by this rule, highest priority first:

```
if (CEN)                         CTRL_CELL = 1;  // chip disabled
else if (write wordline)         CTRL_CELL = 0;  // being written: switch on
else if (R2 && read pointer bit) CTRL_CELL = 1;  // just read: switch off
else                             hold
```

It is set and cleared by pulses from both clock domains, so it is a latch
(`always_latch`), not a flip-flop. `CTRL_READ` is simply the word's read
wordline. Keeping the read-buffer foot at VDD when the word is not read takes
the voltage off the buffers. Those buffers sit on a read bitline that is
precharged to VDD, so they no longer leak onto it. This also lowers the risk
of a read failure on a bitline shared by 256 cells.

The first half of a write leaves the word unpowered, and only then does WR
switch it on and drive it. That ordering also serves as the 7T cell's write
assist. A cell that starts from no stored state is easier to write through a
single-ended port at low voltage.

In the logic model, a switched-off word reads as all zeros. A word's data
survive only while it is on.

## Array and cells

`fifo_array` instantiates `WORDS x WIDTH` copies of `sram7t_cell`. This is a
behavioural model of a dual-Vt 7T dual-port cell, which has:

- a single-ended write port. The write wordline connects the write bitline to
  the latch. The write bitline is driven, not precharged.
- a two-transistor read buffer. With the read wordline on and its foot at
  GND, it discharges the precharged read bitline.
- six high-Vt transistors and one low-Vt transistor. This improves hold
  stability, write ability and leakage. It has no logic-level effect.

Each column's read bitline is the wired OR of its cells' discharge signals.
The sense amplifier is a latch: it is transparent while RD is high and holds
Q afterwards. Sensing polarity (a cell storing 1 discharges the bitline) is
the model's own choice.

`ac10t_cell` models the single-port, fully differential 10T cell. Its three
modes are set by WL1, WL2 and VGND:

| Mode  | WL1 | WL2 | VGND | Effect                                                     |
|-------|-----|-----|------|------------------------------------------------------------|
| hold  | 1   | 0   | GND  | data kept; a feedback path holds the 0 node                |
| read  | 0   | 1   | GND  | storage isolated; side storing 1 discharges its bitline    |
| write | 1   | 1   | VDD  | VGND at VDD removes retention, bitlines overwrite the cell |

Its bitlines are split into the level driven for a write (`bl`, `br`) and the
discharge made by the cell (`bl_pd`, `br_pd`). Any other combination of the
controls holds the data.

## How far the RTL can be trusted, and where it departs

- The control logic follows the original circuit closely. This covers the
  shift-register pointers, the clock-gated READ/RD/R2 and WRITE/WR pulses,
  the per-word set/reset rule and the complementary rail polarities.
- The cells, the sense amplifiers and the power switches are logic models of
  transistor circuits. Noise margins, leakage, dual-Vt sizing, supply voltage
  (0.5 V) and power (about 2.2 µW in the original) are not represented.
- The pointer registers are plain flip-flops. The original uses a
  low-energy master-slave latch cell for them.
- The clock-gated pulses and the latches are modelled with zero delay. In
  silicon, RD/R2/WR and the pointer shift race at the clock edges and need
  matched delays. Synthesis needs the same care: clock gating cells and
  latch timing.
- Choices made here: D is registered at the command edge, `cen` resets the
  pointers, an empty word reads as zeros, and the sensing polarity.
- The system study behind the design prefers 512 words. The default is the
  256-word block that was built. `WORDS = 512` works, but then each read
  bitline carries 512 cells, twice the 256 the original allows for reliable
  reads.

## Simulating

Every testbench in `tb/` checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ulp_fifo_pkg.sv \
    tb/tb_subthreshold_memory_top.sv --top-module tb_subthreshold_memory_top -o sim
./obj_dir/sim
```

| Testbench                    | What it checks                                                                 |
|------------------------------|--------------------------------------------------------------------------------|
| `tb_subthreshold_memory_top` | whole design at full size (256 x 16) with 200 / 5000 time-unit clocks (5 MHz / 200 kHz when read as ns): random traffic, fill to full, back-to-back drain in 256 read cycles, empty read, chip disable, per-word power states, 10T cell modes; counts every mechanism |
| `tb_ulp_fifo`                | the FIFO at 16 words, same phases, many pointer wraps                          |
| `tb_read_ctrl`, `tb_write_ctrl` | pulses in both clock halves, against a reference model                      |
| `tb_logic_pointer`           | 256-bit ring over several laps, wordline gating, reset                         |
| `tb_adaptive_power_ctrl`     | random stimulus against the set/reset rule, and the power-state table         |
| `tb_fifo_array`              | write/read through wordlines, sense latch hold, power-off data loss            |
| `tb_sram7t_cell`, `tb_ac10t_cell` | cell modes                                                                |
| `tb_wsn_data_gathering`      | sensor-node workload at 256 and at 512 words (see below)                        |

### Sensor-node workload

`tb_wsn_data_gathering` (with the helper `wsn_gathering_run`) runs the FIFO
the way the sensor node uses it. A sensor writes one sample per 200 kHz write
clock. When the FIFO is nearly full (8 words short), the processor drains it
on consecutive 5 MHz read clocks while the sensor keeps writing. There is
standby before and after. Each run checks every sample, a drain rate of one
word per read clock, and that every word is off once the FIFO is empty. It
then reports how the time splits between modes. With three fill-and-drain
rounds at 256 words, the read-clock cycles split into about 94 % write only,
4 % read and write together, 1 % standby and under 1 % idle or read only.
That matches the mix a node of this kind sees: the FIFO spends nearly all its
time collecting slowly and a few percent emptying fast.

The simulator is two-state. The testbenches start with `cen` high, which
puts every flip-flop and latch of the FIFO into a known state.
