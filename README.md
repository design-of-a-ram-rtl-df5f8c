# 32 x 18 readout RAM for a multi-channel radiation-detector chip

A multi-channel front-end chip for nuclear-physics detectors produces a
handful of analog values per event: in the eight-channel pulse-shape chip
this RAM is sized for, each channel gives three gated-integrator results and
one time-to-voltage converter result, 32 values in all. An on-chip 12-bit,
2 MSample/s ADC digitizes them. The results must then wait on the chip until
a slow serial link to the host reads them out. This RAM is that waiting room:
32 locations of 18 bits, one location per digitized value. Each word carries
the 12-bit sample, the 3-bit channel number, the 2-bit sub-channel number and
one spare bit that lets a 16-channel chip use the same memory.

The circuit is a plain static RAM of the classic kind. A NOR-gate decoder
turns the 5-bit address into one of 32 word lines, and each of the 18 columns
has a precharge and write circuit on a complementary bit-line pair. The array
itself is made of six-transistor cells. The RTL here models that circuit
structure at the logic level: it keeps the same blocks and the same signal
flow, not a behavioural `logic [17:0] mem[32]`. This makes it usable as a
logic model of the macro, or as a synthesizable latch-based memory.

## Record format (`ram_pkg`)

| bits    | field     | meaning                                                   |
|---------|-----------|-----------------------------------------------------------|
| [17:14] | `channel` | channel 0..7 (bit 17 is 0 for an 8-channel chip; 0..15 for a 16-channel one) |
| [13:12] | `subch`   | `SUB_INT_A`, `SUB_INT_B`, `SUB_INT_C` (the three integrators), `SUB_TVC` |
| [11:0]  | `sample`  | ADC result                                                |

The field widths follow from the channel and sub-channel counts. The order of
the fields and the sub-channel codes are this design's choice. The RAM stores
the 18 bits without looking at them; `ram_word_t` exists so that the
producer and the consumer agree.

## How a column reads and writes

This is the part that differs most from an ordinary RTL memory, and it
explains the ports of every lower-level module.

Each column has two lines, `bit` and `invbit`. In silicon, two NMOS pull-ups
hold both lines statically near VDD - VTN. The lines are never clocked: they
are high unless something pulls them down. Three kinds of operation follow
from that:

* **Idle.** No word line is high. Both lines stay at their precharge level,
  so the output of every column reads 1.
* **Read.** One word line is high and `write` is low. In each column the
  selected cell connects both its nodes to the lines. The node holding 0
  discharges its line, so `bit` ends up equal to the stored bit and
  `invbit` to its complement. The cell's transistors are sized so that this
  discharge cannot flip the cell. A *read upset* (both lines low with a cell
  selected) must never happen, and the model reports it on `read_upset`.
* **Write.** `write` closes two switches that connect the column's data
  input to the lines: `IN` on `bit` and its inverse on `invbit`. Both come
  from a chain of two inverters. These drivers are stronger than a cell, so
  the selected cell is forced to the new value. A cell behaves like a
  set/reset latch: `bit` pulled low resets it and `invbit` pulled low sets it.

A two-state logic simulator cannot model a line that several devices pull on
at once. So the models split each line into its two directions:

```
              drv_bit / drv_invbit          (column -> cells: write level, 1 = released)
 ram_precharge_write  ------------------>  sram_cell  (x 32 per column)
              <------------------
              pd_bit / pd_invbit            (cells -> column: "I discharge this line")
```

`sram_array` ORs the discharge requests of all cells in a column. That OR is
the wired-AND of the real line. `ram_precharge_write` resolves the line
level as follows:

```
bit    = write ? IN  : ~(any cell discharges bit)
invbit = write ? ~IN : ~(any cell discharges invbit)
out    = bit
```

A cell stores only from the drive levels, never from the resolved lines, so
the model has no combinational loop. The output is the bit line itself.
While writing it therefore follows the input, and while idle it reads all
ones. On the chip, output buffers restore the reduced bit-line swing to full
logic levels. In logic that restoration is a wire, so it has no module.

## Row decoder (`ram_row_decoder`)

Word line `r` is the NOR of five address literals: `A_k` where bit `k` of
`r` is 0, and `~A_k` where it is 1. So row 0 is `NOR(A0..A4)` and row 31 is
`NOR(~A0..~A4)`. On silicon each gate is a pseudo-NMOS NOR, chosen because it
is smaller and faster than a static CMOS NAND or NOR. The gate has a sixth
pull-down input. This design uses it as the decoder disable: `dec_en = 0`
turns every word line off, which leaves the bit lines precharged and makes a
write reach no cell.

## The cell (`sram_cell`)

The cell is one latch (`always_latch`), transparent while its row is
selected and one of the driven lines is low. The whole array is therefore
576 latch bits and no flip-flops. That is intended: it is the storage of a
static RAM, and lint's remarks about the latch are expected.

## Timing and how to drive it

There is no clock. Everything is level sensitive, as in the transistor
circuit:

* **Read.** Keep `write` low, raise `dec_en` and apply `addr`; `out` follows
  combinationally.
* **Write.** Apply `addr` and `inp`, then pulse `write` while both are
  steady. Alternatively, keep `write` high and change the address first and
  the data after it: the row just left keeps its value, and the newly
  selected row takes the new data once it arrives. The reference test
  sequence writes one word every 200 ns (5 MHz) this way.
* **Do not change** the address and the data of a write in a way that lets
  the old row see the new data while it is still selected.

At 200 ns per word, a 32-value event is stored in 6.4 us. That is well
inside the 16 us that a 2 MSample/s converter needs to produce those 32
values.

## Ports of `ram_buffer` (the top)

| port           | dir | width      | meaning |
|----------------|-----|------------|---------|
| `addr`         | in  | 5          | location |
| `dec_en`       | in  | 1          | decoder enable; 0 deselects every row |
| `write`        | in  | 1          | drive `inp` onto the bit lines |
| `inp`          | in  | 18         | data to store |
| `out`          | out | 18         | bit lines = data read (or `inp` while writing, all ones while idle) |
| `read_upset`   | out | 1          | some column has both lines low |
| `bit_lines`, `invbit_lines` | out | 18 each | resolved line levels, for observation |
| `cells`        | out | 32 x 18    | every stored bit, for observation |

Parameters: `WORDS` (default 32) and `WIDTH` (default 18). The address width
is `$clog2(WORDS)`.

## Where this model departs from the circuit, and what it leaves out

* **Analog behaviour is not modelled.** This covers transistor sizing, the
  reduced precharge level, read-upset margins, access times, supply and
  temperature corners, and layout. The RTL captures only the logic function
  and the signal structure.
* **No sense amplifier.** The circuit reads the bit lines directly, which is
  adequate at 32 rows. Larger versions would add one.
* **Added pins.** The `dec_en` pin and the observation ports are this
  design's additions.
* **Not included.** The ADC that fills the RAM, the serial host link that
  empties it, and the analog front end are outside this RTL. `inp` and
  `addr`/`out` are where they would connect.
* **Depth.** An 8-channel chip with 12 fast and 12 slow integrators per
  channel would need about 256 locations. The RTL takes `WORDS = 256`.
  However, simulations here were run at 32 words only: Verilator's build
  time grows steeply with the number of latch cells (2.5 s at 32 words,
  about 18 s at 64).

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ram_pkg.sv tb/ram_buffer_tb.sv \
          --top-module ram_buffer_tb -Mdir obj_ram_buffer
obj_ram_buffer/Vram_buffer_tb
```

Replace the testbench and top-module names to run the others. The other
modules are found through `-Irtl`.

| testbench                 | what it shows |
|---------------------------|---------------|
| `ram_row_decoder_tb`      | all 32 addresses, enabled and disabled: exactly the addressed line, or none |
| `sram_cell_tb`            | write 0/1, hold while deselected or precharged, discharge only when selected |
| `ram_precharge_write_tb`  | all 16 input combinations of the column circuit |
| `sram_array_tb`           | every row written and read back, overwrites, no discharge with no row selected |
| `ram_buffer_tb`           | full RAM at its default size. An LFSR fill of all 32 words at 200 ns per word with `write` held high (fill time checked). An idle phase with all-ones output. A down-counting read-back. Blocked writes with the decoder off. 400 random overwrites and reads. It counts each of these and fails if one never happened. |
| `ram_event_readout_tb`    | one event of an 8-channel chip (8 x 4 records) and one of a 16-channel chip (16 x 2 records) stored as `ram_word_t` and decoded back |
