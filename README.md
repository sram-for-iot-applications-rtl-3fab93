# A 32-byte SPI SRAM with no internal clock

This is a tiny static RAM for low-rate, low-power sensor nodes. A host
microcontroller reads and writes it over a four-wire SPI bus (`sclk`, `cs_n`,
`mosi`, `miso`). The main idea: the chip has no oscillator and no clock domain
of its own. A 5-bit counter counts the master's SCLK cycles after chip select
falls. Every internal event is then tied to a fixed cycle number: latching the
address, precharging the bit lines, opening a word line, sensing, writing.
When the master stops clocking, the chip stops switching.

The memory is 32 bytes, stored as 16 rows of 16 cells. The low address bits
A[3:0] choose the row (word line). A[4] chooses which of the two bytes in that
row is used.

## The transaction

Every access is one 16-cycle SPI mode 2 transaction:

- SCLK idles high.
- The master changes MOSI on falling edges and samples MISO on rising edges.
- The chip does the opposite: it samples MOSI on rising edges and changes
  MISO on falling edges.

Data is sent MSB first.

| cycles | MOSI                                   | MISO                    |
|--------|----------------------------------------|-------------------------|
| 1      | operation: `1` = read, `0` = write     | –                       |
| 2–6    | address A4 … A0                        | –                       |
| 7–8    | unused                                 | –                       |
| 9–16   | write: data D7 … D0; read: ignored     | read: data D7 … D0      |

Chip select must go high after the 16th cycle. On a write, this is what ends
the write. Two transactions cannot share one chip-select period. Example: to
write 0xDC to address 0x19, send `0x64 0xDC` (0x64 = `0` `11001` `00`). To read
it back, send `0xE4 0x00`. MISO returns 0xDC during the second byte.

## Cycle-by-cycle timing

"Cycle n" starts with the n-th falling edge of SCLK after chip select falls
and ends with the n-th rising edge. The counter `ctr` holds the number of
rising edges seen so far. So an event "at the rising edge of cycle n" is
decoded as `ctr == n-1` at that edge. The `CYC_*` constants in `sram_pkg`
hold these values.

| when                          | read                                           | write                                  |
|-------------------------------|------------------------------------------------|----------------------------------------|
| falling edge, `ctr == 1`      | latch operation bit                            | latch operation bit                    |
| falling edge, `ctr == 6`      | latch A[4:0] for the decoders                  | latch A[4:0] for the decoders          |
| rising edge of cycle 7        | `pc` high: precharge the bit lines             | –                                      |
| rising edge of cycle 8        | `pc` low; `wl`, `col`, `sae`, `muxen` high     | –                                      |
| falling edge of cycle 9       | MISO register loads the sensed byte, shows D7  | –                                      |
| rising edge of cycle 9        | `wl`, `col`, `sae`, `muxen` low                | –                                      |
| falling edges of cycles 10–16 | MISO shifts out D6 … D0                        | –                                      |
| rising edge of cycle 14       | –                                              | `pc` high for one cycle                |
| rising edge of cycle 16       | –                                              | latch data; `wl`, `wr`, `col` high     |
| chip select rises             | all strobes low                                | all strobes low; the write is complete |

A read therefore puts its data on the bus right after the first byte, with no
dummy byte. The precharge, the word line and the sense all fit between the
last address bit (cycle 6) and the first data bit (cycle 9). A write cannot
start until its last data bit arrives at cycle 16. No SCLK edge follows that
bit, so the write strobes stay high until chip select rises, and that edge
ends the write. If chip select rises before cycle 16, nothing is written.

## Inside the memory macro

`sram_core` has no clock. The strobes alone decide what it does.

- **Bit lines and precharge** (`sram_array`). Each column has a true line
  `bl` and a complement line `blb`. While `pc` is high, both are pulled high.
  When a word line is open, the selected cell pulls one line low: `bl` if it
  holds 0, `blb` if it holds 1. The pair then carries the bit as a
  differential signal. With nothing selected, the lines stay at the
  precharge level. The model works with logic levels, not voltages.
- **Cells** (`sram_array`). A six-transistor cell takes the value driven on
  its column while its word line is open and that column's write driver is
  on. It keeps the value after that. No clock edge comes after the write
  strobes rise, so each cell is modelled as a level-sensitive latch. The 256
  latches reported by synthesis are these cells. They are intended.
- **Row decoder** (`row_decoder`). A one-hot decode of A[3:0], active only
  while `wl` is high.
- **Column decoder** (`column_decoder`). A[4] selects the byte half: bit *i*
  of the byte is in column 8·A[4] + *i*. With `col` and `wr` high, it enables
  the write drivers on those eight columns. With `col` high and `wr` low, it
  connects them to the sense amplifiers. In every other case, the sense
  amplifiers see both inputs high, so there is no differential.
- **Sense amplifiers** (`sense_amp`). A behavioural model of an analog
  circuit. While `sae` is high, each amplifier whose inputs differ outputs the
  true line. It holds that value after `sae` falls. This is why the MISO
  register can load the byte on the falling edge of cycle 9.

## SPI front end

`spi_interface` holds four parts:

- `cycle_counter`: 5 bits, counts rising edges, cleared asynchronously while
  chip select is high.
- `rx_shift_reg`: shifts MOSI in on rising edges. The first bit ends in bit 7.
- `sram_controller`: compares the count with the cycle numbers above.
- `tx_shift_reg`: loads on a falling edge while `muxen` is high, then shifts
  out MSB first.

The controller's flip-flops and the counter reset while chip select is high.
The controller's strobes therefore drop as soon as the chip is deselected.
The strobes travel as one packed struct, `sram_pkg::sram_ctrl_t`:
`pc, wl, wr, col, muxen, sae`. Two assertions in the controller check the
strobe rules: `pc` and `wl` are never high together, and `wr` is high only
together with `wl` and `col`.

## Module hierarchy

```
spi_sram                 top: sclk, cs_n, mosi -> miso
├── spi_interface
│   ├── cycle_counter
│   ├── rx_shift_reg
│   ├── sram_controller
│   └── tx_shift_reg
└── sram_core
    ├── row_decoder
    ├── sram_array       (cells, bit lines, precharge)
    ├── column_decoder   (column select and write drivers)
    └── sense_amp        (behavioural model)
sram_pkg                 sizes, cycle numbers, opcode enum, strobe struct
```

## What is modelled and what is chosen here

These parts follow the published design:

- the frame format;
- the cycle numbers of every event;
- SCLK as the only clock, with a 5-bit counter;
- the two 8-bit shift registers;
- the 16 × 16 organisation with A[3:0] as the row and A[4] as the byte half;
- precharge before a read;
- write strobes held until deselect.

These are choices made for this RTL:

- **Pulse ends.** The document gives the edges where pulses start. Here each
  one-cycle pulse ends at the next rising edge, and the opcode and address
  are latched on falling edges.
- **No gated clocks.** Chip select is a shift enable for both shift
  registers. The clock is not gated with chip select.
- **Sense data path.** The sensed byte goes straight into the MISO register,
  not through the controller.
- **Write data.** The controller latches the received byte at the 16th rising
  edge: seven bits from the shift register plus the MOSI bit sampled at that
  edge. The write data therefore stays fixed while the cells are open.
- **MISO is never tri-stated.** A shared bus needs an external buffer, or a
  tri-state added at the top.
- **Column order** within a row, the bit-line model and the sense-amplifier
  hold behaviour are logic-level stand-ins for analog circuits. They say
  nothing about voltages, sizing or timing margins.
- **Reset.** The opcode resets to "read" and the address to 0 while the chip
  is deselected. Memory contents at power-up are undefined.
- **Unused outputs.** The controller also outputs the latched operation bit,
  `rwn`. It is brought out of `spi_interface` but nothing inside the macro
  uses it: the array uses `wr`.

Not built: the transistor-level 6T cell and its sizing, the analog precharge
level, and the off-chip parts of a sensor node (microcontroller, radio,
sensor).

## Simulating

Each testbench in `tb/` checks its block itself. It prints one
`TB_RESULT checks=N failures=M` line and has a watchdog. Example, with plain
Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv --top-module tb_spi_sram \
  rtl/sram_pkg.sv tb/tb_spi_sram.sv -o sim
./obj_dir/sim
```

Swap in `tb_<block>` to test a block on its own.

- `tb_spi_sram` drives the full-size design through its pins only, as an SPI
  master with a 1 µs SCLK. It runs the example above, fills and reads back
  all 32 bytes, and does random overwrites. It then checks that a write
  abandoned after 12 cycles changes nothing. At every edge it also checks
  the strobe timing against the table above. It counts each mechanism at
  least once: read precharge, write precharge, read access, write access,
  both byte halves, an overwrite, an abandoned write.
- The unit testbenches compare against models written independently of the
  RTL: the counter against an integer, the shift registers against bit
  queues, the decoders against one-hot and slice references, the array and
  the macro against reference memories, and the controller against the
  timing table.

One simulation detail: the counter and controller clear on a chip-select
*edge*, like any asynchronous reset in simulation. A testbench should
therefore take chip select low and back high once before the first
transaction. In silicon, chip select being held high does the same.

## Changing it

The sizes and cycle numbers are in `sram_pkg`. The cycle numbers depend on
the frame format: the address must be complete before the read precharge, and
the data must have arrived before the write strobes. Change them together.
`row_decoder`, `column_decoder`, `sram_array` and `sense_amp` take their sizes
as parameters. The controller and frame format assume one opcode bit, five
address bits and an 8-bit data byte.
