# MP3 player platform on an FPGA

This is the hardware side of an MP3 player built around a 32-bit soft processor on a
Virtex-5 board. The processor does all of the decoding in software: it parses frame
headers, Huffman-decodes, requantises, runs the IMDCT and the synthesis filter bank.
What it needs from the hardware is:

- a way to push 16-bit stereo PCM samples to the on-board AC '97 codec at the song's
  sampling rate;
- a way to show the title and author on a 2x16 character LCD;
- a way to read the play, pause, stop and select buttons, the DIP switches and the
  volume dial.

The RTL here is that platform. It holds the peripherals, the address decoding of the
processor bus, the local boot memory, the reset sequencing and a model of the clock
PLL. It also has an end-to-end testbench that plays one MP3 frame's worth of samples
while it writes the display.

The processor, its caches, the DDR2 and SRAM controllers, the CompactFlash controller,
the UART, the timer and the interrupt controller are library cores. They are not here.
`mp3_player_top` brings their connections out as ports:

- the processor drives the bus request and the two local-memory ports;
- every external bus slave has a select line and answers on a shared response input.

## Block overview

| file | block |
|---|---|
| `rtl/mp3_pkg.sv` | bus request/response structs, address-map enum, AC97 register offsets and bit positions |
| `rtl/mp3_player_top.sv` | the platform: instances, bus response merge, error response for unmapped addresses |
| `rtl/plb_addr_decoder.sv` | base/mask table of the peripheral address map |
| `rtl/ac97_controller.sv` | memory-mapped AC97 controller: registers, playback FIFO, codec register access |
| `rtl/sample_fifo.sv` | 16 x 32-bit show-ahead FIFO with full, half-full, empty and level |
| `rtl/ac97_link.sv` | AC-link serialiser/deserialiser timed by the codec's BIT_CLK |
| `rtl/lcd_controller.sv` | 4-bit character-LCD driver with the display's timing |
| `rtl/gpio.sv` | GPIO port, used five times |
| `rtl/lmb_bram.sv` | 64 KB dual-port boot/vector RAM on the instruction and data local buses |
| `rtl/proc_sys_reset.sv` | reset sequencer, including the codec reset pin |
| `rtl/clock_generator.sv` | behavioural PLL model: 125, 125 at 90 degrees, 200 and 62.5 MHz from 100 MHz |

Every block runs on the 125 MHz system clock, `clk_sys`. The other generated clocks go
only to the memory controller.

## The bus

One bus stands in for the processor's peripheral bus and for the bridge that carries
the AC97 controller. The request (`bus_req_t`) holds:

- `addr`, the address;
- `wdata`, the write data;
- `be`, the byte enables;
- `wr` and `rd`, the write and read requests.

The master holds the request stable until it sees `ack`. The slaves are these:

- A built slave acknowledges exactly one cycle after the request. It uses
  `access = sel && (wr || rd) && !ack` and registers `ack <= access`, so a held request
  is served only once.
- An address that maps to nothing gets `ack` with `err` after one cycle.
- For the external cores the top raises the slave's `ext_sel` bit. It passes `ext_rsp`
  through whenever that core answers, so external slaves may insert wait states.

All registers are word registers: the byte enables are ignored by the peripherals.

The top has two assertions:

- at most one slave acknowledges in a cycle;
- a request does not change while it waits for its acknowledge.

| range | size | slave |
|---|---|---|
| 0x0000_0000 | 64 KB | local BRAM (instruction and data local buses, not on this bus) |
| 0x2000_0000 | 64 KB | timer (external) |
| 0x2010_0000 | 1 MB | SRAM (external) |
| 0x4000_0000 | 64 KB | volume dial GPIO, 3 bits, change interrupt |
| 0x8140_0000 | 64 KB | push buttons, 5 inputs |
| 0x8142_0000 | 64 KB | position LEDs, 5 bits |
| 0x8144_0000 | 64 KB | LEDs, 8 bits |
| 0x8146_0000 | 64 KB | DIP switches, 8 inputs (switch 8 enables the caches in software) |
| 0x8180_0000 | 64 KB | interrupt controller (external) |
| 0x8360_0000 | 64 KB | CompactFlash controller (external) |
| 0x8440_0000 | 64 KB | debug module (external) |
| 0xCF40_0000 | 64 KB | LCD controller |
| 0xFFFF_8000 | 256 B | AC97 controller |

The DDR2 (256 MB at 0xB000_0000) is reached through the processor's cache links. It is
not decoded on this bus. The UART's address is also not decoded.

## Audio path

This is the part that takes the most care. The software produces samples in bursts,
one decoded frame of 1152 at a time. The codec consumes them at exactly the song's
sampling rate, which is set by its own crystal. The playback FIFO and the AC-link logic
sit between the two.

### Register interface (offsets from 0xFFFF_8000)

| ofs | name | access | content |
|---|---|---|---|
| 0x00 | In_FIFO | W | one stereo sample: left in [31:16], right in [15:0] |
| 0x04 | Out_FIFO | R | 0 (this build has no record path) |
| 0x08 | Status | R | see the status bits below |
| 0x0C | Control | W | see the control bits below |
| 0x10 | RegAddr | W | [6:0] codec register; [7] = 1 for a read. Writing starts the access |
| 0x14 | RegRead | R | [15:0] data of the last codec register read |
| 0x18 | RegWrite | W | [15:0] data for the next codec register write |

Registers are decoded by 32-bit word and address bits [1:0] are ignored. The driver notes that its Control writes work at 0xC, 0xE or 0xF.

Status bits:

- [0] in-FIFO full
- [1] in-FIFO at least half full
- [2] out-full, always 0
- [3] out-empty, always 1
- [4] register access finished
- [5] codec ready
- [6] register access busy
- [7] in-FIFO empty
- [8] underrun
- [20:16] in-FIFO level

Control bits:

- [0] clear the in-FIFO and the underrun flag
- [1] clear the out-FIFO (no effect here)
- [2] enable the in-FIFO interrupt
- [3] enable the out-FIFO interrupt (unused)
- [4] hold the AC-link in reset while set

The driver's rules are that it polls bit 0 before each In_FIFO write, and that it writes
RegWrite before RegAddr. Bits 0 to 6 and the control bits are those the player's driver
uses. The empty bit, the underrun bit and the level field, and their positions, are
this design's.

A write into a full FIFO is acknowledged at once and dropped; it never stalls the bus.
The driver's FIFO clear depends on this: after setting the clear bits it writes 512
zeros without polling, and only the first 16 are kept.

The interrupt is high while it is enabled and the FIFO holds fewer than 8 samples. A
decoder can therefore sleep until the FIFO needs filling.

### AC-link (ac97_link)

The codec drives BIT_CLK at 12.288 MHz. Data is launched on the rising edge and sampled
on the falling edge.

The link does not run in the BIT_CLK domain. It samples BIT_CLK in the 125 MHz domain
with a two-flop synchroniser and an edge detector. That gives about ten system clocks
per bit, and every register stays on one clock. The input data is delayed by the same
two stages, so it lines up with the detected edge.

A frame is 256 bits long. It starts with a 16-bit tag, followed by twelve 20-bit slots:

- Tag: bit 15 marks the frame valid, and bits 14..3 mark which slots are valid.
- Slot 1: the command address. Bit 19 is set for a read, and bits 18..12 hold the
  register.
- Slot 2: the command data, in bits 19..4.
- Slots 3 and 4: the left and right PCM samples. The 16 sample bits sit at the top of
  each 20-bit slot and the low 4 bits are zero.

SYNC is high for the 16 tag bits. It rises one bit before the frame, as the standard
requires.

On the input side:

- the tag's bit 15 is the codec-ready flag;
- slot 1 echoes the address of a register read;
- slot 2 carries the read data;
- slot 1 bit 11 is the codec's sample request for the front DAC pair, active low.

The frame rate is fixed at 48 kHz. To play 44.1 kHz or 32 kHz the codec runs in
variable-rate mode: it asks for a sample only in some frames, and the link sends one in
the next frame exactly when asked. One sample is removed from the FIFO per request. If
the FIFO is empty at that moment, the frame carries zeros and the sticky underrun flag
is set.

### Codec register access

A write to RegAddr queues a command. The link puts it into slots 1 and 2 of the next
frame and reports `cmd_taken`.

- A write is reported finished at the start of the frame after the one that carried
  it, so the codec really has received it.
- A read finishes when a later input frame echoes the same address with data. The
  address may be echoed one or two frames later, depending on the codec.

Busy covers the whole access.

### Timing

- Sample rate: one FIFO read per codec request. That is 44 100 per second at 44.1 kHz,
  or 0.919 samples per 20.83 µs frame.
- Bus: a status read or a FIFO write takes two clocks.
- Register write: 1 to 2 frames, which is 21 to 42 µs.
- Underrun: a 16-sample FIFO drains in 16 requests, which is 363 µs at 44.1 kHz.

## LCD controller

The display is an HD44780-style 2x16 character module on seven pins:

| pin | signal |
|---|---|
| 0 | E |
| 1 | RS |
| 2 | RW |
| 3 | DB7 |
| 4 | DB6 |
| 5 | DB5 |
| 6 | DB4 |

Because only four data lines exist, every byte goes out as two nibbles, the upper one
first.

A bus write at offset 0 holds:

- the byte in [7:0];
- RS in [8], where 1 means a character;
- in [9], a flag that sends only the upper nibble, for the power-up sequence (3, 3, 3,
  then 2).

Each nibble takes T_SETUP clocks with E low, then T_PULSE with E high, then T_HOLD with
E low. There are T_GAP clocks between the two nibbles. After the byte comes the
display's execution time:

- 40 µs normally;
- 1.64 ms after clear or home;
- 4.1 ms after a power-up nibble.

A read of offset 0 returns busy in [0] and overrun in [1]. Busy covers all of that
time. A write that arrives while busy is dropped and sets overrun. Overrun is sticky
until the next read. RW is held low: the display is only written, never read.

The timing defaults are the display's data-sheet minimums at 125 MHz, rounded up. They
are parameters.

## GPIO

Each pin has an output bit and a direction bit. A direction bit of 1 means input, which
is the reset value. On a pad, `o` drives the pin where `t` is 0. Inputs pass two
synchronising flops.

| offset | register |
|---|---|
| 0x000 | DATA |
| 0x004 | TRI |
| 0x11C | GIER, global enable in bit 31 |
| 0x120 | ISR, change flag in bit 0, write 1 to clear |
| 0x128 | IER |

With the interrupt present, any change of the synchronised input sets ISR. The volume
dial's instance has the interrupt. It reports every step of the rotary encoder.
Input-only instances (the buttons and the DIP switches) fix the direction to input.

## Memory, reset and clocks

- **lmb_bram**: a 64 KB memory shared by the instruction port (A) and the data port
  (B). It holds the vectors and the boot code. Each port has byte write enables and a
  registered read one clock after the address. It is read-first: a write returns the
  old word.
- **proc_sys_reset**: any of three sources requests reset. The sources are the board
  reset (active low), the debug module's reset and the PLL not being locked. The
  request passes a two-flop synchroniser and clears a counter.
  - The bus reset ends 16 clocks after the last source goes away.
  - The peripheral reset ends after 32 clocks.
  - The processor reset ends after 48 clocks.
  - Each release also waits for the two synchroniser clocks and one register stage.

  The inverted peripheral reset is the codec's reset pin, `audio_reset_n`.

  The sequencer's flops have power-up values, so all resets are asserted from time zero,
  before the first clock edge.
- **clock_generator**: a simulation model of the PLL, which cannot be synthesised. It
  makes these clocks from the 100 MHz board clock:
  - 125 MHz, the system clock;
  - 125 MHz shifted 90 degrees, so it rises 2 ns later;
  - 200 MHz;
  - 62.5 MHz.

  The zero-phase outputs rise together. `locked` rises 32 reference clocks after reset.
  For an FPGA build, replace this module with the device's PLL primitive.

## How far the source goes, and where this design departs

The platform's composition, with each fixed value taken from the platform description:

- the instance list;
- every base address and size;
- the GPIO widths and input/interrupt settings;
- the LCD pin order;
- the AC97 register offsets and the bits its driver uses;
- the 16-sample FIFO depth;
- playback only;
- the clock frequencies and phase;
- the active-low board reset;
- the codec reset wiring.

The source gives the function of the AC97, LCD and GPIO cores but not their insides.
The following are therefore this design's own:

- the link's oversampling of BIT_CLK;
- the exact handshake of codec register accesses;
- the AC97 status bits 7, 8 and 20:16;
- the interrupt condition;
- the LCD register layout and its timing;
- the reset release counts;
- the simple request/acknowledge bus in place of the vendor buses.

The AC-link frame format follows the AC '97 standard.

Two points of the driver are settled here. It gives the in-FIFO interrupt enable as both
0x01 and 0x04; the controller uses 0x04 (bit 2), next to the other Control bits, because
0x01 is the clear-in bit. It also tests a register-access error flag and an Out_FIFO overrun
flag whose bit positions it never gives; codec accesses here always complete and there is
no record path, so neither flag exists.

Left out:

- Everything that is library IP: the processor, the caches, the bus arbitration and the
  bridge, the DDR2 and SRAM controllers, the CompactFlash, the UART, the timer and the
  interrupt controller.
- The record path of the AC97 controller, which the player disables.
- The MP3 decoding stages. They are software in this player.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sample_fifo` | a reference-model comparison of random traffic, the flags, clear, and push-when-full |
| `tb_ac97_link` | against a codec model: frame period 20.83 µs, slot contents, the variable-rate request, underrun, register read/write |
| `tb_ac97_controller` | the driver's setup sequence, vendor-ID read, status bits, interrupt, clear, 1152 samples in order, and playback time (1254 ± 6 frames) |
| `tb_lcd_controller` | exact nibble sequence, E pulse width, setup time, exact busy cycles for each kind of write (timing shortened by parameters), overrun |
| `tb_ac97_rates` | playback at 48, 44.1 and 32 kHz: samples per 48 kHz frame within 1% of rate/48000, order and value of every sample |
| `tb_gpio` | outputs, directions, the synchroniser latency, interrupt set/enable/clear |
| `tb_plb_addr_decoder` | every range's edges and random addresses against a table |
| `tb_lmb_bram` | latency, byte enables, read-first, shared contents, random dual-port traffic |
| `tb_proc_sys_reset` | each source, release order, exact release counts, restart on a glitch |
| `tb_clock_generator` | periods, duty cycle, the 2 ns phase lag, edge alignment, lock after 32 reference edges |
| `tb_mp3_player_top` | the whole platform at its default parameters |

`tb_mp3_player_top` runs the player's sequence:

1. reset and lock;
2. boot-vector fetch;
3. unmapped-address errors;
4. external-slave accesses with wait states;
5. LEDs, buttons, DIP switches and a volume-dial interrupt;
6. codec setup and vendor-ID read;
7. one frame of 1152 samples at 44.1 kHz, with the LCD initialised and written while
   the FIFO is full.

Partway through the frame it waits for the FIFO interrupt, and later it stalls long
enough to starve the codec. It counts each mechanism and fails if any count is zero:

- full-FIFO stall
- underrun
- FIFO interrupt
- dial interrupt
- bus error
- external wait state
- register busy
- LCD busy
- LCD overrun
- and others

It simulates 27 ms of real time in about 15 s. Two behavioural models support it:

- `ac97_codec_model` is a codec with a register file, a vendor ID, a ready delay and
  variable-rate requests from a rate accumulator.
- `tb_mp3_player_top` contains an LCD that records nibbles and an external-slave
  model.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mp3_pkg.sv tb/tb_mp3_player_top.sv --top-module tb_mp3_player_top
./obj_dir/Vtb_mp3_player_top
```

Replace the testbench name to run any other.
