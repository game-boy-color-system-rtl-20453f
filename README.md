# A Game Boy Color on one FPGA clock

This is the system logic of a Game Boy Color, written as synthesizable
SystemVerilog: memory map, DMA, cartridge, video, sound, timer, interrupts,
joypad and link port. The CPU core, the DVI transmitter and the AC97 audio
codec are not included. They connect through plain ports of the top module
`gbc_top`.

Two ideas shape the design:

- **Everything the CPU can touch is memory mapped.** A memory router is
  therefore the hub. It has three masters: the CPU, a DMA reader and a DMA
  writer. It has four slaves: the cartridge, the work RAM, the PPU and one
  shared bus for all I/O registers.
- **One fast clock runs everything.** The base clock is 33,554,432 Hz, 8× the
  console's 4.19 MHz. The CPU-rate blocks move on a clock enable (`cpu_ce`),
  not on a derived clock. Sound waveforms are timed on the fast clock, which
  keeps their periods accurate.

The original FPGA design that this RTL is based on kept the same block split,
the same bus rule and the same clock rates. Where this RTL follows the
original, and where it makes its own choices, is said below and in the
opening comment of every file.

## The system bus

A request is the struct `gb_pkg::mem_req_t`:

| Field | Width | Meaning |
|---|---|---|
| `addr` | 16 | address |
| `wdata` | 8 | write data |
| `re_l` | 1 | read strobe, active low |
| `we_l` | 1 | write strobe, active low |

- Each access is one `clk` cycle with one strobe low.
- **Read data comes back combinationally in the same cycle.** The real chip
  answers one cycle later. The CPU core this system was built for expects the
  answer at once, and every slave honours that.
- Memories are arrays read asynchronously (`bram_bus_if`). The original design
  got the same timing by running a block RAM at twice the clock instead.

### Memory router (`mem_router`)

The router decodes each master's address to a slave with
`gb_pkg::decode_slave`:

| Range | Slave |
|---|---|
| 0000-7FFF, A000-BFFF | cartridge |
| 8000-9FFF, FE00-FE9F | PPU (VRAM and OAM) |
| the PPU's registers | PPU |
| C000-FDFF | work RAM (E000-FDFF is the echo) |
| FEA0-FEFF | nothing (reads FF) |
| every other FFxx address | I/O bus |

Arbitration rules:

- Each slave is given to at most one master per cycle.
- The priority is fixed: DMA writer, then DMA reader, then CPU.
- A refused master reads FF, and its write is dropped. A refused CPU also
  raises `cpu_denied`.
- High RAM (FF80-FFFE) is hidden from both DMA masters. That lets the CPU keep
  running a wait loop there during an OAM DMA, as Game Boy software expects.

The router is purely combinational. It has a clock only for its assertion
that no master reads and writes in the same cycle.

Lint tools report a combinational loop through the router: the DMA writer's
data is the DMA reader's read data. This is a false path. The loop would need
the reader and the writer on the same slave. In that case the writer has
priority, and the reader gets the constant FF.

### I/O register bus (`io_bus_parser`)

All I/O registers share the I/O slave port. Each register block decodes its
own addresses and drives 0 on its read data when it is not addressed, and
`gbc_top` ORs all of them together. Most registers are `io_bus_parser`
instances.

An `io_bus_parser` has two sides:

- **Bus side:** an address match, and the current value on reads.
- **Owner side:** the stored value, a "CPU is writing now" strobe, and a write
  port the owning block uses to change the register itself. Channel 1's
  frequency sweep uses that port.

Its parameters:

- `WMASK` sets which bits the CPU may write.
- `ONES` sets which bits read as 1.
- A CPU write wins over an owner write in the same cycle.

## Clocks and reset

`clock_ctrl` divides `clk` into 16, 8 and 4 MHz and gives the matching
one-cycle enables.

- **CPU enable:** `cpu_ce` is the 4 MHz enable, or the 8 MHz one in double
  speed.
- **Speed at reset:** the DIP switch `dip_double_speed` sets it.
- **Speed switch at run time:** the CPU arms the switch by writing KEY1 bit 0,
  then executes STOP (`cpu_stop`). A countdown of `SETTLE` clocks then runs.
  `cpu_ce` stays low during it, so the CPU state settles, and then the speed
  flips.

`reset_gen` synchronises the push button and holds `rst` high while it is
pressed, then for `RESET_COUNT` clocks more. Power-up also starts the count.

## DMA (`dma_ctrl`)

One controller holds all three engines. They share the DMA reader and writer
ports, and one byte moves per CPU cycle: the reader and the writer are active
in the same cycle, and the write data is the read data.

**OAM DMA.** Writing FF46 with a source page starts it. It copies XX00-XX9F to
FE00-FE9F in exactly 160 CPU cycles. The CPU is not halted.

**General DMA.** Writing HDMA5 with bit 7 clear starts it. It copies
16×(n+1) bytes from the source (HDMA1/2) to VRAM (HDMA3/4) while `cpu_halt` is
high.

**H-blank DMA.** Writing HDMA5 with bit 7 set starts it.

- It waits for the rising edge of the PPU's H-blank.
- It moves 16 bytes with the CPU halted, then waits for the next H-blank.
- HDMA5 reads the remaining block count minus one while it is active, and FF
  when idle.
- Writing HDMA5 with bit 7 clear while it is active cancels it.

If both OAM DMA and HDMA want the ports, OAM DMA goes first.

The DMA goes through the router like any master. The PPU refuses OAM writes in
modes 2-3 and VRAM writes in mode 3, so run an OAM DMA or a general DMA in
V-blank or with the display off, as games normally do. On the real console an
OAM DMA always succeeds; this is a known difference.

## Cartridge (`cart_mbc3`)

The board has no cartridge slot. The ROM images sit in board flash, and
`cart_mbc3` behaves like an MBC3 cartridge with battery RAM and a real-time
clock, the type used by the Pokémon Gold/Silver/Crystal generation.

**CPU writes**

| Range | Effect |
|---|---|
| 0000-1FFF | 0A enables the RAM and clock; anything else disables them |
| 2000-3FFF | ROM bank, 7 bits; 0 selects 1 |
| 4000-5FFF | 0-3 select a RAM bank; 08-0C select a clock register |
| 6000-7FFF | writing 00 then 01 latches the clock into the readable copy |

The clock registers are 08 seconds, 09 minutes, 0A hours, 0B day low and
0C day high (with the halt and carry bits).

**CPU reads**

| Range | Result |
|---|---|
| 0000-3FFF | ROM bank 0 |
| 4000-7FFF | the selected ROM bank |
| A000-BFFF | the RAM bank, or the latched clock register |

**Clock.** It counts real seconds from `CLK_HZ`. CPU writes set it.

**Game switching.**

- The DIP switches give `game_sel`. It selects a 2 MB slot of the flash:
  `flash_addr = {game_sel, bank, offset}`. 8 slots use 24 address bits.
- It also selects one of `SAVE_SLOTS` 32 KB save areas in block RAM, so
  switching games does not overwrite another game's save.
- Saves survive a reset but not a power cycle.

## Video (`ppu`, `video_converter`)

### PPU

The PPU keeps everything it reads while drawing, so it never waits for the
system bus:

- VRAM: two 8 KB banks, chosen by VBK.
- OAM: 40 sprites × 4 bytes.
- The color file: 8 background and 8 sprite palettes of 4 RGB555 colors,
  through BCPS/BCPD and OCPS/OCPD with auto-increment.
- The LCD registers.

The CPU reaches them through the router.

**Timing.** One dot is `CLKS_PER_DOT` = 8 clocks, the 4.19 MHz dot rate.

- A line is 456 dots: mode 2 for dots 0-79, mode 3 for dots 80-251, mode 0
  (H-blank) for dots 252-455.
- Lines 144-153 are mode 1 (V-blank).
- With the display off, the PPU sits in mode 1 at line 0.
- The CPU cannot reach VRAM or palette data in mode 3, or OAM in modes 2 and
  3: reads give FF and writes are dropped.

**Rendering.** Drawing works one scanline at a time. A state machine starts
at dot 0 of each visible line, steps once per clock, and finishes a line in
about 500-700 clocks, well inside modes 2 and 3. It has three steps:

1. **Background and window.** For each of the 160 columns, fetch the tile from
   the background map, or from the window map once the column is past WX-7 and
   the line is past WY. Store the 2-bit color, the palette and the priority bit
   from the bank-1 attribute byte in a line buffer. Tile flips, the tile bank
   and signed tile numbers (8800 mode) are handled.
2. **Sprites.** Walk the 40 OAM entries in order and take at most 10 that
   cover the line (8×8 or 8×16). Write their non-transparent pixels into
   columns no earlier sprite has taken. Mark each such pixel as a sprite pixel
   with its palette, and record whether the background wins: LCDC bit 0 is the
   master switch, then the OAM or map priority bit, and only over background
   colors 1-3.
3. **Output.** Send the 160 pixels out in order (`pix_valid`, `pix_x`,
   `pix_y`, `pix_rgb`), each looked up in the color file to a 16-bit RGB555
   value.

With `dmg_mode` set (the `dip_dmg_mode` switch), map attributes are ignored.
Colors first pass through BGP/OBP0/OBP1, then background palette 0 or sprite
palette 0/1. The color file resets to a four-shade grey ramp, so an old game
shows grey.

**What is not modelled.** The whole line is rendered at its start. A change
to a scroll or palette register partway through a line shows from the next
line on. The window line counter is LY-WY, so a window switched off and on
partway through a frame does not resume where it stopped.

### Video converter

`video_converter` holds two 160×144×16-bit frame buffers.

- The PPU writes the back buffer.
- At the start of V-blank (`frame_start`) the buffers swap, so the display
  always shows a finished frame.
- The display side gives a raster position (`disp_x`, `disp_y`) on a
  `DISP_W`×`DISP_H` screen, 640×480 by default. The picture sits unscaled in
  the centre, at (240,168)-(399,311), with black around it.
- `disp_rgb` is a 24-bit {R,G,B}, one clock after the position. Each 5-bit
  channel is widened to 8 bits by repeating its top bits.

## Sound (`sound_top`, `sound_ch1`-`sound_ch4`)

Each of the four channels makes a 20-bit signed sample on the fast clock.

**Period arithmetic.** The CPU gives an 11-bit frequency code x. The waveform
period in clocks is:

- channels 1 and 2: CLK_HZ·(2048−x)/131072
- channel 3: CLK_HZ·(2048−x)/65536

Both divisors are powers of two. `sound_freq_lut` therefore computes the
period exactly with one multiply and a shift. The original design read it
from a 2048-entry lookup table.

**Channels.**

| Channel | Registers | Sound | Extra |
|---|---|---|---|
| 1 | NR10-NR14 | square wave | frequency sweep, envelope, length |
| 2 | NR21-NR24 | square wave | envelope, length |
| 3 | NR30-NR34 | 32 4-bit samples from wave RAM FF30-FF3F | output level, length |
| 4 | NR41-NR44 | noise from a 15-bit or 7-bit LFSR | envelope, length |

- **Square wave (channels 1 and 2).** The high time is the period shifted
  right (12.5/25/50/75 % duty). The sample is +v or −v, where v = vol×34952,
  so volume 15 gives just under 2^19.
- **Sweep (channel 1).** Each sweep step changes the frequency by f>>shift and
  writes it back into NR13/NR14. A result above 2047 stops the channel.
- **Wave RAM (channel 3).** The high nibble plays first. Each sample lasts
  1/32 of the period. Samples are unsigned levels times 34952, so this channel
  has a DC offset.
- **Noise (channel 4).** A counter makes the shift clock:
  CLK_HZ·r′·2^s/2^19 clocks per shift, where r′ = 2r, or 1 for r = 0. LFSR
  bit 0 set gives +v, clear gives −v.

**Common blocks.** The length counter, the volume envelope (`sound_envelope`,
shared by channels 1, 2 and 4) and the sweep step on 256, 128 and 64 Hz ticks.
`sound_top` makes these ticks from `clk`.

**`sound_top`**

- NR52 bit 7 powers the unit. While it is off, all channels and their
  registers are held in reset. NR52 bits 3-0 show which channels are playing.
- NR51 routes each channel to the left and/or right side.
- Each side is the sum of its routed channels divided by 4, registered on
  `clk`.
- NR50 (master volume) is stored and read back but does not scale the output,
  as in the original design.
- **Codec hand-over.** The codec has its own bit clock. A register in that
  clock domain copies the mix every bit clock, and the output registers
  (`audio_left`, `audio_right`) take that copy on the codec's strobe. A sample
  is therefore never captured while it is changing.

## Other I/O

- **`timer`.** DIV is the top byte of a 16-bit counter of CPU cycles; any
  write clears it. When TAC bit 2 is set, TIMA counts falling edges of divider
  bit 9, 3, 5 or 7 (CPU/1024, /16, /64, /256). On overflow it reloads TMA at
  once and pulses the interrupt. The real chip's 4-cycle reload delay is not
  modelled.
- **`interrupt_ctrl`.** A rising edge on an interrupt line sets its bit in IF
  (FF0F). The five lines are V-blank, STAT, timer, serial and joypad. The CPU
  may write IF, and acknowledges a serviced interrupt with `cpu_if_clr`. IE
  (FFFF) is kept here too and handed to the CPU as `cpu_ie`. The master enable
  IME stays in the CPU.
- **`joypad`.** An NES controller stands in for the buttons. 60 times a second
  the block raises `nes_latch` for 12 µs, then gives 8 pulses of 6 µs high and
  6 µs low on `nes_pulse`, reading the active-low `nes_data` for A, B, Select,
  Start, Up, Down, Left and Right. P1/JOYP (FF00) shows the latest state
  through the usual select bits 5-4. A key going down raises the joypad
  interrupt.
- **`link_serial`.** SB is FF01 and SC is FF02. The link runs between two
  boards over four wires: `bit_out`, `bit_in`, `clock_out`, `clock_in`.
  - With the internal clock, the shift clock's half period is 256 CPU cycles,
    or 8 in fast mode: 8192 or 262144 Hz, doubled in double speed.
  - Data changes on the falling edge and is sampled on the rising edge, most
    significant bit first.
  - After 8 bits, SC bit 7 clears and the serial interrupt fires.
- **`misc_regs`.** RP (FF56) drives the `ir_led` output. Its receive bit
  always reads "no light". The undocumented CGB registers FF6C and FF72-FF77
  are present with their reset values and writable bits.
- **`hram`.** 127 bytes at FF80-FFFE on the I/O bus.
- **`wram`.** 32 KB in eight 4 KB banks. C000-CFFF is always bank 0. D000-DFFF
  shows the bank in SVBK (FF70), where 0 also means bank 1. The RAM address is
  {bank, addr[11:0]}.

## Top-level ports (`gbc_top`)

| Group | Ports |
|---|---|
| board | `clk`, `reset_button`, `dip_double_speed`, `dip_dmg_mode`, `game_sel[2:0]`, `rst` (out) |
| CPU core | `cpu_req` (mem_req_t), `cpu_rdata`, `cpu_halt`, `cpu_ce`, `cpu_stop`, `cpu_if[4:0]`, `cpu_ie[7:0]`, `cpu_if_clr[4:0]`, `double_speed` |
| flash | `flash_addr[23:0]`, `flash_re`, `flash_data[7:0]` (same-cycle read) |
| NES controller | `nes_latch`, `nes_pulse`, `nes_data` |
| link cable | `link_bit_out`, `link_clock_out`, `link_bit_in`, `link_clock_in` |
| infrared | `ir_led` |
| AC97 codec | `ac97_bit_clk`, `ac97_strobe`, `audio_left[19:0]`, `audio_right[19:0]` (signed) |
| DVI | `disp_x[10:0]`, `disp_y[10:0]`, `disp_rgb[23:0]` |
| status | `lcd_mode[1:0]`, `oam_dma_active`, `hdma_active`, `cpu_denied` |

The CPU should issue each access in a cycle where `cpu_ce` is high. It should
stop while `cpu_halt` is high, which covers general DMA and each H-blank DMA
block.

**Parameters.** All default to the console's real numbers.

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 33554432 | base clock rate |
| `CLKS_PER_DOT` | 8 | clocks per PPU dot |
| `RESET_COUNT` | 65535 | reset countdown length |
| `SETTLE` | 1024 | speed-switch countdown |
| `SAVE_SLOTS` | 4 | number of 32 KB save areas |

## Where this departs from the original design

- **CPU interface.** IE lives next to IF instead of inside the CPU. An
  explicit `cpu_if_clr` acknowledges interrupts.
- **Clocking.** One clock with enables instead of divided clocks. The divided
  clocks are still produced as signals.
- **Block RAMs.** They are asynchronously read arrays instead of block RAMs
  run at twice the clock.
- **Sound period.** It is computed instead of looked up in a table, with the
  same result.
- **Mix scaling.** The mix is divided by 4 to stay within 20 bits.
- **PPU.** It is a new scanline renderer that follows the same steps (line
  buffer with palette and sprite marks, color file lookup, 16-bit pixels),
  not a modified existing one.
- **Register details the original leaves open.** These follow the real
  console: the enable value, the latch sequence, the TAC rates, the LFSR taps,
  the sprite limit and the priority rules.
- **Link registers.** The original text names FF01 as the link control
  register. Here the control register SC is at FF02 and the data register SB
  at FF01, as on the console.

## Verification

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_bus.svh` holds the
shared bus tasks, and `tb/flash_rom_model.sv` models the flash: each byte is
a[7:0]^a[15:8]^a[23:16]^5A.

Highlights:

- **`tb_dma_ctrl`** checks the 160-cycle OAM DMA, the 48-cycle halt of a
  3-block general DMA, 16 bytes per H-blank, and cancel.
- **`tb_ppu`** checks register and bank read-back, line and mode lengths and
  the 154-line frame. It also checks the rendered picture: a tile with
  scrolling, a sprite in its own palette, a sprite behind background, the
  10-sprite limit, the window, and DMG palettes.
- **The sound tests** check periods and duty cycles in clocks, the sweep
  write-back and overflow, the wave sample order, the noise shift grid and
  the 127-step period of the 7-bit LFSR. They also check routing, the mix, and
  the hand-over to the codec clock.
- **`tb_gbc_top`** runs the whole system at its default parameters for about
  3 million clocks. A scripted CPU exercises the reset, cartridge ROM/RAM/RTC
  banking, WRAM banks and echo, HRAM, OAM DMA with the CPU refused, general
  and H-blank DMA, timer, serial loopback, sound out to a modelled codec, two
  rendered frames read back through the display port, V-blank/STAT/joypad
  interrupts, the NES controller, and the double-speed switch. It counts each
  of these mechanisms and fails any that never happened.

Run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Itb \
          --top-module tb_gbc_top rtl/gb_pkg.sv tb/tb_gbc_top.sv
./obj_dir/Vtb_gbc_top
```

The testbenches reset or write everything they read, so they also pass with
memories starting at random values (`+verilator+rand+reset+2`).
