# A single-clock NES in SystemVerilog

This is a Nintendo Entertainment System built as synchronous logic for an FPGA.
It has four main parts:

- a 6502-compatible CPU with sprite DMA;
- the audio unit's two square-wave channels;
- the 2C02-style picture processing unit (PPU);
- a VGA back end that shows the NES picture on a 640x480 monitor.

Everything runs from one 26.666 MHz clock, the VGA pixel clock. The NES's other rates are made
from it with clock enables:

| Domain | Rate | Divider |
|---|---|---|
| PPU dot clock | 5.333 MHz | 26.666 / 5 |
| CPU clock | 1.777 MHz | 26.666 / 15 |

So the PPU still runs exactly three dots per CPU cycle, as on the console. The NES draws into
one of two frame buffers. The VGA side scans out the other buffer, doubling every pixel and
every line, so the 256x240 picture becomes 512x480 with a 64-pixel black bar on each side.

The console takes a "mapper 0" cartridge, meaning 32 KB of program ROM and 8 KB of pattern
(character) ROM with no bank switching. The cartridge's address and data buses are ports of
the top module.

## Block structure

```
nes_top
├── clock_gen            PPU (1/5) and CPU (1/15) clock enables
├── cpu6502              CPU FSM + datapath, NMI/IRQ/BRK, $4014 sprite DMA
│   └── alu6502          12-function 8-bit ALU with N/Z/C/V
├── mem_mapper           CPU address decode, $4000-$401F registers, $4016/$4017 pads
├── cpu_ram              2 KB work RAM ($0000-$07FF, mirrored to $1FFF)
├── ctrl_if              polls both pads 60 times a second
├── apu                  $4000-$4007, $4015, $4017; mixes two channels
│   ├── apu_frame_seq    240/120/60 Hz or 192/96/48 Hz sequencer clocks
│   └── apu_square (x2)  timer, duty sequencer
│       ├── apu_envelope
│       ├── apu_sweep
│       └── apu_length_counter
├── ppu
│   ├── ppu_regfile      $2000-$2007, read buffer, scroll/address toggle, NMI
│   ├── ppu_scan_fsm     341x262 dot/line counter, stages, VRAM arbitration
│   ├── ppu_bg_renderer  scroll counters, fetches, 16-bit shift registers
│   ├── ppu_sprite_renderer
│   │   ├── ppu_range_eval     finds sprites on the next line
│   │   ├── ppu_sprite_temp    8 x 24-bit entries for the next line
│   │   └── ppu_sprite_buffer (x8)  X counter + two pattern shifters
│   ├── ppu_pixel_mux    background/sprite priority, clipping, sprite-0 hit
│   ├── ppu_sprite_ram   256-byte object memory
│   ├── ppu_palette_ram  32 x 6-bit palette
│   └── ppu_vram         2 KB name-table RAM with cartridge mirroring
├── framebuffer          2 x 256x256 x 6-bit, double buffered
└── vga_adapter          640x480 timing, 2x2 scaling, black bars
    └── vga_palette      NES colour code -> 24-bit RGB
```

`nes_pkg` holds what several modules share: the ALU operation codes, the length-counter load
table, the duty patterns and the PPU frame geometry.

## The CPU: a state machine over a combinational datapath

The hardest part to follow is `cpu6502`. It has no microcode ROM. Instead, a state register
selects the following for the current cycle:

- the bus address source: PC, `{M,L}`, `{M,L}+1`, a zero-page pointer, the stack, or a hard
  vector address;
- the two ALU operands;
- the registers that latch at the next enabled edge.

Besides the programmer-visible A, X, Y, SP, PC and P, there are three internal registers:

- `M`, the high byte or the operand;
- `L`, the low address byte, with a ninth bit as the index carry;
- `ND`, the indirect pointer.

Memory reads are combinational. The address leaves the core and the byte returns in the same
cycle, which is why immediate instructions take 2 cycles and zero-page ones 3.

Each instruction walks through a short chain of states:

- Fetch 1 and Fetch 2;
- an addressing-mode chain: zero page, absolute, their X/Y forms, indirect X, indirect Y;
- then either an execute, write-back or dead cycle, or a control-flow chain: branch, push,
  pull, BRK, JSR, RTI, RTS, JMP.

Fetch 1 is also where interrupts and DMA enter:

- **NMI.** `nmi` is latched on its rising edge. `irq` is a level that the I flag masks.
- **Entry.** When an interrupt is pending, the opcode fetch is replaced by the BRK sequence. That
  sequence pushes PC and P, sets I, and loads PC from $FFFA (NMI) or $FFFE (IRQ/BRK).
- **DMA.** A write to $4014 makes Fetch 1 enter a two-state loop. It reads `$xx00+i` and writes
  the byte to $2004 for i = 0..255, which is 512 CPU cycles.

Known differences from a real 6502:

- Of the undocumented opcodes, only some are implemented:
  - The read-modify-write combinations SLO, RLA, SRE, RRA, DCP and ISC are implemented. The
    shift or increment result is written back first. The ALU operation with A then runs in
    what would otherwise be the instruction's dead cycle, so these take the same number of
    cycles as the plain read-modify-write instruction.
  - LAX and SAX are implemented.
  - All others run as 2-byte NOPs: the immediate forms, the unstable stores and KIL.
- There is no decimal mode. The NES CPU has none either.
- Interrupt entry, PLA/PLP and indexed stores each take one cycle less than on the 6502. Games
  that count cycles exactly will notice this; most software will not.
- Return addresses are pushed high byte first, as on the real part. This differs from the order
  in which the original design's state table lists the BRK pushes.

## The PPU: four stages per scanline

A frame has 262 lines of 341 dots:

| Lines | Use |
|---|---|
| 0-19 | vertical blank. The VBLANK flag and NMI rise at dot 0 of line 0. |
| 20 | the prime line. VBLANK, sprite-0 hit and overflow are cleared here. The vertical scroll is reloaded and the first tiles are prefetched. |
| 21-260 | visible; each drawn line is one picture row |
| 261 | idle |

Each line has four stages. `ppu_scan_fsm` decodes them and hands out the VRAM port:

| Dots | Stage | VRAM owner |
|---|---|---|
| 0-255 | pixels out; range evaluation reads sprite RAM one byte per dot | background |
| 256-319 | horizontal blank; sprite patterns fetched, 8 dots per sprite | sprites |
| 320-335 | prefetch of the next line's first two tiles | background |
| 336-340 | two dummy name-table reads, then a rest dot | background |

The rest dot is dropped on the prime line of every odd frame while rendering is on.

CPU accesses through $2007 are served outside rendering as a two-dot request. While one is
pending, status bit 4 is high and further writes are ignored. VRAM is read synchronously, and the
pattern ROM is sampled on the PPU dot enable. So every fetch is a 2-dot access:

1. address out;
2. data back.

**Background.** `ppu_bg_renderer` keeps the scroll as one 16-bit word laid out as
`{coarse Y[15:11], fine Y[10:8], coarse X[7:3], fine X[2:0]}`:

- $2005 and $2006 write the word through the shared toggle.
- Coarse X wraps into the horizontal name-table bit.
- Coarse Y wraps at 30 into the vertical name-table bit.
- The horizontal part is reloaded at dot 257 and the vertical part on the prime line.

Each tile takes four 2-dot fetches: name, attribute, pattern low, pattern high. The pattern bytes
go into the top half of two 16-bit shift registers, and the 2-bit attribute feeds two 8-bit
serial shifters. Fine X selects the tap.

**Sprites.** The sprite path has three steps:

1. During the visible dots, `ppu_range_eval` compares each sprite's Y with the next line, for
   8x8 or 8x16 sprites.
2. Up to eight hits go into `ppu_sprite_temp` as 24-bit entries: tile, X, four attribute bits
   and a 4-bit row. Vertical flip is already applied to the row, so the flip bit is not stored.
   A ninth hit sets the overflow flag.
3. In horizontal blank, each entry's two pattern bytes are fetched and loaded into one of eight
   `ppu_sprite_buffer`s. Horizontal flip is done here by reversing the bits. Each buffer's X
   counter counts down one per pixel, and its shifters start when the counter reaches zero.

The pattern address is `{0, $2000.3, tile, plane, row}` for 8x8 sprites. For 8x16 sprites it is
`{0, tile[0], tile[7:1], row[3], plane, row[2:0]}`.

**Pixel mux.** `ppu_pixel_mux` picks the first non-transparent sprite buffer, so a lower sprite
number wins. Then:

- A transparent sprite shows the background.
- An opaque sprite with priority bit 0 shows the sprite.
- An opaque sprite with priority bit 1 shows the background if that pixel is opaque, and the
  sprite otherwise.
- Both transparent gives palette entry 0.
- $2001 bits 1-2 blank the left 8 columns.
- Sprite-0 hit is raised when sprite 0 and the background are both opaque on the same pixel.

In monochrome mode ($2001 bit 0) the colour code keeps only its grey column. $2001 bits 7-5 are
stored but have no effect.

## Audio

The audio unit has two identical square channels, at $4000-$4003 and $4004-$4007. In each
channel:

- An 11-bit timer runs at half the CPU rate with period p+1.
- The timer steps an 8-step duty pattern: 12.5, 25, 50 or 75 %.
- The envelope divides the 240 Hz clock by n+1. It counts 15 down to 0, optionally looping, or
  gives a constant volume n.
- The sweep shifts the period right by s and adds the result, or subtracts its ones' complement.
  It rewrites the period every p+1 half-frame clocks.
- The output is muted while the period is below 8 or the sweep target is above $7FF.
- The length counter is loaded from a 32-entry table. It counts down at 120 Hz unless halted.

`apu_frame_seq` divides the CPU clock by 7458 to get the 240 Hz, 120 Hz and 60 Hz clocks. In the
5-step mode ($4017 bit 7) it divides by 9323 to get 192 Hz, 96 Hz and 48 Hz.

`audio` is the 5-bit sum of both channels. It needs an external DAC or a PWM stage. There are no
triangle, noise or sample channels.

## Controllers and the memory map

`ctrl_if` does not wait for the CPU. Every 29630 CPU cycles (60 Hz) it:

1. pulses `pad_latch`;
2. clocks eight bits out of both pads;
3. keeps the inverted, so active-high, button bytes.

Writing 1 then 0 to $4016 copies those bytes into two shift registers in `mem_mapper`. Each read
of $4016 or $4017 returns the next button (A, B, Select, Start, Up, Down, Left, Right) in bit 0,
with $40 in the upper bits, then 1s after the eighth read.

| CPU address | Target |
|---|---|
| $0000-$1FFF | 2 KB RAM, mirrored |
| $2000-$3FFF | PPU registers, mirrored every 8 |
| $4000-$4013, $4015, $4017 (write) | audio |
| $4014 | sprite DMA |
| $4016/$4017 | pads |
| $6000-$7FFF | not decoded, reads 0 |
| $8000-$FFFF | cartridge PRG (`prg_addr`, `prg_cs`) |

## Video out

`framebuffer` holds two 64K x 6-bit buffers addressed `{buffer, y, x}`:

- The PPU writes the colour code of each drawn pixel.
- At the end of line 260 the write side swaps buffers.
- At the start of every VGA frame, the read side takes the buffer that is not being written.

This means the monitor never sees a half-drawn picture. The monitor refreshes at 63.5 Hz and the
NES draws at about 60 Hz, so an NES frame is occasionally shown twice.

`vga_adapter` uses standard 640x480 timing:

- 800 x 525 clocks per frame;
- horizontal front porch 16, sync 96, back porch 48;
- vertical front porch 10, sync 2, back porch 33;
- negative sync pulses.

Columns 64-575 show NES pixel `x = (col-64)/2` of row `y = line/2`. The colour code then goes
through the 64-entry `vga_palette` table. The outputs are registered one clock after the buffer
address.

## Top-level ports

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | 26.666 MHz clock, synchronous active-low reset |
| `prg_addr[14:0]`, `prg_cs`, `prg_data[7:0]` | out/out/in | cartridge program ROM, combinational read within the CPU cycle |
| `chr_addr[12:0]`, `chr_data[7:0]` | out/in | cartridge pattern ROM; data sampled on the next PPU dot |
| `mirror_v` | in | 1 = vertical name-table mirroring, 0 = horizontal |
| `cart_irq` | in | cartridge IRQ, level, active high |
| `pad_latch`, `pad_clk`, `pad_data1`, `pad_data2` | out/out/in/in | two NES pads (data active low) |
| `audio[4:0]` | out | square channel sum |
| `hsync`, `vsync`, `red`, `green`, `blue` | out | VGA |

## Simulating

Every block has a self-checking testbench in `tb/<module>_tb.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- uses only `$urandom` for random data.

To build and run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/nes_pkg.sv rtl/*.sv tb/ppu_tb.sv --top-module ppu_tb
./obj_dir/Vppu_tb
```

(`rtl/nes_pkg.sv` is listed first so that the package is compiled before its users. Verilator
ignores the duplicate.)

`tb/nes_top_tb.sv` runs the whole console with every parameter at its default, for four NES
frames. It takes about 4 seconds. The testbench contains:

- a generated 32 KB program ROM: a small 6502 program plus its palette and sprite tables;
- a formula-generated pattern ROM;
- two pad models.

The program does the following:

- clears RAM;
- sets palettes and the name table through $2006/$2007;
- sets up sprites by DMA;
- runs one combined undocumented opcode (SLO);
- turns rendering on with scroll;
- programs both square channels;
- reads the pads in the NMI handler;
- executes BRK;
- takes a cartridge IRQ;
- spins on the sprite-0 flag.

The testbench checks the following:

- **Pixels.** Several hundred VGA pixels are compared with the frame buffer contents through the
  palette.
- **RAM.** The work RAM ends up holding what the program should have left there.
- **Mechanisms.** It counts every mechanism and fails any that never happened:
  - instructions, NMI, IRQ, BRK and a combined undocumented opcode;
  - DMA, and palette, VRAM and object memory writes;
  - background and sprite pixels;
  - sprite-0 hit, overflow, VBLANK and the odd-frame dot skip;
  - pad polls, sound, sweep, envelope and length expiry;
  - buffer swaps and VGA frames.


## How far to trust it

Every module passes its own testbench against an independent reference model. Where a
reference model was practical, it is exhaustive or randomised over many thousands of cycles:

- ALU;
- pixel mux;
- background and sprite renderers;
- whole PPU over two frames;
- VGA adapter;
- memory map.

The CPU testbench runs a hand-assembled program. It checks:

- register and memory results;
- the stack;
- interrupts;
- sprite DMA;
- the cycle counts of representative instructions;
- the combined undocumented opcodes on random operands.

It is not a full instruction-set conformance suite. Nothing here has been run on an FPGA or
against a commercial cartridge.

What is not modelled:

- the triangle, noise and sample (DMC) audio channels;
- the frame-sequencer IRQ;
- cartridge mappers other than the plain 32 KB/8 KB board;
- cartridge RAM at $6000;
- colour emphasis;
- undocumented 6502 opcodes other than the combined read-modify-write ones, LAX and SAX;
- cycle-exact interrupt timing.
