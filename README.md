# Pong on an FPGA with a soft CPU: the peripheral hardware

This is a networked two-player Pong game for an Altera DE2-class board. The game
itself runs as software on a Nios II CPU. That covers ball motion, bounces,
the computer player, lives and speed. Everything the software talks to is
hardware, and this repository holds that hardware in SystemVerilog:

* a **VGA raster controller** that draws the whole playfield from a few
  position registers;
* a **rotary-knob decoder** through which one player moves the right paddle;
* an **Ethernet bridge** to the board's DM9000A chip, through which a second
  player on a networked PC sends key presses (`w` up, `s` down, `k`
  two-player mode, `l` play against the computer);
* an **audio controller** that plays a short tone through the codec each time
  the ball hits a paddle or a wall;
* the glue: a bus fabric, a power-on reset counter and the Ethernet chip's
  25 MHz clock.

The CPU only moves objects around. The images, the background and the
timing are made in hardware. The CPU hears about events through three
interrupt lines: VGA end of frame, knob turned, and Ethernet packet.

## System view

```
             avm_* (CPU data master)          cpu_irq[2:0]
                    |                               ^
              +-----v-------------------------------+----+
              |               avalon_fabric               |
              +---+-----------+------------+----------+---+
                  |           |            |          |
              vga_raster  rotary_avalon audio_avalon dm9000a_bridge
              (VGA_*)     (rot_a/rot_b,  (AUD_*,     (ENET_*)
                           LEDR)          I2C)
  power_on_reset -> reset_n (CPU, all slaves, ENET_RST_N)
  clk_div2       -> ENET_CLK (25 MHz)
```

The top is `pong_top`. The CPU and its SRAM are not part of this RTL. The
CPU's data master and its interrupt inputs are ports of the top, so a CPU
core, or a testbench playing one, connects there.

### Bus and address map

The bus is a small Avalon-style interconnect:

* word-addressed, with 8 address bits and 16-bit data;
* read data comes back exactly one cycle after the read is accepted;
* `waitrequest` stalls the master while a slave is busy. Only the Ethernet
  bridge ever stalls.

| word address | slave | registers |
|---|---|---|
| 0x00–0x1F | `vga_raster` | 16 position/life registers (aliased twice) |
| 0x20–0x3F | `rotary_avalon` | direction; any write clears its interrupt |
| 0x40–0x5F | `audio_avalon` | write starts a tone, read clears the start flag |
| 0x60–0x7F | `dm9000a_bridge` | 0x60 index port, 0x61 data port |
| 0x80–0xFF | none | writes ignored, reads return 0 |

`cpu_irq` has three bits:

* bit 0 is the VGA frame interrupt;
* bit 1 is the rotary interrupt;
* bit 2 is the Ethernet interrupt.

Each slave takes the request as one packed struct, `pong_pkg::avalon_req_t`,
which holds chipselect, read, write, address and writedata.

## The display controller (`vga_raster`)

This is the largest and least obvious part.

**Timing.** The raster is the standard 640x480 at 60 Hz:

* 800 clocks per line: sync 96, back porch 48, active 640, front porch 16;
* 525 lines per frame: sync 2, back porch 33, active 480, front porch 10.

The block runs on the 50 MHz system clock. A pixel enable toggles every cycle,
which gives the 25 MHz pixel rate, and that toggle is also sent out as
`VGA_CLK`. The counters live in the helper `vga_timing`. Colour and sync are
registered once, so they leave the block together.

**Registers.** The sixteen registers are 16 bits each, and the CPU writes them:

| addr | meaning | reset |
|---|---|---|
| 0, 1 | ball x, y (top-left corner) | 0x100, 0 |
| 2, 3 | left paddle x, y | 0, 0 |
| 4, 5 | right paddle x, y | 0x16B, 0xA0 |
| 6, 7, 8 | left player's lives l1, l2, l3 | 2 |
| 9, 10, 11 | right player's lives r1, r2, r3 | 2 |
| 12, 13 | shadow ball 1 x, y | 0x10, 0 |
| 14, 15 | shadow ball 2 x, y | 0xF, 0 |

A life register that holds 2 shows a heart. Any other value leaves its tile
empty; the game writes 3 for a lost life. All registers can be read back.

**Picture.** For each pixel, the first layer in this list that covers it wins:

1. ball (16x16), where its image is not transparent;
2. shadow ball 1, then shadow ball 2 (16x16 each, transparent outside the
   disc). The software places these at the ball's earlier positions, which
   makes a trail;
3. left paddle, then right paddle (21x120 each, opaque);
4. background tiles;
5. black.

A sprite whose corner is at (H, V) covers x in [H, H+width) and
y in [V, V+height). Positions are 16-bit values, so a sprite can be pushed
off screen by giving it a large coordinate.

**Background.** The screen is a grid of 20x15 tiles, each 32x32 pixels.
Two small images, a wall tile and a heart, paint the whole background:

* A fixed map in `pong_pkg::wall_row` places wall tiles in rows 2–12. They
  outline a large heart, symmetric about tile column 9.
* Tile row 0 holds the six life tiles: l1, l2, l3 at columns 6, 7, 8 and
  r3, r2, r1 at columns 11, 12, 13.

**Images.** The sprites are computed rather than stored: combinational
functions in `pong_pkg` turn (x, y) inside a sprite into a colour.

* The ball is a red disc, `d² = (2x−15)² + (2y−15)² ≤ 256`. Its red is
  `1023 − d²`, with a white highlight where `d² ≤ 40`.
* Shadow ball 1 is the ball shifted right by one bit (half brightness).
  Shadow ball 2 is shifted by two bits (quarter brightness).
* The paddle is red, with cyan tips of 6 rows at each end, a grey centre bar
  and two black bands.
* The wall tile is blue with a darker rim.
* The heart is two discs over a triangle.

The colours are 10 bits per channel, matching the board's video DAC. To use
real artwork, replace these functions with ROM lookups; the rest of the
raster does not change.

**Frame interrupt.** `irq` rises on the last pixel of every frame and stays
high until the CPU writes any VGA register. The software moves all objects in
this interrupt, once per frame. That paces the game at the frame rate and
stops the picture from flickering halfway through a frame.

**Sync outputs.**

* `VGA_HS` and `VGA_VS` are active low.
* `VGA_BLANK` is the inverse of (hsync or vsync). Colour is also forced to
  zero outside the 640x480 window.
* `VGA_SYNC` is tied low.

## Rotary knob (`rotary_fsm`, `rotary_avalon`)

The knob's two contacts A and B step through 01, 11, 10, 00 for one detent
clockwise, and through 10, 11, 01, 00 for one detent counter-clockwise. A
seven-state Moore machine follows them:

```
S0 -01-> S1 -11-> S2 -10-> S3 -> S0    clockwise        (dir = 2'b10, reads 2)
S0 -10-> S4 -11-> S5 -01-> S6 -> S0    counter-clockwise (dir = 2'b01, reads 1)
```

* A state stays put while its code repeats.
* Any other code, or an illegal state encoding, sends the machine back to S0,
  so a glitch can never lock it up.
* A detection holds `dir` for `HOLD_CYCLES` (10000) clocks.
* A and B first pass through a two-flip-flop synchroniser.
* The state is shown one-hot on `LEDR[7:0]`.

`rotary_avalon` raises `irq` once per detection. A read returns the current
direction, or the last one seen. Any write clears the interrupt. The game
moves the paddle up for 1 and down for 2.

## Sound (`audio_avalon`, `wm8731_driver`, `i2c_av_config`)

The CPU starts a tone with a write and then reads. The write sets a start
flag and the read clears it. Each rising edge of the flag plays one burst of
`PLAY_SAMPLES` (4096) samples, about 84 ms.

`wm8731_driver` makes the codec's serial stream:

* format: left-justified, 16 bits per channel, the same sample on both
  channels;
* 64 bit clocks per sample, and `CLOCK_DIVIDER` (1024) system clocks per
  sample, which gives 48.8 kHz. The divider sets the sample rate, so it must
  match the rate of the sound data;
* `AUD_XCK` is clk/4.

In the game the driver is used in its test mode: a 48-point sine table at
half full scale, which gives a 1 kHz beep. The table is computed when the
design is built, with Bhaskara's approximation
`sin θ ≈ 16θ(π−θ) / (5π² − 4θ(π−θ))`. A `data` input with an
`audio_request` strobe is there for stored samples.

`i2c_av_config` sends ten configuration words to the codec after reset,
at 100 kHz (codec address 0x34):

* volumes;
* DAC select;
* power-up;
* left-justified 16-bit slave mode;
* normal sampling;
* activate.

A word that is not acknowledged is sent again. `config_done` reports when
all ten are through.

## Ethernet (`dm9000a_bridge`, `clk_div2`, `power_on_reset`)

The DM9000A is reached through two words:

* a write to the index port (`ENET_CMD` = 0) selects a chip register;
* the data port (`ENET_CMD` = 1) reads or writes the selected register.

The bridge stretches each access into three 20 ns phases: setup, then the
`RD_N`/`WR_N` strobe, then hold. It holds `waitrequest` until the hold phase,
so an access takes four clocks. The chip's interrupt is registered and sent on
as `irq`. Packet handling lives in the driver software, including the key
code and clearing the chip's interrupt status.

The board has no oscillator for the chip, so `clk_div2` makes its 25 MHz
clock from the system clock. The chip is held in reset by `power_on_reset`,
which is a 16-bit counter that keeps `reset_n` low for 65536 cycles after
configuration (1.3 ms). The same reset goes to the CPU and all slaves.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `pong_top` | `POR_WIDTH` | 16 | power-on reset counter width (2^N cycles) |
| `pong_top`, `rotary_*` | `HOLD_CYCLES` | 10000 | direction hold time |
| `pong_top`, audio | `CLOCK_DIVIDER` | 1024 | clocks per audio sample, a power of two ≥ 128 |
| `pong_top`, audio | `PLAY_SAMPLES` | 4096 | samples per tone burst |
| `pong_top`, audio | `I2C_QUARTER` | 125 | clocks per quarter I2C bit |
| `wm8731_driver` | `SINE_POINTS` | 48 | sine table size |
| `rotary_fsm` | `SYNC_STAGES` | 2 | input synchroniser depth |

The VGA timing and sprite sizes are constants in `pong_pkg`.

## Where this design departs from the original game hardware

* **CPU, SRAM, the chips, the network keyboard program and the game software
  are not here.** The top brings out the CPU's bus and interrupt lines.
* **Sprite and tile images are generated by formulas.** The originals were
  bitmaps converted from pictures, so colours and shapes are similar but not
  the same.
* **Wall map.** The wall outlines a symmetric heart of tiles in rows 2–12.
* **Sprite windows are exact.** The original's windows were off by one
  pixel.
* **The VGA raster runs on one 50 MHz clock with a pixel enable.** It uses no
  divided clock.
* **All VGA registers read back.**
* **Sound is the sine test tone the game used**, played in fixed-length
  bursts. The stored-sound path exists (`data`/`audio_request`) but no sound
  ROM is included.
* **Codec setup and the serial format are this design's.**
* **Added safeguards.** The rotary inputs get a synchroniser, every block
  gets a synchronous reset, and the Ethernet bridge sequences its own bus
  timing with `waitrequest`. In the original, that timing was set in the bus
  generator.
* **Bidirectional pins are split** into separate in/out/enable signals (ENET
  data, I2C SDA).

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5, list the package first:

```
verilator --binary --timing -Irtl rtl/pong_pkg.sv rtl/vga_timing.sv \
    rtl/vga_raster.sv tb/tb_vga_raster.sv --top-module tb_vga_raster
./obj_dir/Vtb_vga_raster
```

The whole-system test needs every file, with the package first:

```
verilator --binary --timing -Irtl rtl/pong_pkg.sv \
    $(ls rtl/*.sv | grep -v pong_pkg) tb/tb_pong_top.sv --top-module tb_pong_top
./obj_dir/Vtb_pong_top
```

| testbench | what it checks |
|---|---|
| `tb_rotary_fsm` | which code sequences count as a clockwise or counter-clockwise detent, exact hold time, latency, state display |
| `tb_rotary_avalon` | one interrupt per detent, none for a broken sequence, clear on write, read values, LEDs |
| `tb_vga_raster` | full frames: sync widths and periods, frame interrupt, sprite priority and positions, life tiles, read-back |
| `tb_wm8731_driver` | bit and LR clock periods, serial samples against a sine computed in the testbench, burst length, data-input handshake |
| `tb_i2c_av_config` | all ten words decoded from the bus, retry after a refused byte |
| `tb_audio_avalon` | start/clear protocol, bursts, XCK, codec configuration |
| `tb_dm9000a_bridge` | index/data accesses, strobe timing, waitrequest, interrupt |
| `tb_avalon_fabric` | address decode, read steering, stalls, unmapped space |
| `tb_power_on_reset`, `tb_clk_div2` | reset length, clock division |
| `tb_pong_top` | whole system at default parameters (about 7 s of simulation time) |

Some block testbenches shorten `HOLD_CYCLES`, `CLOCK_DIVIDER` and similar
parameters.

`tb_pong_top` runs at the default sizes. It plays the CPU's interrupt
handlers and puts models of the Ethernet chip, the knob, the I2C line and a
VGA monitor around the design. Then it:

* turns the knob both ways;
* sends the keys w, s, k and l;
* bounces the ball with sound;
* takes a life away.

After every frame it checks the picture against what was written. It counts
each mechanism and fails if one never happens: reset release, frame
interrupt, each rotary direction, each key action, sound burst, codec
configuration, lost life shown, and the Ethernet clock.
