# AHB-Lite microcontroller system

A small microcontroller built around one AMBA AHB-Lite bus. A single 32-bit master (in the full
system an ARM Cortex-M0) reaches a 4 KB internal memory and six memory-mapped peripherals: a VGA
display controller with a text console and an image buffer, a UART, a 32-bit down-counting timer,
a GPIO port, a four-digit 7-segment display driver and an LED register. Each peripheral decodes only
a 16 MB slice of the address space. The whole interconnect is one address decoder and one
read-data multiplexer.

This RTL covers everything on the bus side of the processor. The processor itself is vendor IP and
is not included. Its AHB-Lite master port appears as ports of the top module `mcu_top`. In
simulation a bus-functional master (`tb/ahb_master_bfm.sv`) drives those ports and plays the
program.

```
                 haddr/htrans/hwrite/hsize/hwdata            hrdata/hready/hresp
  master port  ───────────────┬──────────────────────────────────▲──────────
                              │                                  │
                        ahb_decoder ── slave_id ──────────►  ahb_mux (registers id
                              │ hsel[6:0]                        │  for the data phase)
      ┌──────────┬────────────┼──────────┬──────────┬───────────┼──────────┐
   ahb_bram   ahb_vga     ahb_uart   ahb_timer   ahb_gpio   ahb_sevenseg  ahb_led
    4 KB    hsync/vsync/   tx/rx     timer_irq   gpio_in/    seg/an        led[7:0]
            rgb[7:0]                             out/dir
```

## Memory map

The top address byte selects the slave (`ahb_decoder`):

| Region                      | Slave          | Module         |
|-----------------------------|----------------|----------------|
| 0x0000_0000 – 0x4FFF_FFFF   | 4 KB memory    | `ahb_bram`     |
| 0x5000_0000 – 0x50FF_FFFF   | VGA            | `ahb_vga`      |
| 0x5100_0000 – 0x51FF_FFFF   | UART           | `ahb_uart`     |
| 0x5200_0000 – 0x52FF_FFFF   | Timer          | `ahb_timer`    |
| 0x5300_0000 – 0x53FF_FFFF   | GPIO           | `ahb_gpio`     |
| 0x5400_0000 – 0x54FF_FFFF   | 7-segment      | `ahb_sevenseg` |
| 0x5500_0000 – 0x55FF_FFFF   | LED            | `ahb_led`      |

The memory appears repeatedly throughout its 1.25 GB region, and each peripheral throughout its
16 MB. Addresses above 0x55FF_FFFF select no slave. The multiplexer answers such a transfer with
OKAY and read data 0. There is no separate default slave and no ERROR response.

## How a transfer moves through the bus

AHB-Lite pipelines every transfer into two cycles:

- **Address phase.** The master drives `haddr`, `htrans`, `hwrite` and `hsize`. The decoder turns
  `haddr` into a one-hot `hsel` and an encoded `slave_id`. Each slave registers what it needs: write
  flag, register offset, byte-lane mask. It does so only when the transfer is selected and active
  (NONSEQ or SEQ) and the bus-wide `hready` is high.
- **Data phase.** `hwdata` is valid, and the slave's `hrdata`, `hreadyout` and `hresp` answer.
  `ahb_mux` latched `slave_id` at the end of the address phase, so it routes the right slave's
  response back even though the decoder already shows the next address.

The routed `hreadyout` is the bus `hready` that goes back to every slave and to the master. A
slave that holds `hreadyout` low stretches the data phase, and everything else waits with it. The
multiplexer updates its latched id only while `hready` is high, so the id stays put during a wait.

Transfers can follow each other with no idle cycle between them, as in a burst. The address phase
of one transfer then overlaps the data phase of the one before, even when the two go to different
slaves. The memory can take a write and then an immediate read of the same word: the read sees the
new data.

All slaves except the VGA controller answer in zero wait states. The VGA controller inserts waits
when a character write arrives while the console is still clearing its buffer after reset (see
below). The end-to-end test relies on this to exercise the wait path.

Shared types live in `ahb_pkg`. `ahb_req_t` holds address, transfer type, write flag, size, write
data and bus `hready`. `ahb_rsp_t` holds read data, ready and response. The package also holds the
transfer-type and size enums, the slave enum and the map constants. `mcu_top` checks, with an
assertion, that the master keeps `haddr` and `hwrite` stable during a wait state.

## Peripherals and their registers

Register offsets are within the peripheral's region. All registers reset to the values shown, and
all responses are OKAY.

### Memory – `ahb_bram`
1024 × 32-bit words (`MEM_BYTES` = 4096). Byte, halfword and word writes use byte lanes derived from
`hsize` and `haddr[1:0]`. A read returns the whole word with no wait state: the array is read
combinationally from the registered address. A read straight after a write to the same word sees
the new data. `INIT_FILE` (empty by default) loads a program image with `$readmemh`. No program is
supplied, because the application was compiled for the processor with its own tool chain.

### LED – `ahb_led`
Any offset: bits 7:0 drive `led[7:0]` (1 = lit). Reset value 0.

### GPIO – `ahb_gpio`
| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x0 | DATA | R/W | write: output register; read: for each pin, the output register if it is an output, else the synchronised input |
| 0x4 | DIR  | R/W | 1 = output; reset 0 (all inputs) |

`gpio_out` and `gpio_dir` are meant for tri-state pads outside the design. Inputs pass a two-flop
synchroniser, so a change reads back two clocks later. In the demonstration program, switches are
read here and copied to the LED register.

### Timer – `ahb_timer`
| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x0 | LOAD | R/W | reload value; writing it also sets the count. Reset 0x0000_FFFF |
| 0x4 | VALUE | R | current count. Reset 0x0000_FFFF |
| 0x8 | CONTROL | R/W | [0] enable, [1] 1 = periodic / 0 = free-running, [3:2] prescale 00 = /1, 01 = /16, 1x = /256 |
| 0xC | CLEAR | W / R | write: clear interrupt; read: bit 0 = interrupt flag |

A free-running 8-bit prescale counter produces `clk16` and `clk256`, one-clock enable pulses rather
than derived clocks. The count drops by one on every selected tick. When a tick finds the count at
zero, the interrupt flag sets and stays set until cleared. At the same tick the count restarts: from
LOAD in periodic mode, from 0xFFFF_FFFF in free-running mode. In periodic mode, interrupts are
therefore exactly (LOAD+1) × prescale clocks apart. A two-state machine (`current_state`,
`next_state`: IDLE/RUN) follows the enable bit with one clock of delay. `timer_irq` is the flag.

### 7-segment display – `ahb_sevenseg`
DIGIT1–DIGIT4 are at offsets 0x0, 0x4, 0x8 and 0xC, 8 bits each. The low nibble is shown as a
hexadecimal digit (0–9, A, b, C, d, E, F), and DIGIT1 is the rightmost digit. One digit is lit at a
time. A refresh counter moves to the next digit every `CLK_HZ/(4·LOOP_HZ)` clocks (12 500 at 50 MHz),
so the four-digit loop repeats at 1 kHz. The outputs suit a common-anode display and are active
low: `an[i]` = 0 powers digit i, and `seg[6:0]` = {g,f,e,d,c,b,a} with 0 = segment on. To show the
timer, the program reads VALUE and writes one nibble to each DIGIT register.

### UART – `ahb_uart` (with `uart_baudgen`, `uart_fifo`)
| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x0 | DATA | W / R | write: queue a byte for sending; read: oldest received byte (removed) |
| 0x4 | STATUS | R | [0] TX full, [1] TX empty, [2] RX full, [3] RX empty, [4] transmitter busy |

- **Frame format.** 8N1: a start bit of 0, eight data bits LSB first, then a stop bit of 1. For
  example, `'T'` (0x54) goes out as 0,0,0,1,0,1,0,1,0,1.
- **Baud rate.** `uart_baudgen` divides the clock to 16 ticks per bit using
  round(CLK_HZ / (16·BAUD)). At 50 MHz and 19200 bps that is 163, which gives 2608 clocks per bit,
  0.15 % slow.
- **Transmitter.** It waits for a tick before taking a byte from its 16-entry FIFO, so every bit,
  the start bit included, lasts exactly 16 ticks.
- **Receiver.** The input is synchronised first. A falling edge starts a frame, and the start bit
  is confirmed half a bit later. The receiver then samples each bit in its middle. A frame is
  pushed into the 16-entry RX FIFO only if its stop bit is 1 and the FIFO has room.
- **Full FIFOs.** A write to a full TX FIFO is dropped.

### VGA – `ahb_vga` (with `vga_sync`, `vga_counter`, `vga_console`, `font_rom`, `vga_image`, `dual_port_ram_sync`)
| Offset | Access | Meaning |
|---|---|---|
| 0x0_0000 | W | send a character to the text console |
| 0x0_0004 | R/W | text colour, RRRGGGBB; reset 0xFF (white); green is 0x1C |
| 0x1_0000 + 4·n | W | colour of image pixel n = y·160 + x |

The screen is 640×480 at 60 Hz, with a pixel every second clock (25 MHz from 50 MHz). `vga_sync`
chains two `vga_counter`s: 800 pixels per line and 525 lines per frame. It produces active-low sync
pulses (horizontal pixels 656–751, vertical lines 490–491) and `video_on`.

The screen is split into two bands:

- **Text band**, lines 0–239. `vga_console` keeps an 80 × 30 buffer of 7-bit character codes and
  uses 8×8 cells. `font_rom` holds 5×7 glyphs for space, digits and capitals; lower case is drawn
  as capitals and other codes are blank. Storing codes rather than pixels keeps the text memory to
  2400 × 7 bits.
  - Writes go to a cursor that starts at the top left. Line feed (0x0A) starts the next line,
    carriage return (0x0D) the current one, and the cursor wraps after column 79 and after line
    29. There is no scrolling.
  - After reset the console spends 2400 clocks filling its buffer with spaces. A character write
    in that window is held with `hreadyout` low until the console can take it.
  - A lit glyph pixel shows the text colour; everything else in the band is black.
- **Image band**, lines 240–479. `vga_image` stores a 160 × 60 image of 8-bit colours in a
  `dual_port_ram_sync`. The bus writes one port, the display reads the other, and each stored
  pixel covers a 4×4 block of screen pixels. The bus cannot read the image back.

**Display pipeline.** This is the one part where timing needs care. `vga_sync` advances the
position on the last clock of each pixel (`p_tick`).

1. On the first clock of a pixel, the console lookup is combinational and the image RAM samples
   its read address.
2. On the second clock, the RAM output is valid. The console result has been delayed one register
   to match it.
3. The mixed colour, `hsync` and `vsync` are all registered on that `p_tick` edge.

All three outputs therefore lag the counters by one pixel, by the same amount. Pixel k after reset
(counting from 0, in raster order) appears on `rgb` after rising edge 2(k+1). The testbenches use
this to check every pixel of a frame.

The analogue side (resistor-divider DAC on the VGA connector) is outside this RTL. `rgb[7:5]` is
red, `rgb[4:2]` green and `rgb[1:0]` blue.

## Parameters and clock

Every timing constant assumes one clock, `hclk`, of 50 MHz. This is a choice, and it sits in
`CLK_HZ` of `mcu_top`, `ahb_uart`/`uart_baudgen` and `ahb_sevenseg`. VGA timing assumes
`CLK_DIV` = 2 clocks per pixel. With a different clock:

- change `CLK_HZ`;
- change `vga_sync`'s `CLK_DIV` so the pixel rate stays near 25 MHz. The display pipeline needs at
  least 2 clocks per pixel.

Other parameters (memory size, FIFO depth, console and image size) default to the values above and
may be changed. The FIFO depth and the image scale must be powers of two.

## Where this departs from, or adds to, the original description

The original system names its peripherals, the memory map, the 4 KB memory, the 19200 bps rate,
the 8 LEDs, the timer's 32-bit counter with 1/16/256 prescaling and two modes, and the four-digit
common-anode display with a 1 kHz loop. It also gives the VGA module's sub-block hierarchy and its
8-bit colour. It does not give register maps, FIFO depths, console or image sizes, glyphs, the
clock frequency or the timer's state machine. Everything in those areas is this design's own
choice and is described above. In particular:

- **Register maps.** All register offsets and bit layouts are new.
- **Bus handling.** There is no default slave, unmapped accesses return OKAY/0, and no ERROR
  response is ever produced. HBURST, HPROT and HMASTLOCK are not connected; no slave needs them.
- **Timer.** The prescaler is read as a divide by 1, 16 or 256. Free-running mode wraps to
  0xFFFF_FFFF, and LOAD and VALUE reset to 0xFFFF, the count the original shows the timer starting
  from.
- **7-segment display.** "1 kHz looping frequency" is read as the full four-digit loop. Only four
  digits are driven.
- **VGA.** The upper-text/lower-image split, the 4× image scaling, the font and the console's
  cursor rules are new. So are the wait states during the console's clear.
- **Processor.** The processor, and the program it runs, are not included.

## Simulating

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/ahb_pkg.sv tb/tb_mcu_top.sv --top-module tb_mcu_top
./obj_dir/Vtb_mcu_top
```

Replace `tb_mcu_top` with any other testbench name. The main ones:

- `tb_mcu_top` is the whole system at default parameters. It runs the demonstration program:
  - nine back-to-back pipelined transfers that hop between memory, LED, VGA, timer and an
    unmapped address, with a VGA wait state in the middle;
  - "HELLO" in green on the console while the console is still clearing (this forces wait states),
    and a full frame's pixels counted;
  - switches copied to the LEDs through GPIO;
  - "TEST" stored in memory with byte writes, sent over the UART, decoded off the line and looped
    back into the receiver, then "HELLO" the same way;
  - the timer in periodic mode at /16 and /256, and a free-running wrap;
  - the timer count shown on the 7-segment display and decoded from `seg`/`an`;
  - an unmapped read.

  It counts each of these mechanisms and fails if any did not occur. It takes a few seconds.
- `tb_timer_countdown` is the countdown demonstration on the whole system. The timer runs from FFFF
  to 0 at /16 with a program loop copying it to the display. The test decodes the display and
  checks it against elapsed time, through two full periods with interrupts exactly 65536 × 16
  clocks apart.
- `tb_ahb_vga` checks every pixel and both syncs of a full 640×480 frame against a picture built
  in the testbench.
- The remaining testbenches exercise one module each: decoder, multiplexer, memory, LED, GPIO,
  timer, 7-segment, baud generator, FIFO, UART, sync generator, font, console, RAM and image buffer.

All testbenches pass, and each one was also confirmed to fail against a deliberately broken copy
of its module. Simulations are two-state and reset everything that is read, except the contents of
the memories. The image RAM holds whatever it powered up with until it is written, so the tests
write every pixel they check.

## Files

- `rtl/ahb_pkg.sv`: bus types, slave enum, memory-map constants.
- `rtl/mcu_top.sv`: system top (decoder, multiplexer, seven slaves).
- `rtl/ahb_decoder.sv`, `rtl/ahb_mux.sv`: interconnect.
- `rtl/ahb_bram.sv`, `ahb_led.sv`, `ahb_gpio.sv`, `ahb_timer.sv`, `ahb_sevenseg.sv`: memory and
  simple peripherals.
- `rtl/ahb_uart.sv`, `uart_baudgen.sv`, `uart_fifo.sv`: UART.
- `rtl/ahb_vga.sv`, `vga_sync.sv`, `vga_counter.sv`, `vga_console.sv`, `font_rom.sv`,
  `vga_image.sv`, `dual_port_ram_sync.sv`: VGA.
- `tb/ahb_master_bfm.sv`: bus-functional AHB-Lite master that honours wait states. Its `write`,
  `read` and `idle` tasks do single transfers. `run_seq` and `burst` do back-to-back pipelined
  transfers.
- `tb/tb_*.sv`: testbenches.
