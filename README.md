# nVGA: a small frame-buffered VGA controller for microcontrollers

A microcontroller cannot generate VGA timing and refresh a screen while it also runs an
application. This design puts a frame buffer, the video timing and a few drawing engines
into an FPGA. The microcontroller only sends short commands over SPI, such as "colour this
dot", "clear the screen" and "switch colour mode". The FPGA keeps the picture on a 640 x 480,
60 Hz VGA monitor by itself.

Only 8 bit x 32,768 words of on-chip RAM are available. That is far less than a 640 x 480
image needs, so the controller offers four colour modes that trade resolution for colour
depth. All four use the same 19,200 bytes:

| mode byte | pixels     | bits/pixel | colours                      | one pixel covers (screen dots) |
|-----------|------------|------------|------------------------------|--------------------------------|
| 0x00      | 320 x 480  | 1          | black / white                | 2 wide x 1 high                |
| 0x01      | 320 x 240  | 2          | 4 grey levels                | 2 x 2                          |
| 0x02      | 160 x 240  | 4          | 16 colours, R1 G2 B1         | 4 x 2                          |
| 0x03      | 160 x 120  | 8          | 256 colours, R3 G3 B2        | 4 x 4                          |

The output is 3 bits each of R, G and B, plus HSync and VSync. On the board these go to a
resistor-ladder DAC.

## The frame-buffer byte

This is the key to the whole design. Every memory byte belongs to one 4 x 4 block of screen
dots, in every mode. The address is always

    addr[14:0] = { y[8:2], x[9:2] }      (x, y = screen dot position, 0..639, 0..479)

so the scan-out logic never changes with the mode. Only the split of the byte changes:

| mode | pixel field in the byte             | field index   |
|------|-------------------------------------|---------------|
| 1bpp | bit `{x[1], y[1], y[0]}`            | 8 fields      |
| 2bpp | bits `2*i+1 : 2*i`, `i = {x[1], y[1]}` | 4 fields   |
| 4bpp | nibble `y[1]` (0 = bits 3:0)        | 2 fields      |
| 8bpp | the whole byte                      | 1 field       |

When you change the mode, the memory is not cleared. The stored bytes are simply read with
the new split. `pixel_codec` expands a field to the 8-bit R3 G3 B2 value sent to the output:

- 1bpp: the bit is copied to all eight lines, so the pixel is black or white.
- 2bpp: grey level `g1 g0` becomes `g1 g0 g1 | g1 g0 g1 | g1 g0`.
- 4bpp: `R G1 G0 B` becomes `RRR | G1 G0 G0 | BB`.
- 8bpp: the byte is used as it is.

The output stage maps R3 G3 B2 to three pins per colour. Blue's MSB is repeated on the
third blue pin.

The host always sends a colour as one R3 G3 B2 byte. The command interpreter cuts that byte
down to the current mode's format:

- 1bpp keeps R2.
- 2bpp keeps R2 R1.
- 4bpp keeps R2 G2 G1 B1.
- 8bpp keeps the whole byte.

## The read-modify-write pixel pipeline (`memory_controller`)

Several pixels share one byte. Drawing a single pixel therefore means reading the byte,
replacing one field and writing the byte back. All of this happens while the byte is being
displayed anyway, so nothing stalls the scan. The pipeline has three stages, and each pixel
position moves one stage per 25 MHz clock:

```
clock n      stage 1 "In"   x_scan -> (x_next, y_next) advertised to the graphics units,
                            units raise req (combinational); read address {y[8:2],x[9:2]}
clock n+1    stage 2 "Out"  memory word arrives (mem_out); arbiter's registered one-hot
                            enable selects one unit, which drives bus_color
clock n+2    stage 3 "Now"  mem_now = current word. pixel_codec takes the bus colour if a
                            unit was enabled, else the stored field -> out_color and the
                            modified byte wb_byte.
                            if the stage-2 pixel is in another word:
                                write wb_byte at addr_now (only inside the visible window)
                                mem_now <= mem_out
                            else
                                mem_now <= wb_byte   (next pixel of the same word sees the change)
clock n+3                   vga_output registers R, G, B, HSync, VSync
```

The frame-buffer origin is therefore two clocks before the first visible clock. Screen dot
(0, 0) enters stage 1 at scan (136, 28) and is shown at scan (138, 28). The visible window
`writ` (x 138..777, y 28..507) gates both the write-back and the blanking.

Write-backs and reads never touch the same word at the same time. The word being written is
always at least one word behind the word being read.

The units learn the next pixel position in the units of the current mode:

| mode | x_next   | y_next   |
|------|----------|----------|
| 1bpp | x[9:1]   | y[8:0]   |
| 2bpp | x[9:1]   | y[8:1]   |
| 4bpp | x[9:2]   | y[8:1]   |
| 8bpp | x[9:2]   | y[8:2]   |

The matching `next_active` is high only inside the visible area. A unit never computes an
address. It only compares coordinates.

## Serial commands

The SPI receiver uses mode 0, sends MSB first, and needs no chip select. Commands are byte
strings:

| command        | bytes                                   | effect                                     |
|----------------|-----------------------------------------|--------------------------------------------|
| dot draw       | `0x50 XH XL YH YL C`                    | queue a dot at (X, Y), in mode units       |
| clear screen   | `0x45 C`                                | fill the screen with C for one full frame  |
| colour mode    | `0x59 M`                                | M = 0..3 as in the table above             |
| no-op          | `0x00`                                  | nothing (any unknown byte is also ignored) |

The bit counter runs freely on the SPI clock. The receiver copies a byte to its parallel
output only on the first clock edge of the following byte. It then raises `valid` while bits
2..4 of that byte arrive, and during that window the parallel byte cannot change. As a
result, the last byte of a command is not seen until another byte starts. The host must
therefore end every burst with a no-op.

The command interpreter passes `valid` through a two-flop synchroniser into the pixel
clock, detects its rising edge and runs the state machine. A completed dot or clear command
produces a one-clock `dot_go` or `clear_go` pulse, 3 pixel clocks after `valid` rises.

**Overflow flag (`buff_full`).** The dot unit holds the 10 most recent dots. The flag is
high while the ninth-newest dot is still undrawn. At that point two more dots would push
it out before it is drawn. The host should check the flag before it sends each dot command.
While the flag is high, it should send nothing and poll again later.

A dot command reaches the queue only when the next byte starts, so each check runs one dot
behind. The flag looks at the ninth-newest dot, not the oldest, to cover that delay. With
this rule, no dot is ever lost. A host that keeps sending while the flag is high, for
example to repeat its cursor position, pushes undrawn dots out of the queue.

## Graphics units and the colour bus

Each unit owns one line of the 8-line request/enable bus. The arbiter grants the
highest-numbered request, one clock later. Each unit drives its colour only while enabled,
and the colours are OR-ed onto one 8-bit bus.

| line | unit        | what it does |
|------|-------------|--------------|
| 2    | `rect_draw` | Fills a rectangle for one pass of the screen. |
| 1    | `solid_draw`| Clear screen. Latches the colour on go, then requests every pixel until VSync has fallen, risen and fallen again, which is at least one full frame. A go that arrives while a clear is running is ignored, so a clear can start at most about every second frame. After reset it clears to 0. |
| 0    | `dot_draw`  | Ten-slot shift register. New dots enter at the top and the oldest slot drops out. Each undrawn slot compares its position with `(x_next, y_next)` and requests on a match. If two slots hold the same position, the newest wins. A slot is marked drawn when its request is granted. A dot that loses to a clear or a rectangle stays queued and is drawn on a later frame. |

The dot unit draws any number of dots per frame, as long as no more than 10 are ahead of the
scan at any moment. At 5 Mbit/s one dot command takes about 9.6 us, so a burst of 11 dots
can outrun a frame. The test bench does exactly that.

The rectangle unit has no serial command. The top level starts it with `rect_go`. It
paints from the last commanded dot position (upper-left) to the lower-right corner
(`RECT_LOWER_X`, `RECT_LOWER_Y`) = (160, 120), in the last commanded colour. Both corners
are included. The draw ends when the scan has passed the upper-left corner and then either
the lower-right corner or the end of the frame. `rect_ready` shows when the unit is idle.

## Video timing

The controller uses a 25 MHz pixel clock, 800 clocks per line and 525 lines per frame:

- HSync is low for scan x 0..95.
- VSync is low for lines 0..1.
- The visible window is x 138..777 and y 28..507.
- Outside the window all colour pins are 0.

The shared constants are in `nvga_pkg`.

## Files and hierarchy

```
nvga_top                  top level (rtl/nvga_top.sv)
 ├─ spi_receiver          SPI shift register, bit counter, valid window      (SPI clock)
 ├─ command_interpreter   synchroniser, command FSM, colour repacking        (pixel clock)
 ├─ dot_draw              10-dot queue, overflow flag
 ├─ solid_draw            clear screen
 ├─ rect_draw             rectangle fill
 ├─ memory_controller     scan counters, 3-stage read-modify-write pipeline
 │   ├─ color_bus_arbiter registered fixed-priority grant
 │   ├─ video_mem         8 x 32768 simple dual-port RAM, 1-clock read
 │   └─ pixel_codec       field select / merge / colour expansion per mode
 └─ vga_output            syncs, blanking, 3:3:3 colour pins
nvga_pkg                  colour-mode enum, opcodes, timing constants
```

Top-level ports:

- `clk`: the 25 MHz pixel clock.
- `rst`: reset for the pixel-clock logic.
- `io_rst`: reset for the SPI receiver and the command interpreter.
- `spi_clk`, `spi_d`: the SPI inputs.
- `rect_go`: starts a rectangle.
- `ready`: the SPI bit counter is at 0.
- `waiting`: the interpreter is idle.
- `buff_full`: the overflow flag.
- `rect_ready`: the rectangle unit is idle.
- `hsync`, `vsync`, `r[2:0]`, `g[2:0]`, `b[2:0]`: the video outputs.

Both resets are asynchronous and active high.

Not part of the RTL:

- The clock manager that makes 25 MHz from the board's 20 MHz.
- The resistor DAC: binary-weighted resistors per colour into a 75 ohm load, 0 to 0.7 V.
- The host microcontroller.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/nvga_pkg.sv tb/nvga_top_tb.sv --top-module nvga_top_tb -Mdir obj_top
./obj_top/Vnvga_top_tb
```

Use the same command for any other testbench: replace `nvga_top_tb` with
`<block>_tb`. The `-Irtl` flag lets Verilator find the modules by file name.

- `nvga_top_tb` runs the full-size design with default parameters, about 25 frames (roughly
  10 s of wall time). It acts as the host over SPI and as the monitor. It captures every
  visible pixel from the sync outputs and compares whole frames with a reference model of
  the frame buffer. It covers:
  - the reset clear;
  - clears and dots in all four modes;
  - a mode switch without a clear, so stored bytes are reinterpreted;
  - an 11-dot burst: the flag rises and the oldest dot is lost;
  - a clear and a dot competing for the bus;
  - a rectangle.

  It also counts how often each of these happened: dot, clear, rectangle, bus conflict,
  overflow, lost dot, mode switch and write-back. A mechanism that never happened fails the
  test.
- `etch_sketch_tb` runs the controller's intended use: an Etch-A-Sketch host.
  - Each pass of the host loop moves a cursor one step toward a knob position and sends a
    dot. It waits whenever the overflow flag is high.
  - The host also "shakes" the picture with a clear, even while dots are still being sent.
    It also flashes the colour and switches modes.
  - The run covers 873 dots over 58 frames, about 10 s of wall time. The flag throttles the
    host about 500 times.
  - It checks the whole picture after each phase, and checks that no undrawn dot was ever
    pushed out of the queue.
- `memory_controller_tb` runs full 800 x 525 frames in each mode:
  - it paints a pattern and reads it back;
  - it repaints one pixel and checks that no other pixel sharing its byte changed;
  - it checks the scan periods and the advertised coordinates.
- The other block testbenches test their unit alone against a model written independently
  of the RTL.

To change the design:

- The queue depth is `N_DOTS` on `nvga_top`.
- The timing constants and the unit-to-bus-line assignment are in `nvga_pkg`.
- A new graphics unit takes one of the free request lines 3..7. It only has to compare
  `(x_next, y_next, next_active)` and drive its colour while enabled.

## How far it follows the original, and where it departs

The following are taken from the original design:

- the block structure;
- the command set and byte order;
- the memory organisation and pixel packing;
- the three-stage pipeline and its write-back rule;
- the priority order;
- the sync widths and the visible window.

The following are this implementation's own choices:

- **Frame size.** The original scan counters count 0..800 and 0..525, which gives 801 x 526.
  Here the frame is the standard 800 x 525.
- **Synchroniser.** `valid` passes through two synchroniser flops, where the original used one.
- **Dot queue.** The original kept requesting for all ten stored dots on every frame, so
  old dots came back after a clear. Here a dot requests only until its request is granted.
  It is marked drawn only on a grant, so a dot is never lost to a clear or a rectangle.
  Requests also need `next_active`, so a dot cannot be "drawn" in the blanking interval,
  where writes are suppressed.
- **Rectangle.** The rectangle includes its corners; the original excluded pixels equal to
  a corner. The draw also stops at the end of the frame. With the original rule, a
  rectangle whose lower corner is off screen in the current mode never finished. So did a
  rectangle whose corners were seen in the wrong order after a mid-frame start, and that
  one was also drawn only in part.
- **Colour bus.** The bus is AND-OR instead of tri-state, and needs no internal tri-states.
- **Y pipeline.** The Y position is pipelined like X. The original delayed Y one stage less,
  which only matters in the blanking interval.
- **Clear after reset.** The clear unit's VSync edge detector starts low, so the clear after
  reset always lasts a full frame.

Limits:

- Coordinates are stored with 9 bits. An x or y outside the current mode's range is never
  reached by the scan and stays queued until ten newer dots push it out.
- The SPI receiver has no chip select, so its byte framing depends on both sides starting
  from reset.
