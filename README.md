# Silizium: a 2D rendering accelerator for Avalon-MM SoCs

Silizium takes simple drawing jobs off a soft CPU such as a NIOS-II. It does not
own a framebuffer and does not drive a display. It sits between the CPU and an
existing framebuffer in memory:

* The CPU writes a command into a queue, e.g. "fill the rectangle at (10, 20), 300 × 40 pixels, with this color".
* The CPU then goes on with other work.
* The core computes every pixel address and writes the pixels into the framebuffer over its own bus master.

A rectangle costs the CPU six register writes, however many pixels it covers.

The core implements:

* drawing a single pixel;
* filling a solid rectangle;
* one rectangular clipping mask;
* a boundary check that stops any write from leaving the framebuffer.

A read-back path (the core reading pixels back from the framebuffer) is fully
built. It is there for future renderers such as blitting, scrolling or
anti-aliasing. No renderer in this version uses it yet.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017). It has been
checked with Verilator 5 and with the slang front end of Yosys.

## The path of a command

```
 CPU ──Avalon-MM slave──► registers ──► command FIFO ──► dispatcher ──► pixel renderer ─┐
                              │          (64 × 32 bit)        │         rect renderer  ─┼─► FBI access mux
                              │                               │         clip renderer  ─┘        │
                              │                          start/busy                              ▼
                              │                                            framebuffer interface (FBI)
                              └── base, span, enables, clears ───────────► write-FIFO ─► checks ─► Avalon-MM master ─► memory
                                                                           read-FIFO ◄───────────── readdata ◄────────┘
```

1. **Slave interface and registers** (`silizium_slave_if`). This is the CPU's only view of the core. A word written to the `CMD_FIFO` register is appended to the command FIFO.
2. **Command FIFO** (`silizium_fifo`, 2^6 words of 32 bits). It decouples the CPU from rendering. The CPU can queue up to 64 words before it has to poll `STATUS`.
3. **Dispatcher** (`silizium_dispatcher`). It pops the first word of a command (the command code) and pulses `start` on the renderer for that code. It then waits for the renderer's `busy` to fall. The dispatcher does not know how many parameters a command has: the renderer reads its own parameters straight from the command FIFO. Only one renderer runs at a time, so commands run strictly in order. The dispatcher also contains:
   * a selector, which routes `start` and the FIFO read acknowledge to the chosen renderer;
   * a mux, which connects that renderer's outputs to the FBI.
4. **Renderers** (`silizium_renderer_pixel`, `_rect`, `_clip`). Each one turns a command into writes to the FBI.
5. **Framebuffer interface** (`silizium_fbi`). It does three things:
   * queues the renderers' requests;
   * applies the boundary check and the clipping check;
   * adds the framebuffer base address and runs the Avalon-MM master.

`silizium` is the top level and wires these parts together.

## Programming model

### Registers

The slave has an 8-bit word address and a 32-bit data bus.

| Offset | Name      | Access | Reset        | Content |
|-------:|-----------|:------:|--------------|---------|
| 0x00   | VERSION   | r      | 0x00000001   | core version |
| 0x01   | CMD_FIFO  | w      | –            | appends one word to the command FIFO (lost if the FIFO is full) |
| 0x02   | STATUS    | r      | 0x00000004   | bit 0 BUSY, bit 1 FIFO full, bit 2 FIFO empty, bits 31:16 FIFO used words |
| 0x03   | CONTROL   | rw     | 0x00010000   | bit 0 EN1 (dispatcher on), bit 1 EN2 (FBI on), bit 8 CLR1 (clear command FIFO), bit 9 CLR2 (clear FBI write-FIFO), bit 10 CLR3 (clear FBI read-FIFO), bit 16 BCEN (boundary checks), bit 17 CMEN (clipping mask) |
| 0x04   | FB_BASE   | rw     | 0            | byte address of the first pixel |
| 0x05   | FB_SPAN   | rw     | 0            | size of the framebuffer in bytes |
| 0x06–0x09 | CLIP_X, CLIP_Y, CLIP_W, CLIP_H | r | 0, 0, 0x11111111, 0x11111111 | the clipping mask currently used by the FBI |
| 0x0D   | DUMMY_1   | r      | 0xD0D00D0D   | constant, for bus tests |
| 0x0E   | DUMMY_2   | r      | 0xE0E00E0E   | constant, for bus tests |
| 0x0F   | DUMMY_3   | rw     | 0            | scratch register |

More on the registers:

* **CLR bits** act when written as 1. Each clears its FIFO for one clock cycle and then reads back as 0.
* **BUSY** is 1 in any of these cases:
  * a renderer or the FBI is working;
  * the FBI still holds queued writes;
  * the dispatcher is enabled and the command FIFO is not empty.
* **Clipping registers** are read-only. The mask can only be changed by a command (see the next table). That way a mask change takes effect between exactly the right two drawing jobs.

### Commands

A command is one command-code word followed by its parameters. Each word is written to `CMD_FIFO`.

| Code | Command        | Parameters, in order |
|-----:|----------------|----------------------|
| 0x1  | draw pixel     | X, Y, color |
| 0x2  | fill rectangle | X, Y, width, height, color |
| 0x3  | set clip mask  | X, Y, width, height |

* Coordinates are signed 32-bit pixel positions.
* A pixel outside the screen is not an error: the FBI drops it. So a shape can be drawn partly off-screen.
* A rectangle with a width or height of zero or less draws nothing.
* Unknown codes are removed from the queue and ignored.

A typical start-up sequence is:

1. Write `FB_BASE` and `FB_SPAN` (800 × 480 × 4 = 1,536,000 bytes for the default screen).
2. Write `CONTROL = 0x00010003` (both enables, boundary checks on).
3. Write commands.
4. Poll `STATUS.BUSY` before the CPU itself touches pixels the core may still be writing.

## Pixel addressing

Renderers work in *relative* byte addresses, where 0 is the first pixel:

```
pixel:      addr = (X + FB_WIDTH * Y) * FB_BYTES_PER_PIXEL
rectangle:  addr = (X + countX + FB_WIDTH * (Y + countY)) * FB_BYTES_PER_PIXEL
```

* The rectangle renderer steps `countX` from 0 to width−1 within a row, and `countY` from 0 to height−1 across rows.
* The arithmetic is 32-bit two's complement. Negative coordinates therefore give huge unsigned addresses, and the boundary check drops them.
* A pixel at X ≥ `FB_WIDTH` wraps into the next line. The boundary check cannot catch this, because the address is still inside the span. The clipping check sees only the wrapped position, so it drops such a pixel only if that position lies outside the mask. Keep X inside the screen, or set a clipping mask no wider than the screen and start shapes at X ≥ 0.
* The FBI adds `FB_BASE` only at the very end.

## The framebuffer interface

The FBI is the most involved part of the core. It is also the part that a new renderer has to use correctly.

### Why everything goes through one write-FIFO

Three kinds of request share the 256-deep write-FIFO:

* pixel writes;
* read requests;
* clipping-mask changes.

So they all take effect in the order the renderers issued them. Two cases show why that matters:

* A read request must see every pixel written before it, even if those writes are still queued.
* A new clipping mask must not apply to pixels queued before it was set.

The FIFO also lets a renderer keep producing pixels while the memory bus is busy with other masters.

### Write-FIFO word

Each word is `1 + ADDR_BITS + DATA_BITS` bits wide (65 bits at the defaults). The MSB is the D/C bit (data/command).

```
 D/C = 0 (pixel write):   [ 0 | pixel data (DATA_BITS) | relative byte address (ADDR_BITS) ]
 D/C = 1 (command):       [ 1 | ...            0 ...             | code (low 8 bits)          ]
                          followed by the command's parameter words
```

| Code | FBI command | Parameter words |
|-----:|-------------|-----------------|
| 0x01 | set clipping mask | X, Y, width, height |
| 0x02 | linear read | start address, pixel count |
| 0x03 | window read | start address, width, height |

* Once a command word has been read, the next words are taken as its parameters, whatever their D/C bit.
* Renderers do not build these words themselves. Glue logic in front of the FIFO does it:
  * pulsing `busWrite` stores `{0, busData, busAddr}`;
  * pulsing `cmdWrite` stores `{1, cmdData}`.
* `ready` is the inverse of "write-FIFO full". A renderer may only pulse `busWrite` or `cmdWrite` in a cycle where `ready` is 1. Assertions in the FBI flag any violation.

### Checks applied to every pixel write

A write that fails either check is dropped silently.

1. **Boundary check** (when BCEN is set). The relative address must be below `FB_SPAN`. Because the check uses the relative address, a renderer cannot write outside the framebuffer, whatever coordinates the CPU sent.
2. **Clipping** (when CMEN is set). The FBI recovers the pixel position from the address:
   * `p = addr / FB_BYTES_PER_PIXEL`;
   * `x = p mod FB_WIDTH`;
   * `y = p / FB_WIDTH`.

   The position must satisfy `CLIP_X ≤ x < CLIP_X + CLIP_W` and `CLIP_Y ≤ y < CLIP_Y + CLIP_H`. The mask's reset value (0, 0, 0x11111111, 0x11111111) covers any screen.

A write that passes both checks goes out as a single Avalon write to `FB_BASE + addr`.

### Reads

* Linear reads step the address one pixel at a time.
* Window reads step along a row of `width` pixels, then jump to the same column one line (`FB_WIDTH` pixels) further down.
* With BCEN set, every address goes through the same boundary check.
* Each pixel produces exactly one read-FIFO word `{valid, data}`:
  * a pixel that passes the check is read from memory and pushed with `valid = 1`;
  * a pixel that fails it pushes a dummy word with `valid = 0`.

  So a renderer always receives the number of words it asked for.
* The FBI issues a read only when the read-FIFO has room for the result. It therefore never holds up the memory bus because a renderer is slow to take data.
* One read is outstanding at a time.

On the renderer side the read-FIFO shows:

* `readFifoDataAvailable` (not empty);
* `readFifoData` and `readFifoDataValid` (the oldest word);
* `readFifoReadAck` to pop that word.

### Timing

A pixel write passes through four states: fetch from the FIFO, decode, check, bus write. With no wait states, writes leave the master every fourth clock. The rectangle renderer produces one pixel per clock, so a large rectangle fills the write-FIFO. The renderer then stalls on `ready`, and the drawing rate is set by the FBI.

The master:

* holds address, data and the read or write strobe while `waitrequest` is 1;
* always sets `burstcount = 1`.

Clearing the FBI's enable (EN2) stops it between transactions. Its FIFOs keep their contents.

## Renderers and how to add one

All renderers share one port set:

| Port group | Signals | Purpose |
|------------|---------|---------|
| control | `start` (from the dispatcher, one cycle), `busy` (to the dispatcher) | when to run and when the renderer is done |
| command FIFO | `dataInReady`, `dataIn`, `readAck` | the renderer takes its own parameters |
| FBI | `fbiBusAddr`, `fbiBusData`, `fbiBusWrite`, `fbiCmdData`, `fbiCmdWrite`, `fbIsReady` | writes into the FBI's write-FIFO |

The three renderers:

* **Pixel**: Idle → Fetch → Execute. In Fetch, a counter takes X, Y and color, one per cycle in which `dataInReady` is 1. In Execute, the renderer waits for `fbIsReady` and writes the pixel.
* **Rectangle**: like the pixel renderer, but it fetches five parameters. In Execute, two counters sweep the rectangle row by row, one pixel per ready cycle.
* **Clip**: first sends FBI command 0x01, then forwards X, Y, width and height. Each parameter goes out in the same cycle it is taken from the command FIFO. There is no separate Execute state.

The protocol with the dispatcher:

* `start` comes one cycle after the command code has been popped. From then on the command FIFO shows the first parameter.
* The renderer must raise `busy` in the cycle after `start` and hold it until its last FBI write.

To add a renderer:

1. Give it this port set.
2. Instantiate it in `silizium_dispatcher`.
3. Add a command code in `silizium_pkg` and a selector value, and extend the two `case` statements of the selector and the mux.

## Parameters

Set on `silizium`. Defaults describe an 800 × 480, 32-bit-per-pixel screen.

| Parameter | Default | Meaning |
|-----------|--------:|---------|
| `DATA_BITS` | 32 | command FIFO word width |
| `COORD_BITS` | 32 | coordinate and size width |
| `COLOR_BITS` | 32 | color width in commands |
| `CMD_FIFO_EXP` | 6 | command FIFO depth is 2^n |
| `FB_ADDR_BITS` | 32 | framebuffer byte address width (at most 32) |
| `FB_DATA_BITS` | 32 | framebuffer data width |
| `FB_BURSTCOUNT_BITS` | 2 | width of the master's `burstcount` |
| `FB_BYTES_PER_PIXEL` | 4 | bytes per pixel |
| `FB_WIDTH` | 800 | line length in pixels, used in the address formulas and for clipping |
| `FB_HEIGHT` | 480 | screen height; informational, the span register does the bounding |
| `FB_WRITE_FIFO_EXP` | 8 | FBI write-FIFO depth is 2^n |
| `FB_READ_FIFO_EXP` | 4 | FBI read-FIFO depth is 2^n |

At the defaults the three FIFOs hold about 19 kbit:

* command FIFO: 64 × 32 bits;
* write-FIFO: 256 × 65 bits;
* read-FIFO: 16 × 33 bits.

With `CMD_FIFO_EXP = 7` the total is about 21 kbit.

## Where this RTL differs from the original core, and what to watch for

* **FIFOs.** The original core was built on vendor FIFO macros. Here, one generic show-ahead FIFO (`silizium_fifo`) is used three times. It is written as a memory array with a write pointer and a read pointer.
* **Bus timing.**
  * The slave completes writes with no wait state and reads with exactly one.
  * The master only does single transfers.
  * Burst transfers were planned for the original core but never implemented. They are not implemented here either.
* **Latencies.** Latencies at the start and end of a job are this design's own. They do not reproduce the original core's published figures, which count from different points. With no wait states on either bus:
  * from the completed write of a command's last word to the renderer's first write-FIFO entry: 3 clocks for pixel and rectangle, 2 for the clipping mask;
  * from the last write-FIFO entry of one job to the start of the next queued job: 3 clocks.

  The end-to-end testbench checks these numbers.

  The throughput figures of the original core do hold here: four clocks per FBI pixel write, one pixel per clock from the rectangle renderer.
* **`FB_WIDTH` inside the FBI.** This is this design's addition. It is needed to turn an address back into X/Y for clipping and to wrap window reads. Clipping follows the position recovered from the address, so it works only for addresses made with the same `FB_WIDTH`.
* **`readFifoDataAvailable`** means "read-FIFO not empty".
* **STATUS.** The used-words field in bits 31:16 is this design's choice.
* **VERSION** reads 1.
* **Reset** is asynchronous and active high.
* **Read-back path.** It is implemented and tested in the FBI's own testbench. At the top level no renderer reads the read-FIFO yet, so its acknowledge is tied low.
* **Parallel rendering.** There is none: one renderer runs at a time. The FBI writes at most one pixel per four clocks, so running renderers in parallel would not speed up the current ones.

Not included:

* the CPU;
* the framebuffer memory;
* any display controller;
* renderers beyond pixel, rectangle and clip (lines, circles, polygons, text, blitting).

The core assumes it is connected to a CPU and a memory through Avalon-MM. Its testbenches contain behavioural models of both.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

* prints `TB_RESULT checks=<n> failures=<m>`;
* has a watchdog;
* checks the module against values computed independently in the testbench.

| Testbench | What it covers |
|-----------|----------------|
| `tb_silizium_fifo` | random push/pop/clear against a queue model; full, empty, used words |
| `tb_silizium_fbi` | write format and base offset; four-clock write spacing; boundary and clipping drops; linear and window reads with `valid = 0` dummies; clears; random Avalon wait states |
| `tb_silizium_renderer_pixel`, `_rect`, `_clip` | parameter fetch with gaps; address formulas; one pixel per clock; stalls on `fbIsReady`; FBI command sequence |
| `tb_silizium_dispatcher` | command routing; back-to-back and unknown commands; ordering of FBI writes across commands |
| `tb_silizium_slave_if` | register map and reset values; wait states; CMD_FIFO pushes; STATUS packing; self-clearing CLR bits |
| `tb_silizium` | end to end at 24 × 12 pixels (see below) |
| `tb_silizium_full` | end to end with every parameter at its default (see below) |

The two end-to-end testbenches (`tb_silizium` and `tb_silizium_full`) share three models:

* a CPU model on the slave port;
* a memory model with random wait states on the master port;
* a reference model that draws every command into its own framebuffer.

At the end of a run the two framebuffers must match, and no write may have landed outside the span.

`tb_silizium` runs at a reduced size: 24 × 12 pixels, with a command FIFO and a write-FIFO of 16 words each. It counts every mechanism of the core and fails if any of them never happened:

* pixel, rectangle and clip commands;
* write-FIFO full;
* bus wait states;
* boundary drops;
* clipping drops;
* command FIFO full;
* CLR1 and CLR2;
* dispatcher and FBI disabled.

`tb_silizium_full` uses every parameter at its default. It runs:

* a full 800 × 480 clear (384,000 pixels);
* a pixel and a rectangle at X = 165, Y = 504 (below the screen, so the boundary check removes them);
* a clip mask of (150, 170, 300 × 150) with a clipped full-screen fill;
* random rectangles.

It runs in a few seconds.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/silizium_pkg.sv tb/tb_silizium.sv --top-module tb_silizium
./obj_dir/Vtb_silizium
```

Substitute any testbench name. The run ends with the `TB_RESULT` line, and any failure is printed as `FAIL ...` with its simulation time.
