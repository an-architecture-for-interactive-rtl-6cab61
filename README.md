# A raster display controller without a frame buffer

Most raster displays hold a picture in a frame buffer and read it out at video
rate. This controller holds no pixels at all. It keeps the screen as a
*structured list of visible objects*: non-overlapping areas, each with an
outline and a smoothly varying colour. Every scanline it converts that list
into pixels again, fast enough to feed the video DAC directly. Changing an
object in the list (highlighting it, moving it) changes the next frame at
once, with no rasterisation pass.

The conversion is split along the two screen directions:

```
object_list ──> yproc x NUM_YPROC ──> scan_cmd_bus ──> xproc_array (red)   ──> pix_out[0]
 (objects)      (per scanline:          (merge +    ├─> xproc_array (green) ──> pix_out[1]
                 objects -> spans)       Refresh)   └─> xproc_array (blue)  ──> pix_out[2]
                      ^                     ^
                      └──── line_sequencer ─┘   (scanline period, Refresh slot)
```

* **Y direction (shading processors, `yproc`).** For the current scanline
  each Y-processor walks its share of the object list, finds where each
  object crosses the scanline and what its colour function is along that
  piece, and sends a *span command* per colour: "pixels x..x+dx, starting
  intensity I, first and second forward differences dI, ddI".
* **X direction (pixel generator, `xproc_array`).** Per colour, a
  one-dimensional systolic array with one small processor per pixel. Span
  commands enter at pixel 0 and march along the array one processor per
  clock. Each processor adds what a passing command contributes to its own
  pixel. A `Refresh` command at the end of the scanline period makes every
  processor hand over its pixel and start afresh.

The top module is `display_controller`. Defaults: 4096 pixels per scanline
(12-bit pixel addresses), 36-bit fixed-point intensities, 12-bit pixel
values, three colours, 4 Y-processors with 16 objects each, 1024 scanlines,
one command slot per pixel clock.

## The X-processor: forward differencing spread over an array

A quadratic intensity along a span is produced by forward differencing:
with running values `(I, dI, ddI)`, each step outputs `I` and moves on to
`(I+dI, dI+ddI, ddI)`. In a software loop that is three adders stepping
along the pixels. Here the loop is unrolled in space: processor k does step
k. A command carries the running values with it; processor k, if it lies in
the span, adds `I` to its accumulator and passes `(I+dI, dI+ddI, ddI)` to
processor k+1 in the next clock. Processors outside the span pass the
command on unchanged. So a span of any length costs the array one command
slot, and the array can accept a new command every clock while earlier ones
are still travelling.

Commands on the same pixel **accumulate**: overlapping contributions (a
base colour plus a highlight, for example) simply add. The instruction set
(`xop_e` in `dc_pkg`):

| command | operands | effect on a processor whose pixel is hit |
|---|---|---|
| `Nop` | – | nothing |
| `SetI`, `SetdI`, `SetddI` | x, value | store a value for pixel x; the next Eval reaching x uses it instead of the travelling I / dI / ddI (and passes it on) |
| `SetPI`, `SetPdI`, `SetPddI` | x, dx, value | as above for pixels x, x+dx, x+2dx, ...: the command's target moves on by dx each time it hits |
| `Eval0` | x, dx, I | pixel := I, and accumulation is locked until Refresh (an opaque overwrite) |
| `Eval1` | x, dx, I | acc += I (flat) |
| `Eval2` | x, dx, I, dI | acc += I, forward first-order (linear) |
| `Eval3` | x, dx, I, dI, ddI | acc += I, forward second-order (quadratic) |
| `Dis` | x, dx | each pixel in x..x+dx skips the next Eval that covers it |
| `Acc_mode` | flag in I[0] | enable (1) or disable (0) accumulation of negative contributions; a disabled negative contribution is dropped |
| `Refresh` | – | output the pixel, clear accumulator, stored Set values and locks |

A span `x, dx` covers pixels x to x+dx **inclusive**. Stored Set values and
the Eval0 lock/Dis flags are per scanline and cleared by Refresh; the
Acc_mode setting is kept (after reset it is "enabled").

**Number format.** Intensities are signed 36-bit with 23 fraction bits
(`FRAC_W`), so the integer part runs from -4096 to 4095. A pixel is the
integer part of the accumulator clamped to 0..4095. The accumulator
does not saturate: sums past +4095.99 wrap, so the commands of one pixel
must stay inside the range, and in practice the clamp turns negative
results into 0. 36 bits leave enough
fraction to step a quadratic across 4096 pixels without visible drift;
higher-order curves can be built by chaining Set and Eval commands over
shorter spans.

**Command word.** One command (`xcmd_t`) is a single 152-bit word: opcode,
x, dx, I, dI, ddI. Nothing is serialised; all orders of differencing are
done in the same clock.

## Getting the pixels out: the half-speed token

When the Refresh command passes processor k, that processor has the final
value of pixel k. But Refresh visits processor k at clock t+k, so simply
shifting every processor's value out along a one-register-per-processor
chain would have all pixels arrive at the array end in the same clock.

Instead each processor copies its result into a hold register and two
things run along the array:

* a **token** that starts with the Refresh but moves at *half* speed (two
  flip-flops per processor, `tok_a`/`tok_b`), and
* a **pixel lane** that moves at full speed (one register per processor).

The token reaches processor k at clock t+2k+1; that processor then drops
its held pixel onto the lane, which needs another NUM_PIX-k-1 clocks to the
end. Pixel k therefore leaves at t + NUM_PIX + 1 + k: **one pixel per clock
in address order**, which is exactly a video line. The token always arrives
after the Refresh, so the hold register has been loaded; and the next
Refresh can follow after NUM_PIX clocks, because by then the token of the
previous line has passed every hold register the next Refresh overwrites
(the token reaches k at t+2k+1, the next Refresh at t+NUM_PIX+k ≥ t+2k+1
for all k < NUM_PIX).

Each pixel leaves as `xpix_t {valid, sol, value}`; `sol` marks pixel 0.

## Scanline timing and the command budget

`line_sequencer` divides time into scanline periods of `LINE_CYCLES`
clocks (default 4096 = the number of pixels). `line_start` opens a period
and starts the Y-processors; the last clock of the period is the *refresh
slot*. `scan_cmd_bus` puts `Refresh` into all colour arrays in that clock
and otherwise fills each clock with one granted Y-processor command, or
`Nop`.

So a scanline can receive at most `LINE_CYCLES-1` span commands (plus the
Refresh) in total across all objects. With one command per object and
colour in a single word, that is the budget for objects crossing one
scanline. The whole scanline's pixels leave the array while the commands
for the next scanline are already flowing in behind them.

End-to-end latency: if the refresh slot of scanline y is clock t, pixel p of
scanline y appears on `pix_out` in clock t + 2 + NUM_PIX + p (one clock in
the bus output register, NUM_PIX+1+p in the array).

The bus grants round-robin (`gnt` is one-hot or zero, checked by an
assertion), so a Y-processor that requests in a clock taken by another
waits: it **stalls**. A Y-processor that has not visited all its objects
when the next `line_start` arrives raises **`overrun`** for one clock and
starts the new scanline; the objects it missed are not stepped for that
line.

## The Y-processor and the object record

Each `obj_t` in the list describes a trapezoid and its colouring:

| field | meaning |
|---|---|
| `op` | X-processor command to issue for this object (`OP_NOP` = empty entry) |
| `ytop`, `ybot` | first and last scanline |
| `xl`, `xr` | left and right edge on `ytop`, signed fixed point, 12 fraction bits (`EDGE_FRAC`) |
| `dxl`, `dxr` | edge slopes: change per scanline |
| `shade[c]` | colour c's I, dI, ddI at the left edge on `ytop` |
| `dshade[c]` | per-scanline increments of I, dI, ddI |

On scanline y an object is active when `ytop ≤ y ≤ ybot`. It covers pixels
`floor(xl)` to `floor(xr)-1`, clamped to the screen; if that is empty
nothing is sent. Otherwise the Y-processor requests the bus with one
command per colour: `x = floor(xl)`, `dx = last-first`, and the object's
shade values. After the object has been used its edges and all shading
coefficients are advanced by their increments (additions only) and the
stepped copy is kept in a per-processor working memory. On scanline 0 the
Y-processor reads from the list itself, so a frame always starts from the
list's current contents; the list may be rewritten at any time.

Objects are visited one per clock, so a Y-processor needs `OBJ_DEPTH` clocks
plus any stall clocks per scanline. More objects per screen means more
Y-processors (`NUM_YPROC`) or deeper banks (`OBJ_DEPTH`): both are
parameters.

**What the Y-processor does not do.** The intended shading is Phong shading
via angular interpolation: the angle between normal and light/half-way
vector is interpolated and the `cos^n` highlight is approximated piecewise
by quadratics, so that the per-scanline work reduces to quadratic
coefficients for the X-processors. Anti-aliasing by higher-order commands is
intended as well. Neither method is worked out in enough detail to
build, so this Y-processor only steps the coefficients linearly from
line to line. Whoever fills the object list must prepare the coefficients
(including for Phong-like highlights, by splitting objects into pieces with
their own quadratics).

## Modules

| file | contents |
|---|---|
| `rtl/dc_pkg.sv` | widths, opcode enum, command / pixel / object structs, `to_pixel` clamp |
| `rtl/xproc_pe.sv` | one X-processor |
| `rtl/xproc_array.sv` | NUM_PIX X-processors for one colour |
| `rtl/yproc.sv` | one shading processor |
| `rtl/object_list.sv` | object list, one bank per Y-processor, async read, one write port |
| `rtl/scan_cmd_bus.sv` | round-robin merge of Y-processor commands, Refresh insertion |
| `rtl/line_sequencer.sv` | scanline / frame counters, refresh slot |
| `rtl/display_controller.sv` | top |

Top-level ports: `wr_en/wr_bank/wr_idx/wr_obj` write an object record (from
hidden-surface removal or a host); `run` starts the timing; `pix_out[c]`
is colour c's pixel stream for the DAC; `y`, `line_start`, `frame_start`
show where the controller is; `overrun[k]` reports Y-processor k.

## Where this design departs from the architecture it implements

* All orders of forward differencing take one clock. The architecture
  assumes one extra clock per extra order of interpolation; here every
  command takes one slot regardless of order.
* Phong shading by angular interpolation and anti-aliasing are not built in
  the Y-processor (see above).
* Interpolation above second order (the cubic that anti-aliasing by area
  coverage would send) is not supported: the instruction set implemented
  stops at `Eval3`, second-order differencing.
* The architecture allows several X-processor arrays per colour, so that one
  scanline can use several scanline times of commands; one array per colour
  is built.
* Not specified there and chosen here: command encoding and single-word
  commands, inclusive spans, SetP stepping, "Dis skips exactly one Eval",
  the Acc_mode flag bit and its reset value, 23 fraction bits, clamping,
  the output token scheme, the object record, round-robin arbitration,
  the overrun behaviour, 1024 scanlines, 4 Y-processors × 16 objects.
* No blanking intervals, sync or DAC: the stream is continuous, one pixel
  per clock, 4096 per line.

**Throughput at the defaults.** One array per colour emits 4096 pixels per
4096-clock scanline. At the 12 ns processor cycle the architecture quotes,
that is 49 µs per line: 339 lines fit a 60 Hz frame, 1024 lines give
about 20 Hz. Higher frame rates need shorter lines, more arrays, or a
faster clock. The command budget (one command per pixel clock) is ample for
the quoted 41K polygons of 5×5 pixels per frame at 60 Hz (about 1M pixels,
12.3 ms), but the default list holds only 64 objects; raise `NUM_YPROC` and
`OBJ_DEPTH` for real scenes.

## Testbenches

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`; each has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_xproc_pe` | every instruction on one processor (address 3), directed: forwarded differences, Set overrides, Eval0 lock, Dis, Acc_mode, Refresh, lane pass-through |
| `tb_xproc_array` | 16-pixel array, 60 random scanlines of random commands against a software model of the instruction set; pixel p NUM_PIX+1+p clocks after the array took Refresh; commands leave after NUM_PIX clocks |
| `tb_line_sequencer` | period, refresh slot, line and frame counters, `run` gating |
| `tb_scan_cmd_bus` | random requests against a round-robin reference: grants, registered output, Refresh in its slot, Nop when idle, no starvation |
| `tb_object_list` | random writes and parallel reads against a shadow copy; reset empties every entry |
| `tb_yproc` | random trapezoids on a 64-pixel screen, expected commands computed in closed form from the scanline number; random bus stalls; one object per clock; overrun |
| `tb_display_controller` | whole controller, 32 pixels x 12 lines, 4 Y-processors x 8 objects, 6 frames of random scenes rewritten mid-frame; command stream per line checked against the list, every pixel of every colour against a model, latency checked; counts stalls, overruns, clamped pixels, frames and each opcode, and fails if any never happened |
| `tb_display_controller_full` | whole controller at its default size (4096 pixels, 3 colours): two scanlines with a quadratic span and a clamped span reaching the end of the line, every pixel and its timing checked |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dc_pkg.sv \
    tb/tb_display_controller.sv --top-module tb_display_controller
./obj_dir/Vtb_display_controller +verilator+rand+reset+2
```

The end-to-end testbench takes its size from its own `localparam`s (`NP`,
`NL`, `NY`, `OD`, `FRAMES`); the model in it follows any size. The
full-size build instantiates 3 × 4096 processors and takes Verilator
several minutes to compile.
