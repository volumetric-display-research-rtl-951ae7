# Swept-helix volumetric display: slice processor and projector sync

A swept-helix volumetric display makes a 3-D image by spinning a
double-bladed helicoid screen fast (at least 15 turns per second) and
projecting onto it, from below, a different 2-D image at each angle. The
image for a given angle is the set of points where the screen and the
object meet at that angle, seen from the projector's side. Over a turn
the screen sweeps the whole cylinder. Each voxel of the object is lit
at the moment the screen passes through it.

This RTL is the FPGA part of such a system, built around a Zynq-class
SoC and a DLP projector that is driven by an external trigger. It has
two independent engines:

* **Slice processor.** It takes a 20×20×20 one-bit voxel model of the
  object and computes twenty 20×20 slices. Each slice is the intersection
  of the object with the helicoid at one of twenty screen angles, 9°
  apart. The helicoid is symmetric under a half turn, so twenty angles
  cover 180°.
* **Encoder module.** It turns the two optical tracks of an encoder wheel
  on the helix shaft into the projector's frame trigger. The frame
  position track has forty marks per turn. The home track has two marks,
  one per half turn.

Next to them, in the same top module but unconnected to them, sits a
third, smaller design: a **slice display fixture** that computes one
slice and draws it on a VGA monitor. It is a bench aid for checking the
slice unit in hardware (see "Slice display fixture" below).

The processor, its AXI interconnect, the AXI BRAM controller and the
GPIO block are vendor parts and are not included. Their signals are the
ports of the top module `vd_pl_top`. The voxelisation of the CAD model,
the conversion of slices to bitmaps and the projector set-up are
software, so they are not part of this RTL either.

## Data flow of one slicing run

```
 processor ──write──► BRAM 1 (object, 160 × 50 b)
                          │
                      obj_read ──► obj [7999:0] ─────────┐
                          │ helix_en                     ▼
                      slice_ctrl ──start──► helix_read ──► surf [7999:0] ──► voxel_slice ──► twoD [399:0]
                          │                (20 × helix_bram,                                    │
                          │                 160 × 50 b each)                                    ▼
                          └──────────────── write_en ─────────────────────────────────────► slice_write
                                                                                                │
 processor ◄──read─── BRAM 22 (slices, 260 × 32 b used) ◄──────────────────────────────────────┘
```

1. The processor writes the object model into BRAM 1 through the
   `ps_obj_*` port and raises `slice_en`.
2. `obj_read` reads the 160 words into the 8000-bit register `obj`, one
   word per clock. It then raises `helix_en`.
3. `slice_ctrl` pulses `helix_start`. `helix_read` then reads its twenty
   preloaded helix memories, one memory after the other, into the
   8000-bit register `surf`.
4. When a helix model is complete (`surf_valid`), `voxel_slice` captures
   `twoD = OR over z of (obj & surf)` in that same clock. Loading of the
   next helix model overlaps this step: its first word overwrites `surf`
   at the end of that clock. No clock is lost between models.
5. `slice_write` buffers the twenty slices in registers. It then writes
   them to BRAM 22, thirteen 32-bit words per slice, one word per clock.
6. `slice_done` rises and stays high until `slice_en` is lowered. The
   processor then reads the slices through the `ps_slice_*` port.

With `slice_en` raised in clock 0, `slice_done` is high in clock 3629:

| step | clocks |
|---|---|
| load the object | 162 |
| start the helix reader | 1 |
| twenty helix models | 3202 |
| last slice into the buffer | 2 |
| 260 writes and the done handshake | 262 |

At 100 MHz the whole run takes about 36 µs.

Lowering `slice_en` at any time returns the controller to idle (abort).
The next rising edge starts a new run.

## Bit layout

This is the part a software driver must get right.

* **Voxel order.** Voxel (x, y, z) is bit `x + 20*y + 400*z` of an
  8000-bit model. Memory word `a` (50 bits) holds model bits
  `[50a+49 : 50a]`. One z level is therefore 8 consecutive words.
* **Slice bits.** Slice bit (x, y) is bit `x + 20*y` of the 400-bit
  `twoD`.
* **Slice memory.** Slice `s` occupies addresses `13s … 13s+12` of
  BRAM 22. Word `w` of a slice holds slice bits `[399-32w : 368-32w]`,
  most significant part first. Word 12 holds bits `[15:0]` in its upper
  half and zeros in its lower half.

A check on a 3×3×3 grid (`voxel_slice #(.N(3))`):

* object: a solid cube, `27'h7ffffff`
* helix: a slanted plane, `27'h4910449`
* slice: `9'h1ef`, every cell except the centre

## The helix models

Each of the twenty `helix_bram` memories holds one rotation of the
helicoid. They are read-only and preloaded. Their contents are computed
at elaboration by `vd_pkg::helix_word`, so no initialisation files are
needed. The shape is:

* a straight blade through the vertical axis;
* the blade turns one full turn over the twenty z levels (18° per
  level);
* rotation `r` adds `9r` degrees, so at level z the blade angle is
  `9*(r + 2z)` degrees;
* a voxel is set when its centre is within half a voxel of the blade and
  inside the cylinder of radius 10 voxels.

Every angle is a multiple of 9°. The arithmetic therefore uses an
11-entry integer table, `round(1024*sin(9k°))` for k = 0 … 10, and stays
exact integer logic. The testbenches compute the same surface with real
trigonometry and get the same voxels.

This pitch and blade thickness are this design's own choice. To use a
different screen, for example a helicoid that narrows to correct for
the projector's cone angle, change `helix_word` in `vd_pkg`. Nothing
else depends on the shape.

## Encoder module (`encoder_sync`)

The wheel's phototransistors pull their outputs low when light passes
through a hole. The module works as follows:

* **Synchroniser.** Both inputs, `home_n` and `encoder_n`, pass through
  a two-flop synchroniser.
* **STANDBY.** The module starts here after reset, and returns here
  whenever `encoder_en` is low. The trigger output stays low.
* **ACTIVE.** The module enters this state when a home mark is seen with
  `encoder_en` high. In this state `frame_pulse` is the inverse of the
  encoder track, delayed by three clocks.

Each of the forty positions per turn gives one active-high trigger
pulse. The projector should be set to advance one stored frame on each
rising edge. With twenty stored frames it shows each slice twice per
turn, once on each blade. Frame k is shown at position
`(home + k) mod 20`.

## Slice display fixture (`slice_vga_test`)

This fixture checks the slice unit on real hardware without the
processor or the projector. It takes an object model and a surface
model as inputs (`vga_obj` and `vga_surf` on the top, 8000 bits each),
feeds them to a `voxel_slice` of its own, and draws the 20×20 result as a
grid of squares:

* a set slice bit gives a white square, a clear bit a purple one, so an
  empty slice shows an all-purple grid;
* cell (x, y), column x from the left and row y from the top, shows slice
  bit `x + 20*y`;
* cells are 18×18 pixels and the grid is centred; the rest of the screen
  is black.

The output is standard 640×480 at 60 Hz: 800 pixels × 525 lines per
frame, with active-low syncs. The pixel rate is 25 MHz, made by a
clock enable that is high one clock in four (`pix_clk_gen`). There is no
second clock. The counters come from `vga_timing`, and `slice_rgb` picks
the colour. The colour output is registered, and the syncs are delayed
one pixel to match. The slice is recaptured once per frame, when the
visible area ends, so a frame never shows two different slices.

With `N = 3` the same module reproduces the 3×3×3 check above: the cube
and the slanted plane give a 3×3 grid that is white except for its
centre.

## Files

| file | contents |
|---|---|
| `rtl/vd_pkg.sv` | sizes, types, helix functions |
| `rtl/vd_pl_top.sv` | top: slice processor, encoder module and slice display fixture side by side |
| `rtl/slice_processor.sv` | BRAM 1, readers, controller, slice unit, writer, BRAM 22 |
| `rtl/obj_read.sv`, `rtl/helix_read.sv`, `rtl/helix_bram.sv` | model readers and helix memories |
| `rtl/voxel_slice.sv` | AND / OR-over-z slice unit, parameter `N` |
| `rtl/slice_write.sv` | slice buffers and memory writer |
| `rtl/slice_ctrl.sv` | run controller |
| `rtl/bram_sdp.sv` | one-write-port, one-read-port block RAM, one clock read latency |
| `rtl/encoder_sync.sv` | frame trigger |
| `rtl/slice_vga_test.sv` | slice display fixture |
| `rtl/vga_timing.sv`, `rtl/pix_clk_gen.sv`, `rtl/slice_rgb.sv` | its VGA timing, pixel enable and colour logic |
| `tb/vd_ref_pkg.sv` | reference models used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus `tb_encoder_rates` |

Each testbench prints `TB_RESULT checks=N failures=M`. Running one with
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vd_pkg.sv tb/vd_ref_pkg.sv tb/tb_vd_pl_top.sv --top-module tb_vd_pl_top
./obj_dir/Vtb_vd_pl_top
```

`tb_vd_pl_top` runs the full-size design at its default parameters:

* two slicing runs, checked word by word against the reference, and an
  aborted run;
* the encoder module driven by a wheel model for several turns, with a
  projector model that checks that the frame shown at each wheel
  position is the right slice;
* two frames of the slice display fixture: in the second one, the colour
  at the centre of each of the 400 cells must match the reference slice.

It also checks that every mechanism happened at least once: runs
completed, overlapped loading, abort, positions ignored in standby, home
detection, trigger pulses, return to standby and display frames. It runs
in a few seconds.

`tb_encoder_rates` runs the encoder module at real wheel speeds with a
100 MHz clock: 15 turns per second (a 600 Hz trigger rate, the minimum
for a steady image) and 1.563 kHz. At both it checks one trigger per
position, each 30 ns after the encoder edge (40 ns for the first, at the
home mark), and a rate below the projector's 4 kHz trigger limit.

## How far this follows the source design

Taken from the source description:

* the block structure: object BRAM, `obj_read`, `helix_read` with twenty
  helix BRAMs and a multiplexer, slice unit, controller, writer, slice
  BRAM;
* all sizes: 20³ voxels, twenty rotations, 160 × 50-bit model memories,
  32-bit slice memory with a 14-bit address;
* the slice computation as a bitwise AND and an OR over z;
* buffering all twenty slices before any write;
* the most-significant-first word order;
* the two-state encoder module with active-low inputs;
* the display fixture's purple grid with white squares for set bits,
  at 3×3×3 and 20×20×20.

This design's own choices:

* the helicoid contents;
* single-clock operation: the source simulations show a divided clock
  for the readers, with no ratio given;
* the controller's states and the level-sensitive `en`/`done`
  handshake;
* the zero padding of the last slice word;
* the 1024-word depth of the slice memory;
* the input synchronisers and the registered trigger;
* the return to standby when `encoder_en` is low;
* synchronous active-high reset;
* everything in the display fixture beyond its colours: the 640×480
  mode, the grid geometry and orientation, the once-per-frame update, and
  taking the models as inputs rather than as constants inside it.

Not included:

* the AXI-side width conversion of the vendor BRAM controller. The
  object memory's processor port is 50 bits wide here.
* the analog encoder circuit, the motor, the projector and all
  software.

The twenty helix memories are filled by evaluating `helix_word` for
160 000 voxels at elaboration. The function is written with few
statements per voxel, so tools that cap constant-evaluation steps stay
under their default limits. A change to the shape should keep it that
way, or raise the tool's limit.
