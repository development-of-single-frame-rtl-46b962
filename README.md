# Single-frame sprite drawing hardware

A 2D game screen is built from layers, and one of them is the *sprite
screen*: the layer the small moving characters are drawn on. This design
redraws that layer from scratch every frame. First the whole sprite screen
is filled with the transparent colour, then every sprite is drawn onto it at
its new position, lowest priority first, so that higher-priority sprites end
up on top. Since every frame starts from an empty screen, moving a sprite
needs no bookkeeping about what was underneath it.

The hardware that does this is a *drawing unit* with a single memory master
port. A unit works on one call at a time, and a call does one of two things:

* **erase** (`mode = 1`): fill a rectangle of the screen with pixel value 0,
  the transparent colour;
* **draw** (`mode = 0`): composite one sprite image onto the screen at
  `(x, y)`. A sprite pixel that is not 0 replaces the screen pixel, and a
  sprite pixel of 0 lets the screen pixel show through.

Several identical units can be placed side by side (`sprite_system`,
`N_UNITS`, default 3). The host processor then splits the erase among the
units and gives each unit its own sprites, so up to `N_UNITS` sprites are
drawn at once. At 100 MHz, three units erase a 1280x720 screen and draw
300 sprites of 64x64 pixels in about 8.2 ms in simulation, against 24.6 ms
for one unit (see *Performance*).

## Data layout

* A pixel is 32 bits. Two pixels share one 64-bit memory word, with the
  left pixel in bits 31:0 and the right pixel in bits 63:32. All memory
  traffic is in whole words, so the units always handle two pixels at a
  time.
* Addresses are **word** addresses (32 bits): indices into an array of
  64-bit words.
* The screen is `GAME_DW` pixels wide (1280), which is `GAME_DW/2` words per
  line. Pixel `(px, py)` of a screen starting at word `scn` is in word
  `scn + py*(GAME_DW/2) + px/2`.
* A sprite image of `w x h` pixels is stored as `h` lines of `w/2`
  consecutive words, starting at word `sp`.
* `x` and `w` must be even. Sprites are not clipped, so the host must keep
  every sprite inside the screen.

## A call

The call arguments are the packed struct `draw_cmd_t` in `sprite_pkg`:

| field  | meaning |
|--------|---------|
| `sp`   | first word of the sprite image |
| `scp`  | first word of the screen to read from (the previous contents) |
| `scn`  | first word of the screen to write |
| `x, y` | top-left pixel of the rectangle on the screen |
| `w, h` | size in pixels (`w` even, at most `MAX_SPW` when drawing) |
| `mode` | `MODE_DRAW` (0) or `MODE_ERASE` (1) |

For each line `i < h` and word `j < w/2` a call writes
`scn[(i+y)*(GAME_DW/2) + x/2 + j]`. When erasing, the word written is 0.
When drawing, it is the merge of `sp[i*(w/2) + j]` over
`scp[(i+y)*(GAME_DW/2) + x/2 + j]`. `scp` and `scn` may be the same screen
(the usual case, since the sprites accumulate on it) or two different ones.
An erase uses the same rectangle arguments, so a unit can erase the whole
screen (`x=0, y=0, w=1280, h=720`) or just a band of it.

Control uses three signals. A one-cycle `start` pulse while the unit is not
`busy` latches `cmd`. `busy` stays high until the call ends, and `done`
pulses for one cycle once the memory port has accepted the last write.
Writes are posted, so the memory must carry out requests in the order it
accepts them. A following call, on any unit using the same memory, then
sees the result.

## Inside a drawing unit (`sprite_draw_hw`)

```
             +-------------- sprite_draw_hw --------------------+
 memory  <-->| mem_arbiter (D0) <--- read_stage ---> sp_line[2] |
 port        |        ^                         \--> sc_line[2] |
             |        |                              |    |     |
             |        +------ write_stage <--------- +----+     |
             |                  (pixel_composite, 0/1 mode mux) |
             +--------------------------------------------------+
```

A draw works line by line in two stages:

1. **`read_stage`** reads the `w/2` words of sprite line `i` into the sprite
   line buffer `sp_line`. It then reads the `w/2` words of the screen line
   under the sprite into the screen line buffer `sc_line`. Sprite reads all
   come before screen reads. Requests go out back to back, and read data
   returns in order, so a response counter tells which buffer and index each
   word belongs to. In erase mode this stage does nothing.
2. **`write_stage`** walks the line buffers for word `j = 0 .. w/2-1`. It
   merges the two words in `pixel_composite` and issues one write per cycle
   to the new screen. In erase mode the multiplexer after the merge selects
   the constant 0 instead, and the stage runs without the line buffers, one
   word per cycle over the whole rectangle.

Both stages share the unit's one memory port through a two-way round-robin
`mem_arbiter`. The arbiter notes which requester made each outstanding read
(up to `MAX_OUTST`, 16) and returns each response to that requester.

**Overlap of the stages.** Each line buffer (`line_buffer`) has two banks of
`MAX_SPW/2` words. While the write stage drains line `i` from one bank, the
read stage fills line `i+1` into the other. The unit keeps a *full* flag per
bank:

* the read stage may start a line only when its bank's flag is clear;
* it sets the flag one cycle after the line's last response (`line_filled`);
* the write stage may start a line only when its bank's flag is set;
* it clears the flag after the line's last write (`line_drained`).

Both stages take the banks in turn, starting at bank 0 on every call. The
line buffers have a synchronous write port and an asynchronous read port, so
they map onto LUT RAM rather than block RAM.

**Timing of one unit.** With a memory that never stalls:

* an erase of `h` lines of `w/2` words takes `h*w/2` cycles plus three;
* a draw costs about `3*w/2` bus transfers per line (`w` reads and `w/2`
  writes), plus the read latency and about four cycles of handover, because
  the read stage waits for all of a line's data before it moves on.

A 64x64 sprite with a 6-cycle memory takes 6,662 cycles, about 104 per
line. The overlap hides the writes behind the reads of the next line, but
not the read latency.

## The multi-unit system (`sprite_system`)

`sprite_system` instantiates `N_UNITS` units. Each unit keeps its own
control port (`start[u]`, `cmd[u]`, `busy[u]`, `done[u]`) and its own memory
master port (`m_*[u]`). The ports meet only in the memory system: the shared
DDR3 SDRAM behind the processor's memory controller, which is not part of
this RTL. A memory port must:

* accept requests with `m_req_valid`/`m_req_ready`;
* carry out each port's requests in the order accepted;
* return each read's data on the same port, in request order, with
  `m_rsp_valid` high for one cycle;
* never hold back a response: the unit takes one every cycle.

The host decides how to split the work. The scheme that the testbenches use
and that the performance figures assume is this:

* unit `u` erases horizontal band `u` of the screen (`h = 720/N_UNITS`
  lines);
* unit `u` then draws, in priority order, only sprites that lie inside
  band `u`.

The units are not synchronised with each other. If two sprites handled by
different units overlap, or one unit draws into a band that another unit
is still erasing, the result depends on timing. Give overlapping sprites to
the same unit, or wait for all units between such calls.

The design has no display interface, processor or memory controller. It
expects a processor to issue the calls once per frame and a display
controller to read the finished screen from memory.

## Performance

`tb/tb_workloads.sv` runs one frame of each evaluated workload at full
size: 1280x720 screen, 64x64 sprites, 1, 2 and 3 units, and 50, 150 and 300
sprites. Every frame is checked word by word against a reference model.
The memory model answers reads after 6 cycles and serves every port every
cycle. Times are at 100 MHz:

| units | erase   | draw 50 | draw 150 | draw 300 |
|-------|---------|---------|----------|----------|
| 1     | 4.61 ms | 3.33 ms | 9.99 ms  | 19.99 ms |
| 2     | 2.30 ms | 1.67 ms | 5.00 ms  | 9.99 ms  |
| 3     | 1.54 ms | 1.13 ms | 3.33 ms  | 6.66 ms  |

Erase and draw time fall in proportion to the number of units, because each
unit has its own port and this memory never makes them wait. On a real
board the units compete for one DRAM, so the measured times are longer, and
the more so the more units there are. Hardware measurements of the same
arrangement, with a DDR3 SDRAM at 100 MHz, gave:

| units | erase  | draw 50 | draw 150 | draw 300 |
|-------|--------|---------|----------|----------|
| 1     | 5.5 ms | 4.4 ms  | 13.2 ms  | 26.4 ms  |
| 2     | 2.8 ms | 2.3 ms  | 7.0 ms   | 14.0 ms  |
| 3     | 1.8 ms | 1.7 ms  | 5.0 ms   | 9.9 ms   |

These were measured with code generated by a high-level synthesis tool from
the same algorithm, not with this RTL.

## Where this RTL is its own

The algorithm is taken from its description: the two stages, the address
arithmetic, the merge rule with 0 as the transparent colour, the erase mode
with its 0/1 output multiplexer, one shared bus per unit for both stages,
LUT-RAM line buffers, and several units sharing the work. The following are
choices of this design:

* **Memory port.** A simple in-order valid/ready request port with a
  read-response channel (`mem_req_t`) replaces the AXI master. Addresses are
  32-bit word addresses. Writes are posted.
* **One memory port per unit** in `sprite_system`, with the sharing left to
  the memory system.
* **Two-bank line buffers** with full flags, to let the two stages overlap.
* **Read stage.** Requests go out back to back, but the stage waits for all
  of a line's data before starting the next line.
* **Round-robin** arbitration between the two stages.
* **Control.** The `start`/`busy`/`done` call interface, and an active-low
  asynchronous reset.
* **Sizes.** `MAX_SPW = 64` (the sprite size of the evaluation), 32-bit
  pixels, 16-bit coordinates.
* **Defaults.** `N_UNITS = 3` as the default system size.
* **Not built:** bounds checking and clipping (the host must keep sprites on
  the screen), the display interface, the processor and the DDR3 memory.

## Files

| file | contents |
|------|----------|
| `rtl/sprite_pkg.sv` | pixel, word, address and command types; default sizes |
| `rtl/pixel_composite.sv` | two-pixel merge and erase multiplexer |
| `rtl/line_buffer.sv` | two-bank, two-port line memory |
| `rtl/mem_arbiter.sv` | round-robin arbiter with in-order read routing |
| `rtl/read_stage.sv` | first stage: sprite and screen line reads |
| `rtl/write_stage.sv` | second stage: merge and screen writes, erase |
| `rtl/sprite_draw_hw.sv` | one drawing unit |
| `rtl/sprite_system.sv` | top: `N_UNITS` units side by side |
| `tb/ddr_model.sv` | memory model: `NP` ports, latency, random stalls |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_sprite_system_full.sv` | one frame at default size (3 units, 1280x720, 50 sprites) |
| `tb/tb_workloads.sv`, `tb/workload_harness.sv` | the performance table above |

Each testbench prints `TB_RESULT checks=N failures=M`. Each one also has a
watchdog. The unit and system testbenches compare the whole memory with a
reference model after every call or frame. They also check cycle counts
where a rate is known, and count that each mechanism happened: erase and
draw calls, stage overlap, waiting for a free bank, memory stalls,
transparent pixels, and units running at the same time.

## Simulating

With Verilator 5 (package first, then the testbench; modules are found by
name in `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/sprite_pkg.sv tb/tb_sprite_system.sv --top-module tb_sprite_system
./obj_dir/Vtb_sprite_system
```

Replace `tb_sprite_system` with any other testbench. The full-size frame
(`tb_sprite_system_full`) runs in a few seconds and `tb_workloads` in about
20 seconds. To lint the synthesizable code:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/sprite_pkg.sv rtl/sprite_system.sv
```

The top's parameters are `N_UNITS`, `GAME_DW`, `MAX_SPW` and `MAX_OUTST`.
The screen height appears nowhere in the RTL: it is just the `h` of an
erase call.
