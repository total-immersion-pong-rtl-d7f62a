# Total Immersion Pong: a camera-driven pong game in SystemVerilog

The players are the paddles. A camera watches two people, and the game
compares each video frame with the one before it. The monitor shows only
the *difference* between frames, so anything that moves glows and anything
that stands still is black. A ball, drawn as a small spinning cube, flies
across that picture. It bounces off a player when there is motion under it
near that player's side of the screen. If nobody moves there, the ball goes
out and the other player scores.

This RTL is the digital part of that machine. It is a frame differencer, a
ball state machine, two score counters and a bitmap overlay. Everything runs
on one system clock, nominally 28.636 MHz (eight times the NTSC colour
subcarrier; see "Clocking"). The analog parts and bought-in chips stay
outside the top module and are reached through ports:

- the camera's 8-bit flash ADC
- the NTSC sync generator
- the 256K x 8 DRAM frame store (two 256K x 4 fast-page-mode chips)
- the output DAC

## Signal flow

```
 camera -> ADC --adc_data--+                         +--> video_out -> DAC
                           v                         |
 sync gen -> hdrive/vdrive/cblank/oddeven      overlay_output (XOR)
          |                                    ^          ^
 diff_clkgen, row_counter, col_counter         |          |
          |  address bus                    overlay_prom  difference
          v                                    ^          |
 diff_ctrl ---strobes--> DRAM <--data bus--> absdiff_datapath
                                               |          |
                                  overlay_offset          | bit 5
                                    ^     ^               v
                       pos_comparator x2 ---------> pong_rules -> win1/win2
                                                     |            -> score_counter
                                                     +-> ballx, bally
```

| module | role |
|---|---|
| `tip_top` | wires everything together; tri-state buses become multiplexers |
| `diff_clkgen` | clk/2 for the sync generator, DRAM `/RAS` from HDRIVE, HDRIVE edge pulse |
| `row_counter` | line in field; DRAM row address `{line, odd/even}` |
| `col_counter` | pixel in line; DRAM column address `{column, 0}` |
| `diff_ctrl` | the eight-clock pixel cycle: every strobe of the DRAM, ADC and datapath |
| `absdiff_datapath` | `|new - old|` with a single adder, forced to 0 in blanking |
| `pos_comparator` | "is this pixel the ball's pixel?" on one axis (bit 0 ignored) |
| `pong_rules` | ball position, velocity, hits, bounces, losses, serve |
| `score_counter` | two 4-bit scores, counting the rising edges of the win signals |
| `overlay_offset` | ball-minus-pixel offsets in x and y; latches the line number |
| `overlay_prom` | 32K x 8 cube image table (computed from `cube_sprites_pkg`) |
| `overlay_output` | animation counter, 8:1 pixel select, XOR into the output stream |
| `tip_pkg`, `cube_sprites_pkg` | shared constants; the four 32 x 16 cube frames |

## The pixel cycle: one DRAM, one data bus, eight clocks

The differencer has to do four things for every pixel on a single 8-bit bus:

1. read the old pixel from the frame store,
2. sample the new one from the ADC,
3. write the new one back in place of the old one,
4. register the difference.

`diff_ctrl` does this with a free-running 3-bit phase counter. HDRIVE low
loads phase 1. While CBLANK is low (blanking) the counter waits at phase 7,
so the first visible clock of a line starts a pixel at phase 0. Each strobe
is decoded from the phase and registered, so it changes one clock after its
phase:

| phase | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| `dram_cas_n` | L | L | L | L | L | L | L | H |
| `dram_oe_n` (old pixel on bus) | H | L | L | L | H | H | H | H |
| `old_en_n` (latch ~old, advance column) | H | H | L | H | H | H | H | H |
| `a2d_n_oe` (ADC on bus; also the ADC clock) | H | H | H | H | L | L | L | L |
| `dram_we_n` (write new pixel back) | H | H | H | H | H | H | L | H |
| `final_en_n` (latch the difference) | H | H | H | H | H | H | H | L |

`/CAS` falls at the start of every pixel and rises for one clock at its
end. The column counter advances in the middle of the cycle (phase 2), so
the column address for the next pixel is ready before `/CAS` falls again.
`/RAS` is HDRIVE inverted and delayed by one clock: it is high (precharge)
only during the line-start pulse, so a whole line is one DRAM page. While
`/RAS` is high the address bus carries the row address; the frame store
takes it when `/RAS` falls.

All strobes stay high when the picture is over: once the column count
reaches 180 (the column counter's `n_full`), or once the line count passes
250 (the row counter's `n_full`). The column count reaches 180 in the
middle of the 180th pixel, and the registered flag then blocks that pixel's
write and difference. So each line stores and differences 179 pixels,
columns 0 to 178. The end-to-end testbench checks this count on every line.
At 28.636 MHz a pixel takes 279 ns, and 180 pixel cycles take 50.3 us,
which fits the visible 52.6 us of an NTSC line.

**Addressing.** The DRAM address is nine bits, multiplexed:

- Row address (during blanking): `{line[7:0], odd/even}`. The two
  interlaced fields land on alternate DRAM rows, so a whole frame is stored.
  Each pixel is compared with the same pixel of the same field one frame
  (1/30 s) earlier.
- Column address (during the visible line): `{column[7:0], 0}`. Only even
  columns of the DRAM are used. This is how the original board was wired:
  the counter drives address bits 8:1 and bit 0 is pulled down.

### Absolute difference with one adder

`absdiff_datapath` never subtracts. It stores the old pixel inverted, and
one 8-bit adder forms `s = new + ~old`. This equals `new - old - 1 + 256`.

- If the carry out is set, `new > old` and `s[7:0] + 1 = new - old`.
- If it is clear, `new <= old` and `~s[7:0] = old - new`.

The output register is cleared on every clock while CBLANK is low, so the
stream is black during blanking.

## The ball: folded coordinates

This is the least obvious part of the design. `pong_rules` keeps the ball
in two 9-bit accumulators that only ever count *up*. The direction of
travel is not a separate bit: it is folded into the high bits, and the
screen position is a function of the accumulator.

**Vertical.** `y[8]` is the direction. The screen row is `y[7:0]` XOR
`{8{y[8]}}`. When `y[7:0]` rolls over from 0xFF, `y[8]` flips and the
screen row starts counting back. That is the bounce off the top and bottom
edges, with no comparator at all.

**Horizontal.** `x[8:6]` splits the range into eight segments of 64:

| segment `x[8:6]` | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| screen column | `x-64` (off-screen, <0) | `x-64` | `x-64` | `x-64` | `~x` | `~x` | `~x` | `~x` |
| role | lose (left) | play | play | bounce zone | lose (right) | play | play | bounce zone |

- In segments 1 to 3 the ball moves right and its screen column runs from
  0 to 0xBF.
- Counting on from segment 3 into segment 4 the ball would leave the
  screen on the right, and player 1 scores.
- In segments 5 to 7 (`~x[7:0]`) the ball moves left.
- Past segment 7 the count wraps to segment 0 (left loss), and player 2
  scores.

**Hitting.** Two comparators look for the ball's pixel: columns and lines
are equal when bits 7:1 match, so the spot is 2 x 2 pixels. A hit needs
three things in one pixel:

- both comparators true,
- bit 5 of the frame difference set (a change of at least 32 grey levels),
- the ball in a bounce segment (3 or 7), or at rest.

On a hit, at the next field the ball reverses:

- `x` becomes `~x + 64`. This is the same screen column in the opposite
  direction, moved out of the bounce zone into a play segment.
- New random speeds are picked: `vx` from 1 to 3 (never 0) and `vy` from
  0 to 3.
- With a random bit set, the vertical direction flips too.

A hit outside the bounce zones is ignored, so a player can only return the
ball on their own side.

**Serve and loss.** On reset and after every loss, the ball is placed at
rest (`vx = vy = 0`) at logical x = 0x09A (screen column 90), with the
logical row 0x80 (screen row 0x80 or 0x7F, depending on a random direction
bit). A random bit also decides whether the ball's horizontal direction is
flipped at the next field. The flip keeps the same screen column. The ball
waits there until someone moves at it, and the first hit launches it. `win1`/`win2` are high while
the ball sits at the serve point after a loss, and show which side scored.

**Timing and randomness.**

- The ball moves once per field, when the odd/even flag changes. Speeds are
  in screen pixels per field.
- The state machine is stepped once per pixel (the rising edge of the ADC
  clock). The difference bit is sampled on the opposite edge.
- Random bits are the least significant bit of the raw ADC sample, which is
  camera noise. They are shifted into the `vx` and `vy` registers on
  alternate pixels. The `vx` register refuses a bit that would make it 0.

## The overlay: a cube drawn by address arithmetic

The ball image is not drawn by any sprite engine. `overlay_offset` forms,
for every pixel,

```
coldiff = ballx + ~column      (= ballx - column - 1, mod 256)
rowdiff = bally + ~line        (= bally - line - 1,   mod 256)
```

The current line number is not a separate counter. It is latched from the
address bus (bits 8:1 of the row address) on the rising edge of `/RAS`
during blanking.

`overlay_output` addresses the 32K x 8 image table with
`{frame[1:0], rowdiff[7:0], coldiff[7:3]}`. It selects bit `coldiff[2:0]`
of the byte and XORs that bit into all eight bits of the difference. A lit
image pixel therefore shows the inverted difference: white on a still
background, dark over movement.

The table (`overlay_prom`) is defined so the 16 x 32 image is centred on
the ball. Let `dy = line - bally` and `dx = column - ballx`.

- Rows: `dy` from -16 to 15 shows image row `dy + 16`.
- Columns: `dx` from 0 to 7 reads the right-hand byte of the image row, and
  `dx` from -8 to -1 reads the left-hand byte.
- All other addresses read 0.

Offsets wrap modulo 256, so the cube wraps around the picture edges. The
table is computed combinationally from the 4 x 32 x 16 bits in
`cube_sprites_pkg`. No memory file is needed.

The frame number is the top two bits of a 4-bit counter that advances once
per video frame (falling edge of odd/even). The cube shows four images in
16 frames, about half a second per turn.

Frames 0 and 1 of the cube are the original bitmaps. Frames 2 and 3 were
reconstructed from a printed picture of the animation and may differ from
the originals by a few pixels.

## Scores

`score_counter` keeps two 4-bit counters, one per player, for hex displays.
Each counts the rising edges of its win signal and wraps after 15. The
game reset clears both.

## Clocking: one clock instead of five

The original board clocked logic from several sources: the system clock,
HDRIVE (row counter), `/RAS` (line-number latch), the ADC clock (game logic
and the score reset) and odd/even (animation). Here all flip-flops run on
`clk`. Each of those signals is registered and turned into a one-clock
enable on the edge the original used. This adds one or two clocks of
latency in places. Those delays fall inside blanking or inside the 8-clock
pixel cycle, so the picture and the game behave the same.

The tri-state buses are multiplexers. The address bus carries the row
address while CBLANK is low and the column address while it is high. The
data bus carries the DRAM output while `/OE` is low, the ADC output while
the ADC is enabled, and 0 otherwise. `dram_wdata` is the data bus.

The nominal clock is 28.636 MHz, which gives 14.318 MHz on `sync_clk`, the
sync generator's standard NTSC rate. The original design is also described
with a 28.8 MHz oscillator. The logic does not depend on the exact frequency: every
count is in clocks or pixels.

## Where this design departs from the original, and how far to trust it

Followed closely:

- the phase table of the pixel cycle
- the adder-based absolute difference
- the counter limits (180 columns, 250 lines) and the address wiring
- the ball encoding, segment roles, serve position, bounce rule and random
  velocity rule
- the comparator wiring
- the overlay address wiring and the PROM layout
- the XOR output

Choices made here:

- **Single clock** with edge enables (see above).
- **Screen mapping of x.** The original's own description (and its diagram of
  the x encoding) maps `x[8] = 0` to `x - 64` and `x[8] = 1` to `~x`. Its
  program listing has the two cases the other way round. This design
  follows the description. The other choice only mirrors the playing field
  left to right.
- **Random input.** The random bit is taken straight from the ADC output
  bit 0. The original took it from bit 0 of the shared data bus. In this
  single-clock version the ADC has already released the bus when the game
  logic steps, so the bus would read 0 there.
- **Resets.** The random registers, the animation counter and the
  sync-clock divider are reset. The original left them free. The score
  reset is registered on every clock, not only on ADC clock edges (which
  stop during blanking), so a short reset is never lost.
- **Unused controller output.** An unused `/RAS` output of the original
  controller is left out.
- **Pixel rate.** The design runs at 3.58 MHz, 8 clocks per pixel, which is
  the final form of the original controller. A quoted pixel rate of
  4.77 MHz (210 ns) would need 6 clocks per pixel and does not apply.
- **Overlay blanking.** The overlay XOR is not blanked. During blanking the
  cube image can appear in the output stream, as on the original board. The
  DAC and sync mixing outside the chip decide what the monitor shows then.

Not built as RTL: the ADC, the sync generator, the DRAM chips and the DAC
with its op-amp output stage. These are analog or bought parts. The
testbench contains behavioural models of the sync generator
(`tb/sync_gen_model.sv`) and the DRAM (`tb/dram_model.sv`).

A generic Yosys synthesis of the top gives about 210 cells and 107
flip-flops.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with
an independent model. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_absdiff_datapath`: all 65536 pixel pairs.
- `tb_pos_comparator`: exhaustive over both variants.
- `tb_diff_ctrl`: the phase table, the gating and the 8-clock pixel rate.
- `tb_pong_rules`: a reference model of the folded coordinates, run over
  400,000 pixel steps. It requires serve hits, bounces in both zones, wall
  bounces and losses on both sides.
- `tb_overlay_prom`: reads every pixel of every frame back through the
  offset arithmetic.
- `tb_tip_top`: runs the whole design at its real size. It uses the sync
  and DRAM models and plays the camera itself: a grey picture with a noisy
  low bit, plus a flickering patch at the ball in "play" phases and
  nothing in "miss" phases.
  - On every pixel it checks the difference stream, the overlay pixel and
    blanking.
  - It checks the scores against the win edges.
  - It checks two rates: 179 stored pixels on every line, and an animation
    image change every 8 fields.
  - On every clock it checks the bus rules. The DRAM and the ADC never
    drive the data bus together, and a write happens only with `/CAS` low
    while the ADC drives the bus.
  - It fails if any of these never happens: serve hit, bounce, wall bounce,
    loss, score change, animation change, line and field end, overlay drawn.
  - A typical run is about 150 fields (5 s of video). It takes about a
    minute of simulation and makes about 6.5 million difference checks.

To run a testbench with Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/tip_pkg.sv rtl/cube_sprites_pkg.sv tb/tb_tip_top.sv \
    --top-module tb_tip_top -o sim
./obj_dir/sim
```

Replace `tb_tip_top` with any other testbench name. The results do not
depend on the simulator's start-up values. Registers without a reset (the
counters and the pixel-cycle strobes) are cleared by the video timing
within a line or a field, before anything is checked.
