# Single-player PONG for an FPGA, with a potentiometer paddle

A one-player version of the 1970s arcade game: a red ball bounces around a
white 640x480 VGA screen and the player keeps it in play with a cyan bat
near the bottom, like hitting a ball against a practice wall. The bat is
steered by a potentiometer whose voltage is read by an external serial ADC
(a Digilent PmodAD1, two AD7476 12-bit converters). A push button serves.
When the ball reaches the bottom edge it disappears until the next serve.

Everything is one synchronous design on a 50 MHz board clock (the original
target was a Digilent Nexys2 board). The logic is small, about 130 flip-flops:
the interest is in the timing. Four different rates come from one counter.
The ball is updated once per video frame, and the game rules are a few
comparisons in 10-bit arithmetic.

## Blocks and data flow

```
                   +-------------+  pix_en            +-----------+ hsync, vsync
 clk_50MHz ------->| pong_timing |------------------->| vga_sync  |--------------> VGA
                   |             |                    |           | colour (MSBs)
                   |             | ADC_SCLK, ADC_CS   |           |--------------> VGA
                   |             |-----------> PmodAD1            |
                   |             | sclk_fall, cs_rise |  pixel_row/col  ^ colour
                   +-------------+---+               +-----+------------+
                                     v                     |v         |
 ADC_SDATA1/2 --------------> +--------+ data_2 +---------+ +-----------------+
                              | adc_if |------->|bat_scale|>|   bat_n_ball    |<-- btn0 (serve,
                              +--------+ 12 bit +---------+ |                 |    synchronised)
                                                  bat_x     | v_sync -> frame |<-- sw (speed)
                                                            +-----------------+
                                                              hit, serve_start
                                                                    v
                                                            +-------------+
                                                            | hit_counter |--> led[7:0]
                                                            +-------------+
```

| Module | File | Role |
|---|---|---|
| `pong` | `rtl/pong.sv` | top level: board pins, wiring, button synchroniser |
| `pong_timing` | `rtl/pong_timing.sv` | 10-bit counter: pixel enable, ADC SCLK and CS, edge strobes |
| `adc_if` | `rtl/adc_if.sv` | two 12-bit serial-to-parallel receivers |
| `bat_scale` | `rtl/bat_scale.sv` | ADC reading x 5/32 gives the bat column |
| `bat_n_ball` | `rtl/bat_n_ball.sv` | ball and bat drawing, ball motion, serve and miss |
| `vga_sync` | `rtl/vga_sync.sv` | 800x525 raster counters, syncs, blanking |
| `hit_counter` | `rtl/hit_counter.sv` | returns since the last serve, for the LEDs |
| `pong_pkg` | `rtl/pong_pkg.sv` | `coord_t` (10-bit coordinate), `rgb_t`, screen size |

## One counter, four rates

`pong_timing` holds a toggle flop and a free-running 10-bit counter, both
clocked at 50 MHz.

* **Pixel rate, 25 MHz.** The toggle flop gives `pix_en`, high on every
  second clock. `vga_sync` advances only on enabled clocks.
* **ADC serial clock, 1.5625 MHz.** `ADC_SCLK = ~count[4]`, period 32 clocks.
* **ADC chip select, about 48.8 kHz.** `ADC_CS = count[9]`. It is low for 512
  clocks, which is 16 SCLK periods: one 16-bit conversion. Bits 0..8 wrap to
  zero in the same clock that bit 9 changes. So CS changes only at a rising
  edge of SCLK, as the converter requires.
* **Frame rate, 59.5 Hz.** This is the vertical sync from `vga_sync`
  (800 x 525 pixels at 25 MHz). `bat_n_ball` finds the rising edge of
  `v_sync` and moves the ball once at that edge.

The ADC receiver must sample its data line where SCLK falls. It cannot do
that one clock late: the converter changes its output shortly after each
falling edge. So `pong_timing` also gives two strobes, one clock early.
`sclk_fall` is high in the cycle whose closing edge makes SCLK fall.
`cs_rise` is high in the cycle whose closing edge raises CS. A flop enabled
by `sclk_fall` therefore samples exactly where a flop clocked by the falling
SCLK would.

## Reading the potentiometer

A falling CS starts a conversion. Each AD7476 then sends 16 bits, MSB
first, changing its data after each falling SCLK edge: four zeros, then the
12-bit result (0 V gives 0x000, 3.3 V gives 0xFFF). `adc_if` shifts each
channel into the low end of a 12-bit register on each of the 16 falling
edges. The four leading zeros fall off the top, so the register then holds
the result. When CS rises, both registers are copied to the outputs, which
hold until the next conversion, 1024 clocks (20.5 µs) later. Only channel 2
(the potentiometer) is used. Channel 1 is received and left unconnected.

`bat_scale` maps the reading to a column as `v/8 + v/32`, close to
`v*5/32`. Both terms are truncated, and full scale gives 511 + 127 = 638.
The bat centre can therefore reach any visible column except the last.

## The raster

`vga_sync` counts columns 0..799 and lines 0..524. The active picture is
columns 0..639 of lines 0..479. Horizontal sync is low for columns
659..755 (97 pixels). Vertical sync is low for lines 493..494. The line
counter advances when the column counter reaches 699, not at the end of
the line. As a result, the vertical sync edges fall at column 700.

All outputs are registered. The pixel address (`pixel_row`, `pixel_col`)
is the counter value from before the clock edge. The colour input is a
combinational function of that address. It is registered and blanked
using the *current* counters, which are one pixel later. Two effects
follow. Each line is shown one pixel late, so the colour of column 639 is
always blanked. The first visible pixel of each line shows column 799,
which is always background. This skew belongs to the original design and
is kept.

## Ball and bat (`bat_n_ball`)

### Drawing

Drawing is combinational from the pixel address:

* **Ball.** A pixel is part of the ball when `dx*dx + dy*dy < 64`, with
  `dx`, `dy` its distances from the ball centre. That is a disc of radius
  `BSIZE = 8`: 15 pixels across and 193 pixels in all. The ball is drawn
  only while a game is on.
* **Bat.** The bat covers lines `BAT_Y-BAT_H .. BAT_Y+BAT_H` (397..403) and
  columns `bat_x-bat_w .. bat_x+bat_w` (41 pixels for `bat_w = 20`). When
  `bat_x <= bat_w`, `bat_x - bat_w` would wrap below zero, so the bat is
  then drawn from column 0.
* **Colours.** Red is `~bat`, green and blue are `~ball`. This gives white
  background, red ball, cyan bat, and black where the two overlap.

### Motion rules, once per frame

All decisions in a frame use the state from before that frame's update.
Later rules override earlier ones.

1. **Vertical.**
   * If `serve` is high and no game is on, start a game and head upward.
   * Otherwise, if `ball_y <= 8` (top wall), head down.
   * Otherwise, if `ball_y + 8 >= 480` (bottom), head up and end the game.
     This is the miss.
2. **Horizontal.**
   * If `ball_x + 8 >= 640`, head left.
   * Otherwise, if `ball_x <= 8`, head right.
3. **Bat.** If the ball's box (centre ±4) overlaps the bat's box, head up.
   This overrides rule 1.
4. **Move.** The ball moves by its *old* motion. A move that would go below
   zero stops at 0. While no game is on, the ball is parked at line 440 and
   is invisible. Its horizontal motion keeps running.

Because of rule 4, the ball moves once more in its old direction in the
frame where a bounce is detected. At 6 pixels per frame it therefore goes
slightly past the bat or wall before turning. At high speeds (exercise
option below) it can pass wholly beyond the right edge for one frame.

The comparisons are in 10-bit unsigned arithmetic that wraps, as in the
original design. The bat test uses `bat_x - bat_w` without the drawing's
guard for small `bat_x`. So when the bat is within `bat_w` of the left edge,
it is drawn but does not return the ball. The same happens if the ball's
`ball_x - 4` wraps.

A serve takes effect at the next frame. The ball appears at line 440 and
climbs at the ball speed: 72 frames to the top, 65 frames back down to the
bat. A return therefore takes about 2.3 s.

### Outputs for the rest of the design

* `hit`: a one-clock pulse when the bat test is true while the ball is
  falling. A bounce stays in contact for several frames, but this counts it
  once.
* `serve_start`: a one-clock pulse when a serve starts a game.
* `game_on`, `ball_x`, `ball_y`, `bat_w`: the game state, for observation.

## Exercise options

The original material suggests three extensions. All three are built:

* **`SPEED_FROM_SW`** (parameter, default 0). The speed is taken from
  `sw[5:0]`. Values above 32 are held at 32. Zero is passed through, and
  the ball then stops. A new speed takes effect at the next bounce, since
  the motion is only reloaded there.
* **`SHRINK_BAT`** (parameter, default 0). The bat starts at twice the
  normal half-width (40, so 81 pixels wide). Each return takes one pixel off
  the half-width, down to 1. A miss restores it.
* **Hit counter** (always present). `led[7:0]` shows the number of returns
  since the last serve, in binary. It wraps after 255.

With both parameters at 0, the game is the original design.

## Interface of the top (`pong`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_50MHz` | in | 1 | board clock |
| `rst` | in | 1 | synchronous reset, active high |
| `btn0` | in | 1 | serve button (asynchronous; synchronised inside) |
| `sw` | in | 6 | ball speed, used with `SPEED_FROM_SW` |
| `ADC_CS`, `ADC_SCLK` | out | 1 | to the PmodAD1 |
| `ADC_SDATA1`, `ADC_SDATA2` | in | 1 | from the PmodAD1; channel 2 is the paddle |
| `VGA_red`, `VGA_green` | out | 3 | only bit 2 is driven; bits 1:0 are 0 |
| `VGA_blue` | out | 2 | only bit 1 is driven |
| `VGA_hsync`, `VGA_vsync` | out | 1 | active low |
| `led` | out | 8 | returns since the last serve |

## Where this implementation departs from the original

* **One clock domain.** The original clocks the VGA logic with a divided
  25 MHz clock, the ball logic with `v_sync`, and the ADC receiver with
  SCLK and CS. Here all flops run on the 50 MHz clock, with enables and
  edge strobes. Every update happens at the same instant as before, or
  (for the ball) one 20 ns clock after the `v_sync` edge.
* **Reset.** The original relies on power-up values. A synchronous reset
  input loads those same values: ball at (320, 240), moving +6 on both
  axes, no game on, counters at zero.
* **Serve button.** It passes through a two-flop synchroniser.
* **Added outputs.** The hit counter and the LED output are additions, as
  are the two exercise parameters.
* **Colour of the bat.** The original's wiring makes the bat cyan; one
  description calls it blue. Cyan, as wired, is kept.

## Simulation

The testbenches need Verilator 5 with `--timing`. Run them from the
folder holding `rtl/` and `tb/`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_pong rtl/pong_pkg.sv tb/tb_pong.sv
./obj_dir/Vtb_pong
```

Swap the testbench name for the others. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks | Run time |
|---|---|---|
| `tb_pong_timing` | every output of the timing block for 5000 clocks; SCLK period 32; 16 SCLK falls per CS low; CS changes with rising SCLK; the strobes | < 1 s |
| `tb_adc_if` | 60 conversions of random codes through two converter models; outputs change only when CS rises; one result per 1024 clocks | < 1 s |
| `tb_bat_scale` | all 4096 readings | < 1 s |
| `tb_vga_sync` | every output for one frame against counters derived from the pixel count; sync widths and periods | < 1 s |
| `tb_bat_n_ball` | 4000 frames for the default and the exercise configuration, against a reference model of the rules; position, state, pulses, bat width, and a few hundred pixels per frame; also that serve, return, miss and all three wall bounces occur | ~2 s |
| `tb_hit_counter` | random clear and increment, including wrap | < 1 s |
| `tb_pong` | whole design at default settings, see below | ~2 min |
| `tb_pong_ext` | whole design with a 12-pixel switch speed and the shrinking bat | ~1.5 min |

### The end-to-end benches

`tb_pong` and `tb_pong_ext` instantiate the top with two behavioural
converter models (`tb/ad7476_model.sv`) and a player (`tb/pong_player.sv`).
The player rebuilds every frame from the VGA pins alone. From the frame it
finds the ball and the bat, checks their exact shape and position, and
checks the ball's step size. It then sets the potentiometer code to put
the bat under the ball, and presses serve when no ball is in play. After a
set number of returns it moves the bat away so that the ball is lost.

The benches also measure the hsync period (1600 clocks), the frame period
(840,000 clocks) and the ADC framing. They fail if a serve, a return, a
miss, a bounce off each wall, or an ADC-driven bat move never happens.
`tb_pong` runs the top with every parameter at its default. It plays about
290 frames, roughly 5 seconds of game time.

## How far to trust it

* **Verified in simulation.** All the testbenches above pass. A deliberately
  broken copy of each block is caught by its bench. Two assertions guard
  the ADC framing during every simulation. One, in `pong_timing`, checks
  that CS changes only with a rising SCLK. The other, in `adc_if`, checks
  that no shift coincides with the load. The switch speed is exercised from
  1 to 40 (held at 32) in `tb_bat_n_ball`.
* **Not verified.**
  * Timing on a real FPGA. The design has one 50 MHz clock. Its longest
    path is the two 10x10 squarings and the add in the ball-drawing logic.
    That path is only captured on pixel-enabled clocks, so it could be
    constrained as a two-cycle path if it misses 20 ns.
  * Hardware against a real AD7476. The converter model covers only the bit
    order and the edges at which the data changes. It does not model the
    converter's delays.
  * The analog side: potentiometer, ADC input filter, VGA resistor network.
* **Known original quirks, kept on purpose.**
  * The left-edge bat blind spot.
  * The one-pixel colour skew.
  * The extra frame of travel before each bounce.
