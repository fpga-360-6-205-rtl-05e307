# FPGA 360: a hardware 3-D model viewer

This design renders triangle models in real time and needs no processor. A
model is uploaded from a PC over a serial line. The viewer then draws it with
flat directional lighting and a depth buffer at 320x240 pixels, doubled to a
640x480 VGA display. Two analog joysticks move the camera. The target board
is a Nexys A7 (Artix-7, 100 MHz).

Everything from the vertex transform to the colour of a pixel runs in
hardware: single-precision floating-point units for the geometry, and
fixed-point arithmetic for rasterization.

The camera has two modes. **Gimbal-lock mode** orbits the origin: the right
stick turns the view and the left stick zooms. **Free mode** flies: the right
stick turns the view and the left stick moves forwards, backwards and
sideways. The right button switches between the modes.

## Block structure

```
fpga360_top
├── control_module                 (gpu_clk)
│   ├── xadc_reader     DRP reads of the two joystick channels, mux select
│   ├── msr_logic       thresholds → yaw/pitch steps, zoom or movement, cam_mode
│   ├── dir_vector      yaw/pitch → camera axes X, Y, Z   (4 × sine_lut, 4 × fp_mul)
│   └── position_logic  camera position from the increments and axes
└── graphics_module                (gpu_clk, VGA side on vga_clk)
    ├── model_memory    index / position / normal / material memories
    │   ├── uart_rx, uart_tx (echo), model_loader
    ├── frame_fsm       50 Hz frame sequencing
    ├── matrix_gen      camera → 4×4 view-projection matrix
    ├── vertex_fetch → vertex_shader → tri_clip → persp_divide → viewport
    ├── prim_fifo       8192-vertex buffer in front of the rasterizer
    ├── rasterizer      raster_fsm → barycentric → interpolate
    ├── frag_shader     lighting per fragment
    └── framebuffer     2 colour frames + depth buffer, clear, VGA scan-out (vga_timing)
```

The clock generator, the XADC and the button debouncer are not part of the
RTL:

- `gpu_clk` (100 MHz) and `vga_clk` (25.175 MHz) are inputs.
- The XADC's dynamic reconfiguration port (DRP) is brought out as `drp_*`.
- `btnr` must already be debounced.
- `joystick_select` drives the two analog multiplexers that put either the left or the right stick on the XADC inputs.

## Number formats

Geometry uses IEEE-754 binary32 throughout. Its units are `fp_add`, `fp_mul`
and `fp_div`:

| unit   | latency   | how it works                                                                 |
|--------|-----------|------------------------------------------------------------------------------|
| add    | 9 cycles  | the arithmetic is a combinational function (`fp_pkg`) followed by a register delay line; retiming is left to synthesis |
| mul    | 7 cycles  | same structure as add                                                         |
| divide | 30 cycles | a 27-stage restoring mantissa divider (`fixed_div`) plus exponent and rounding stages |

All three units:

- accept one operation per cycle;
- round to nearest even;
- flush subnormal inputs and results to zero. That is the one departure from the standard, and a deliberate one.

Every pipeline carries a valid bit that `rst` clears.

Rasterization uses fixed point:

| quantity                  | format                                        |
|---------------------------|-----------------------------------------------|
| screen x, y               | signed 17 bits, 7 fraction bits (±512 pixels) |
| depth z                   | unsigned 17 bits, 16 fraction bits (0 ≤ z < 2) |
| barycentric coefficients  | 26 bits, 24 fraction bits                     |
| stored depth              | 14 bits: z[15:2], saturating at 0x3FFF        |

Colours are 12-bit RGB, 4 bits per channel.

## One frame

`frame_fsm` runs the frame sequence every `FRAME_CYCLES` = 2,000,000 cycles,
i.e. 50 frames per second. The VGA output refreshes at 60 Hz independently of
it.

1. The frame timer expires. The FSM waits until the pipeline is idle: vertex fetch done, primitive FIFO empty, rasterizer idle, and no valid bit in any stage for 64 cycles. A slow frame is therefore finished, never cut.
2. It pulses `fb_switch` and `fb_clear`:
   - the finished frame becomes the displayed one;
   - the other frame and the depth buffer are cleared, one address per cycle (76,800 cycles);
   - cleared depth is 0x3FFF (all ones in 14 bits) and cleared colour black.
3. When the framebuffer is ready again, it pulses `restart` and `latch`. The current camera matrix is taken over, and vertex fetch starts at index 0.

Within a frame, data flows as follows:

- **vertex_fetch** reads one index entry and then the position it names, one vertex per cycle. An index entry is {material, normal, position}, 12 bits each. Fetch stops at the all-ones stop word or at the end of the index memory.
- **matrix_gen** builds `P·V` from the camera. The rows are `s·(axis, −axis·pos)` for X, Y and Z. The projection has horizontal scale 0.75 (4:3), vertical scale 1, near plane 0.5 and far plane 64. The camera looks along −Z.
- **vertex_shader** forms the four dot products with 16 multipliers and 12 adders (latency 25).
- **tri_clip** collects three vertices and drops the whole triangle if any vertex is outside the view volume, i.e. fails `w > 0, |x|,|y|,|z| ≤ w`. There is no polygon clipping. A triangle crossing the screen edge is therefore lost completely; the original design accepts this for simplicity.
- **persp_divide** produces x/w, y/w, z/w and 1/w with four dividers.
- **viewport** maps the results to pixels: x' = (x+1)·160, y' = (1−y)·120 (screen y points down), z' = (z+1)/2.
- **prim_fifo** buffers up to 8192 vertices with their material and normal indices. The vertex stages cannot be stalled, so the FIFO must hold whatever the rasterizer has not yet taken. A sticky `fifo_overflow` output reports a lost vertex.

## The rasterizer

This is the most intricate part of the design. It is a controller followed by
two fully pipelined sections that accept one sample per cycle.

**raster_fsm** has five states:

| state    | what it does                                                                                       |
|----------|----------------------------------------------------------------------------------------------------|
| Ready    | wait for a vertex                                                                                  |
| Convert  | binary32 → fixed point with a shift                                                               |
| Store    | keep the vertex and widen the bounding box; after the third vertex go to Assemble, otherwise Ready |
| Assemble | set the first sample to the box's top-left pixel                                                   |
| Raster   | emit one sample point per cycle, left to right, then top to bottom                                 |

Further details:

- The box is clamped to the screen.
- Samples are taken at pixel centres (x + 0.5, y + 0.5).
- Setup costs 10 cycles per triangle. After that, rasterizing a w×h box takes exactly w·h cycles.
- The material and normal indices are taken from the first vertex, so shading is flat per triangle.

**barycentric** runs four short stages:

1. the edge differences;
2. six products;
3. the three sub-triangle areas and the full area;
4. the sign and magnitude of each area.

Three `fixed_div` units then divide each area by the full area. A sample is
marked negative, and dropped, in two cases:

- the triangle is back-facing: its signed area is not negative in screen coordinates, which means clockwise in the model's right-handed space;
- any area has the wrong sign.

Models must therefore be wound counter-clockwise when seen from the front.
The total latency is about 31 cycles. The sample position and the vertex
depths travel alongside in a delay line.

**interpolate** forms z = a·za + b·zb + c·zc in two stages and passes on
(x, y, z) with the attribute indices.

The rasterizer's `idle` output is only true when the FSM is idle and no sample
is still in flight. `frame_fsm` relies on this so that it does not swap
frames too early.

## Shading and the framebuffer

**frag_shader** reads the triangle's normal and material colour (both
binary32 vectors) from the model memory. It computes

    rgb = material · min(1, max(L·n, 0) + 0.1) · 15

and keeps the integer part of each channel. The light direction
L = (1, 2, 3)/√14 is a fixed parameter, and 0.1 is the ambient term. Latency
is 43 cycles.

**framebuffer** holds two 320×240×12 colour frames and one 320×240×14 depth
buffer.

- A pixel is written when its depth is smaller than the stored depth.
- The read-compare-write takes two cycles. A bypass covers back-to-back pixels at the same address.
- Scan-out runs on `vga_clk` and shows each stored pixel as a 2×2 block.
- The choice of displayed frame crosses into the VGA clock domain through two flip-flops and takes effect at once. A swap is not aligned to the VGA frame, so the frame on screen during a swap can show the top of the old picture and the bottom of the new one.

## Model upload

`uart_rx` receives 8N1 bytes at 115200 baud (`CLKS_PER_BIT` = 868 at 100 MHz)
and samples each bit in its middle. `uart_tx` echoes every byte back.

`model_loader` joins bytes into entries, least significant byte first:

| memory          | size               | bytes per entry |
|-----------------|--------------------|-----------------|
| index buffer    | 8196 × 36 bits     | 5               |
| positions       | 2048 × 96 bits     | 12              |
| normals         | 2048 × 96 bits     | 12              |
| materials       | 32 × 96 bits       | 12              |

A 96-bit entry is {x, y, z}, binary32 each, with x in the top bits, so z is
sent first.

An entry of all ones ends a list. It is written too, which is how vertex
fetch finds the end of the model. The loader then moves on to the next
memory, in the order index → position → normal → material → index. A full
upload therefore sends the four lists in that order, each closed by a stop
word.

At power-up the index memory is filled with stop words, so nothing is drawn.
Reads from all four memories take one cycle.

## Camera control

**xadc_reader** keeps DEN high and DWE low. Every `SAMPLE_CYCLES` = 60,000
cycles (0.6 ms) it switches the DRP address between VAUX3 (stick x) and
VAUX11 (stick y), and keeps the top 12 bits of the last DO returned with
DRDY. After each x/y pair it reports the pair and toggles `joystick_select`.
Reading the left and the right stick once thus takes 2.4 ms.

**msr_logic** updates every `UPDATE_CYCLES` (20 ms). The rest value is 0x400.
A reading v becomes a step:

| reading           | step  |
|-------------------|-------|
| v > 0x500         | +0x5  |
| v > 0x600         | +0xA  |
| v > 0x700         | +0xF  |
| v < 0x300         | −0x5  |
| v < 0x200         | −0xA  |
| v < 0x100         | −0xF  |

The steps are applied as follows:

- The right stick's x step is added to yaw and its y step to pitch. Both are 12-bit angles, where 0x400 is 90°, and they wrap around.
- In gimbal-lock mode the left stick's y step changes the zoom distance in units of 1/256. The zoom starts at 4, is clamped to 1..64, and is sent as a float on both `x_inc` and `y_inc`.
- In free mode `x_inc` = left x step / 256 and `y_inc` = −(left y step) / 256.

**dir_vector** looks up sine and cosine in four quarter-wave tables
(`sine_lut`). Each table has 1024 binary32 entries of sin(i·π/2048) and uses
2 cycles. The unit then forms

    X = ( cos y,          0,      −sin y       )
    Y = ( −sin p · sin y,  cos p,  −sin p · cos y )
    Z = (  cos p · sin y,  sin p,   cos p · cos y )

with four multipliers. The total latency is 9 cycles.

**position_logic** computes the camera position:

- gimbal-lock mode: pos = zoom · Z, 8 cycles after an update;
- free mode: pos = x_inc·X + y_inc·Z + pos, 26 cycles after an update.

It starts 10 cycles after the MSR update, so the new axes are already in use.
The reset position is (0, 0, 4).

## Where this RTL departs from, or adds to, the original description

- **Lighting formula.** The formula in the original description has `max` and `min` exchanged, which would always give 1. This design clamps as shown above.
- **Stick axes.** Right stick x turns yaw and y turns pitch. One example in the source instead says that moving right changes pitch.
- **Ranges below rest.** The thresholds below 0x400 mirror those above. Only the upper ranges are specified.
- **Zoom and movement.** Step sizes, zoom limits, start position, light direction, projection constants and channel addresses are this design's choices.
- **Framebuffer clear.** The clear writes maximum depth and black, as in the original. The sequencing around it (wait for an idle pipeline, then swap and clear together) is this design's own.
- **matrix_gen.** Only its name is given in the original; its contents are this design's.
- **Position latency.** The position latency is 26 cycles including the output register. The original quotes 25.
- **Primitive FIFO.** The FIFO stores 96-bit positions, x/y/z after the perspective divide. The 1/w coordinate is not used later, so it is not stored.
- **Perspective-correct interpolation.** None: only depth is interpolated, and colour is flat per triangle.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line. They need the packages first. For
example:

```
verilator --binary --timing -Wno-fatal --top-module tb_rasterizer \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/fp_pkg.sv rtl/gfx_pkg.sv tb/tb_fp_pkg.sv tb/tb_scene_pkg.sv tb/tb_rasterizer.sv
obj_dir/Vtb_rasterizer +verilator+rand+reset+2
```

Run it from the directory that holds `rtl/` and `tb/`, because `sine_lut`
loads `rtl/sine_table.hex` by that relative path.

`tb_scene_pkg` generates the upload byte stream for a test scene:

- a small green triangle at z = 2;
- a cube from −1 to 1 with a different material on each face;
- a triangle behind the camera, which must be clipped.

There are three system-level testbenches:

- **`tb_graphics_module`** uploads the scene and checks rendered pixels in the framebuffer and on the VGA output: occlusion, lit cube face, background and cube corners. It also counts clipped triangles, culled samples, failed depth tests and frame switches.
- **`tb_fpga360_top`** adds a behavioural XADC and joystick multiplexer. It checks the serial echo byte for byte, renders at rest, turns the camera with the right stick (the picture must change while the orbit centre stays in view), and switches the camera mode with the button. It uses reduced frame, update and serial-bit periods and takes about a minute.
- **`tb_fpga360_full`** runs the same scenario with every parameter at its default: 868 clocks per bit, 2,000,000-cycle frames and 20 ms updates. That is about 16 million clock cycles and 1–2 minutes with Verilator.

The testbenches compare against values computed independently with `real`
arithmetic (`tb_fp_pkg`). They also check the latencies stated above.

## Resources and limits

Memory dominates the design:

| storage          | size                                    |
|------------------|-----------------------------------------|
| frames           | 2 × 921.6 kbit                          |
| depth buffer     | 1,075 kbit                              |
| model memory     | 0.69 Mbit                               |
| primitive FIFO   | 8192 × 120 bits = 0.98 Mbit             |

Together this nearly fills the 4.86 Mbit of block RAM on the XC7A100T.

The rendering budget is generous. Even the largest model, 8196 indices,
passes the vertex stages in 8196 cycles. The rasterizer can sample about 26
full screens per 20 ms frame.

What limits image quality:

- the 14-bit depth buffer shows z-fighting on large models;
- there is no anti-aliasing;
- whole-triangle clipping drops triangles at the screen edges.
