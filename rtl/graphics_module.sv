// graphics_module: the complete rendering pipeline of the viewer.
//
// Data flows: vertex_fetch reads the index and position memories of
// model_memory -> vertex_shader (4x4 transform) -> tri_clip -> persp_divide
// -> viewport -> prim_fifo -> rasterizer -> frag_shader (which reads normals
// and materials from model_memory) -> framebuffer -> VGA. The vertex side
// runs at one vertex per cycle and cannot stall; the FIFO absorbs the
// difference to the rasterizer, which takes 10 cycles of setup per triangle
// and then one pixel per cycle. matrix_gen turns the camera position and axes
// into the transform, which is frozen at the start of each frame. frame_fsm
// starts a frame 50 times per second once the previous one is complete:
// it swaps the two frame buffers, clears the new target, and restarts the
// vertex fetch. The pipeline counts as idle when fetch, FIFO and rasterizer
// are idle and no stage has produced a valid output for 64 cycles (longer
// than any stage's latency). Model data arrives over the UART.
module graphics_module
  import gfx_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES = 2_000_000,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned FIFO_DEPTH   = 8192,
  parameter int unsigned INDEX_DEPTH  = 8196
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vga_clk,
  input  logic        vga_rst,
  // camera, from the control module
  input  fvec3_t      cam_pos,
  input  fvec3_t      vec_x,
  input  fvec3_t      vec_y,
  input  fvec3_t      vec_z,
  // model upload
  input  logic        uart_rx_in,
  output logic        uart_tx_out,
  // display
  output logic        hsync,
  output logic        vsync,
  output logic [11:0] rgb,
  // status
  output logic [15:0] frames,
  output logic        fifo_overflow
);
  // ---------------- model memory ----------------
  logic [13:0] index_read_addr;
  index_t      index;
  logic [10:0] position_read_addr, normal_read_addr;
  logic [4:0]  material_read_addr;
  fvec3_t      position, normal, material;

  model_memory #(.INDEX_DEPTH(INDEX_DEPTH), .CLKS_PER_BIT(CLKS_PER_BIT)) u_mem (
    .clk, .rst, .uart_rx_in, .uart_tx_out,
    .index_read_addr, .index, .position_read_addr, .position,
    .normal_read_addr, .normal, .material_read_addr, .material
  );

  // ---------------- frame control and transform ----------------
  logic  fb_switch, fb_clear, fb_ready, restart, latch, pipeline_idle;
  mat4_t mg_transform, transform;
  logic  mg_valid;

  frame_fsm #(.FRAME_CYCLES(FRAME_CYCLES)) u_fsm (
    .clk, .rst, .pipeline_idle, .fb_ready, .fb_switch, .fb_clear, .restart, .latch, .frames
  );

  matrix_gen u_matrix (
    .clk, .rst, .valid_in(1'b1), .cam_pos, .vec_x, .vec_y, .vec_z,
    .valid_out(mg_valid), .transform(mg_transform)
  );

  always_ff @(posedge clk) if (latch && mg_valid) transform <= mg_transform;

  // ---------------- vertex side ----------------
  logic   f_valid, f_done;
  fvec3_t f_pos;
  attr_t  f_attr;
  vertex_fetch #(.INDEX_DEPTH(INDEX_DEPTH)) u_fetch (
    .clk, .rst, .restart, .index_read_addr, .index, .position_read_addr, .position,
    .valid_out(f_valid), .position_out(f_pos), .attr_out(f_attr), .done(f_done)
  );

  logic   vs_valid;
  fvec4_t vs_clip;
  attr_t  vs_attr;
  vertex_shader u_vs (
    .clk, .rst, .transform, .valid_in(f_valid), .position(f_pos), .attr_in(f_attr),
    .valid_out(vs_valid), .clip(vs_clip), .attr_out(vs_attr)
  );

  logic   cl_valid, cl_dropped;
  fvec4_t cl_vert;
  attr_t  cl_attr;
  tri_clip u_clip (
    .clk, .rst, .valid_in(vs_valid), .vertex(vs_clip), .attr_in(vs_attr),
    .valid_out(cl_valid), .vertex_out(cl_vert), .attr_out(cl_attr), .dropped(cl_dropped)
  );

  logic   pd_valid;
  fvec4_t pd_ndc;
  attr_t  pd_attr;
  persp_divide u_pd (
    .clk, .rst, .valid_in(cl_valid), .clip(cl_vert), .attr_in(cl_attr),
    .valid_out(pd_valid), .ndc(pd_ndc), .attr_out(pd_attr)
  );

  logic   vp_valid;
  fvec3_t vp_screen;
  attr_t  vp_attr;
  viewport u_vp (
    .clk, .rst, .valid_in(pd_valid), .ndc(pd_ndc), .attr_in(pd_attr),
    .valid_out(vp_valid), .screen(vp_screen), .attr_out(vp_attr)
  );

  logic   q_valid, q_ready, q_empty;
  fvec3_t q_vert;
  attr_t  q_attr;
  prim_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .valid_in(vp_valid), .vertex_in(vp_screen), .attr_in(vp_attr),
    .valid_out(q_valid), .ready(q_ready), .vertex_out(q_vert), .attr_out(q_attr),
    .empty(q_empty), .overflow(fifo_overflow)
  );

  // ---------------- pixel side ----------------
  logic      r_valid, r_idle;
  fragment_t r_frag;
  attr_t     r_attr;
  rasterizer u_raster (
    .clk, .rst, .valid_in(q_valid), .ready(q_ready), .vertex(q_vert), .attr_in(q_attr),
    .valid_out(r_valid), .fragment(r_frag), .attr_out(r_attr), .idle(r_idle)
  );

  logic   px_valid;
  pixel_t px;
  frag_shader u_fs (
    .clk, .rst, .valid_in(r_valid), .fragment(r_frag), .attr_in(r_attr),
    .normal_read_addr, .normal, .material_read_addr, .material,
    .valid_out(px_valid), .pixel(px)
  );

  logic fb_target;
  framebuffer u_fb (
    .gpu_clk(clk), .rst, .valid_in(px_valid), .pixel(px), .clear(fb_clear), .swap(fb_switch),
    .ready(fb_ready), .target(fb_target), .vga_clk, .vga_rst, .hsync, .vsync, .rgb
  );

  // ---------------- idle detection ----------------
  logic [6:0] quiet;
  logic       any_valid;
  assign any_valid = f_valid | vs_valid | cl_valid | pd_valid | vp_valid | r_valid | px_valid | restart;
  always_ff @(posedge clk) begin
    if (rst || any_valid) quiet <= '0;
    else if (!quiet[6])   quiet <= quiet + 1'b1;
  end
  assign pipeline_idle = quiet[6] && f_done && q_empty && r_idle;
endmodule
