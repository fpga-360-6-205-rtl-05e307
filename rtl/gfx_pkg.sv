// gfx_pkg: screen constants, fixed-point formats and the packed records that
// travel between the graphics pipeline stages.
//
// Screen space is 320x240 (scaled 2x to 640x480 on output). The rasterizer
// works in 17-bit fixed point: x and y signed with XY_FRAC fractional bits,
// z unsigned in [0,1] with Z_FRAC fractional bits. The depth buffer keeps
// DEPTH_W bits of z. Index entries pack three 12-bit indices.
package gfx_pkg;

  localparam int SCREEN_W = 320;
  localparam int SCREEN_H = 240;
  localparam int FIX_W    = 17;
  localparam int XY_FRAC  = 7;
  localparam int Z_FRAC   = 16;
  localparam int DEPTH_W  = 14;
  localparam int COEF_W   = 26;   // barycentric coefficient width
  localparam int COEF_FRAC = 24;  // fractional bits of a coefficient

  typedef logic [11:0]        id_t;
  typedef logic signed [16:0] sfix_t;
  typedef logic [16:0]        ufix_t;

  // 4x4 transform, [row][column] of floats
  typedef logic [3:0][3:0][31:0] mat4_t;

  // one entry of the index buffer
  typedef struct packed {
    id_t material;
    id_t normal;
    id_t position;
  } index_t;

  typedef struct packed {
    logic [31:0] x;
    logic [31:0] y;
    logic [31:0] z;
  } fvec3_t;

  typedef struct packed {
    logic [31:0] x;
    logic [31:0] y;
    logic [31:0] z;
    logic [31:0] w;
  } fvec4_t;

  // per-vertex attributes carried alongside a position
  typedef struct packed {
    id_t material;
    id_t normal;
  } attr_t;

  // rasterizer fixed-point vertex
  typedef struct packed {
    sfix_t x;
    sfix_t y;
    ufix_t z;
  } fixvert_t;

  // rasterizer output: pixel position and interpolated depth
  typedef struct packed {
    ufix_t x;
    ufix_t y;
    ufix_t z;
  } fragment_t;

  // shaded pixel sent to the framebuffer
  typedef struct packed {
    logic [8:0]         x;
    logic [7:0]         y;
    logic [DEPTH_W-1:0] z;
    logic [11:0]        rgb;
  } pixel_t;

endpackage
