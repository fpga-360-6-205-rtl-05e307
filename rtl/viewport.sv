// viewport: maps normalised device coordinates to screen space.
//
//   x_s = (x + 1) * 160     -> [0, 320)
//   y_s = (1 - y) * 120     -> [0, 240), screen y grows downwards
//   z_s = (z + 1) * 0.5     -> [0, 1)
// with three fp_add and three fp_mul units (latency 9 + 7 = 16 cycles, one
// vertex per cycle). Flipping y so that +y is up on screen is this design's
// choice. The fourth coordinate (1/w) is not used further and is dropped, so
// the output is the 96-bit vertex that the primitive FIFO stores.
module viewport
  import gfx_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   valid_in,
  input  fvec4_t ndc,
  input  attr_t  attr_in,
  output logic   valid_out,
  output fvec3_t screen,
  output attr_t  attr_out
);
  import fp_pkg::*;
  localparam logic [31:0] F_160  = 32'h4320_0000;
  localparam logic [31:0] F_120  = 32'h42F0_0000;
  localparam logic [31:0] F_HALF = 32'h3F00_0000;

  logic [31:0] in_a [3], sum [3], scale [3], res [3];
  logic        sv [3], mv [3];
  assign in_a  = '{ndc.x, f_neg(ndc.y), ndc.z};
  assign scale = '{F_160, F_120, F_HALF};

  for (genvar i = 0; i < 3; i++) begin : g_axis
    fp_add u_add (.clk, .rst, .valid_in, .a(in_a[i]), .b(F_ONE), .valid_out(sv[i]), .y(sum[i]));
    fp_mul u_mul (.clk, .rst, .valid_in(sv[i]), .a(sum[i]), .b(scale[i]), .valid_out(mv[i]), .y(res[i]));
  end

  delay_line #(.W($bits(attr_t)), .N(16)) u_attr (.clk, .d(attr_in), .q(attr_out));

  assign valid_out = mv[0];
  assign screen    = '{x: res[0], y: res[1], z: res[2]};
endmodule
