// frag_shader: flat directional lighting of each fragment.
//
// For every fragment it reads the triangle's normal and material colour from
// the model memory (one cycle), then computes
//   intensity = min(1, max(light . normal, 0) + 0.1)
//   channel   = floor(intensity * 15 * material_channel), clamped to 0..15
// with floating-point units: three multiplies and two adds for the dot
// product, one add for the 0.1 ambient term, and three multiplies each for
// the x15 scaling (done in parallel with the dot product) and the final
// product. The result is a 12-bit RGB (4 bits per channel) pixel with the
// fragment's position and its depth cut to 14 bits. LIGHT_DIR (a unit
// vector) and the 4-bit quantisation by floor are this design's choices.
// One fragment per cycle, latency 43 cycles.
module frag_shader
  import gfx_pkg::*;
#(
  parameter logic [31:0] LIGHT_X = 32'h3E88_D677,  // (1, 2, 3) / sqrt(14)
  parameter logic [31:0] LIGHT_Y = 32'h3F08_D677,
  parameter logic [31:0] LIGHT_Z = 32'h3F4D_41B3
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      valid_in,
  input  fragment_t fragment,
  input  attr_t     attr_in,
  output logic [10:0] normal_read_addr,
  input  fvec3_t    normal,
  output logic [4:0]  material_read_addr,
  input  fvec3_t    material,
  output logic      valid_out,
  output pixel_t    pixel
);
  import fp_pkg::*;
  localparam logic [31:0] F_TENTH   = 32'h3DCC_CCCD;
  localparam logic [31:0] F_FIFTEEN = 32'h4170_0000;
  localparam int unsigned LAT = 43;

  assign normal_read_addr   = attr_in.normal[10:0];
  assign material_read_addr = attr_in.material[4:0];

  logic v1;
  always_ff @(posedge clk) v1 <= rst ? 1'b0 : valid_in;

  // dot product and material scaling
  logic [31:0] nv [3], lv [3], mv [3], p [3], m15 [3];
  logic        pv [3], m15v [3];
  assign nv = '{normal.x, normal.y, normal.z};
  assign lv = '{LIGHT_X, LIGHT_Y, LIGHT_Z};
  assign mv = '{material.x, material.y, material.z};
  for (genvar i = 0; i < 3; i++) begin : g_mul1
    fp_mul u_nl  (.clk, .rst, .valid_in(v1), .a(nv[i]), .b(lv[i]), .valid_out(pv[i]), .y(p[i]));
    fp_mul u_m15 (.clk, .rst, .valid_in(v1), .a(mv[i]), .b(F_FIFTEEN), .valid_out(m15v[i]), .y(m15[i]));
  end

  logic [31:0] s01, p2_d, dot;
  logic        s01v, dotv;
  fp_add u_add1 (.clk, .rst, .valid_in(pv[0]), .a(p[0]), .b(p[1]), .valid_out(s01v), .y(s01));
  delay_line #(.W(32), .N(9)) u_p2 (.clk, .d(p[2]), .q(p2_d));
  fp_add u_add2 (.clk, .rst, .valid_in(s01v), .a(s01), .b(p2_d), .valid_out(dotv), .y(dot));

  // max(dot, 0) + 0.1
  logic [31:0] dot_pos, lit0, lit;
  logic        lit0v, outv [3];
  assign dot_pos = dot[31] ? F_ZERO : dot;
  fp_add u_amb (.clk, .rst, .valid_in(dotv), .a(dot_pos), .b(F_TENTH), .valid_out(lit0v), .y(lit0));
  assign lit = (lit0[30:0] > F_ONE[30:0]) ? F_ONE : lit0;   // min(., 1), lit0 > 0

  logic [31:0] m15_d [3], col [3];
  for (genvar i = 0; i < 3; i++) begin : g_mul2
    delay_line #(.W(32), .N(27)) u_md (.clk, .d(m15[i]), .q(m15_d[i]));
    fp_mul u_col (.clk, .rst, .valid_in(lit0v), .a(lit), .b(m15_d[i]), .valid_out(outv[i]), .y(col[i]));
  end

  // position and depth travel alongside
  fragment_t frag_d;
  delay_line #(.W($bits(fragment_t)), .N(LAT - 1)) u_frag (.clk, .d(fragment), .q(frag_d));

  function automatic logic [3:0] to_nibble(input logic [31:0] f);
    logic signed [31:0] v;
    v = f_to_fixed(f, 0, 8);
    if (v < 0) return 4'd0;
    if (v > 15) return 4'd15;
    return v[3:0];
  endfunction

  always_ff @(posedge clk) begin
    valid_out <= rst ? 1'b0 : outv[0];
    pixel.x   <= frag_d.x[8:0];
    pixel.y   <= frag_d.y[7:0];
    pixel.z   <= frag_d.z[16] ? '1 : frag_d.z[15 -: DEPTH_W];
    pixel.rgb <= {to_nibble(col[0]), to_nibble(col[1]), to_nibble(col[2])};
  end
endmodule
