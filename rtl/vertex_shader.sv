// vertex_shader: multiplies each vertex position (x, y, z, 1) by the 4x4
// transform, giving clip coordinates (x, y, z, w).
//
// Sixteen fp_mul units form every matrix-vector product in parallel and
// twelve fp_add units sum them as (p0 + p1) + (p2 + p3) per row, so a new
// vertex can enter every cycle. Latency is 7 + 9 + 9 = 25 cycles; the
// material and normal indices are delayed to match. The transform must be
// held stable while a frame is processed.
module vertex_shader
  import gfx_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  mat4_t  transform,
  input  logic   valid_in,
  input  fvec3_t position,
  input  attr_t  attr_in,
  output logic   valid_out,
  output fvec4_t clip,
  output attr_t  attr_out
);
  logic [31:0] vin [4];
  assign vin = '{position.x, position.y, position.z, fp_pkg::F_ONE};

  logic [31:0] prod [4][4];
  logic        pv   [4][4];
  logic [31:0] s1   [4][2];
  logic        sv1  [4][2];
  logic [31:0] row  [4];
  logic        rv   [4];

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      fp_mul u_mul (.clk, .rst, .valid_in, .a(transform[r][c]), .b(vin[c]),
                    .valid_out(pv[r][c]), .y(prod[r][c]));
    end
    for (genvar k = 0; k < 2; k++) begin : g_add1
      fp_add u_add (.clk, .rst, .valid_in(pv[r][2*k]), .a(prod[r][2*k]), .b(prod[r][2*k+1]),
                    .valid_out(sv1[r][k]), .y(s1[r][k]));
    end
    fp_add u_add2 (.clk, .rst, .valid_in(sv1[r][0]), .a(s1[r][0]), .b(s1[r][1]),
                   .valid_out(rv[r]), .y(row[r]));
  end

  delay_line #(.W($bits(attr_t)), .N(25)) u_attr (.clk, .d(attr_in), .q(attr_out));

  assign valid_out = rv[0];
  assign clip      = '{x: row[0], y: row[1], z: row[2], w: row[3]};
endmodule
