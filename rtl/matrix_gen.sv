// matrix_gen: builds the 4x4 world-to-clip transform from the camera.
//
// Inputs are the camera position p and its unit axis vectors X (right),
// Y (up) and Z (backwards: the camera looks along -Z). With view-space
// coordinates x_v = X.(v-p), y_v = Y.(v-p), z_v = Z.(v-p), the matrix rows are
//   row 0 = SX * [X, -X.p]            (x_c = SX x_v)
//   row 1 = SY * [Y, -Y.p]            (y_c = SY y_v)
//   row 2 = A  * [Z, -Z.p] + [0,0,0,B] (z_c = A z_v + B)
//   row 3 = [-Z, Z.p]                 (w_c = -z_v, the distance in front)
// a standard perspective projection. SX, SY, A and B encode a 90 degree
// vertical field of view, the 4:3 screen aspect and near/far planes at 0.5
// and 64; all four are this design's choices. The computation is a free-
// running pipeline (9 multiplies, then two rounds of adds for the dot
// products, 12 scaling multiplies and one add): latency 41 cycles, `valid`
// marks results of valid inputs.
module matrix_gen
  import gfx_pkg::*;
#(
  parameter logic [31:0] SX = 32'h3F40_0000,   // 0.75
  parameter logic [31:0] SY = 32'h3F80_0000,   // 1.0
  parameter logic [31:0] PA = 32'hBF82_0408,   // -(f+n)/(f-n)
  parameter logic [31:0] PB = 32'hBF81_0204    // -2fn/(f-n)
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   valid_in,
  input  fvec3_t cam_pos,
  input  fvec3_t vec_x,
  input  fvec3_t vec_y,
  input  fvec3_t vec_z,
  output logic   valid_out,
  output mat4_t  transform
);
  import fp_pkg::*;

  logic [31:0] ax [3][3];   // axis a (X, Y, Z), component c
  logic [31:0] pc [3];
  assign ax = '{'{vec_x.x, vec_x.y, vec_x.z}, '{vec_y.x, vec_y.y, vec_y.z},
                '{vec_z.x, vec_z.y, vec_z.z}};
  assign pc = '{cam_pos.x, cam_pos.y, cam_pos.z};

  // dot products a.p: 7 + 9 + 9 = 25 cycles
  logic [31:0] pr [3][3], s01 [3], p2d [3], dp [3];
  logic        prv [3][3], s01v [3], dpv [3];
  for (genvar a = 0; a < 3; a++) begin : g_dot
    for (genvar c = 0; c < 3; c++) begin : g_m
      fp_mul u_m (.clk, .rst, .valid_in, .a(ax[a][c]), .b(pc[c]), .valid_out(prv[a][c]), .y(pr[a][c]));
    end
    fp_add u_a1 (.clk, .rst, .valid_in(prv[a][0]), .a(pr[a][0]), .b(pr[a][1]), .valid_out(s01v[a]), .y(s01[a]));
    delay_line #(.W(32), .N(9)) u_d (.clk, .d(pr[a][2]), .q(p2d[a]));
    fp_add u_a2 (.clk, .rst, .valid_in(s01v[a]), .a(s01[a]), .b(p2d[a]), .valid_out(dpv[a]), .y(dp[a]));
  end

  // axes delayed to line up with the dot products
  logic [31:0] axd [3][3];
  for (genvar a = 0; a < 3; a++) begin : g_axd
    for (genvar c = 0; c < 3; c++) begin : g_c
      delay_line #(.W(32), .N(25)) u_d (.clk, .d(ax[a][c]), .q(axd[a][c]));
    end
  end

  // scaling of rows 0..2: [axis, -dot] times SX / SY / PA (7 cycles)
  logic [31:0] sc [3];
  logic [31:0] sin_ [3][4], sout [3][4];
  logic        sv [3][4];
  assign sc = '{SX, SY, PA};
  for (genvar a = 0; a < 3; a++) begin : g_scale
    for (genvar c = 0; c < 4; c++) begin : g_c
      assign sin_[a][c] = (c < 3) ? axd[a][c % 3] : f_neg(dp[a]);
      fp_mul u_m (.clk, .rst, .valid_in(dpv[0]), .a(sin_[a][c]), .b(sc[a]), .valid_out(sv[a][c]), .y(sout[a][c]));
    end
  end

  // row 2 translation gets + PB (9 cycles); everything else waits 9 cycles
  logic [31:0] t2;
  logic        t2v;
  fp_add u_b (.clk, .rst, .valid_in(sv[2][3]), .a(sout[2][3]), .b(PB), .valid_out(t2v), .y(t2));

  logic [31:0] rows_d [3][4];
  for (genvar a = 0; a < 3; a++) begin : g_rd
    for (genvar c = 0; c < 4; c++) begin : g_c
      delay_line #(.W(32), .N(9)) u_d (.clk, .d(sout[a][c]), .q(rows_d[a][c]));
    end
  end
  // row 3 = [-Z, Z.p], from the dot-product stage: 7 + 9 cycles more
  logic [31:0] r3 [4];
  for (genvar c = 0; c < 4; c++) begin : g_r3
    delay_line #(.W(32), .N(16)) u_d (.clk, .d((c < 3) ? f_neg(axd[2][c % 3]) : dp[2]), .q(r3[c]));
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      transform[0][c] = rows_d[0][c];
      transform[1][c] = rows_d[1][c];
      transform[2][c] = (c == 3) ? t2 : rows_d[2][c];
      transform[3][c] = r3[c];
    end
  end
  assign valid_out = t2v;
endmodule
