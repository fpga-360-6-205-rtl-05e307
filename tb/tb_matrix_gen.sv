// tb_matrix_gen: random camera orientations (axes from yaw and pitch) and
// positions; the 16 matrix entries are compared with a real-valued
// construction of the same view-projection matrix, and the 41-cycle latency
// is checked.
module tb_matrix_gen;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 50;
  localparam real SX = 0.75, SY = 1.0, NEAR = 0.5, FAR = 64.0;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  fvec3_t cam_pos = '0, vx = '0, vy = '0, vz = '0;
  mat4_t transform;
  int checks = 0, failures = 0, got = 0, cyc = 0, t_in = -1, t_out = -1;
  real ex [N][4][4];

  matrix_gen dut (.clk, .rst, .valid_in, .cam_pos, .vec_x(vx), .vec_y(vy), .vec_z(vz),
                  .valid_out, .transform);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      real yaw, pitch, X[3], Y[3], Z[3], p[3], A, B, d[3];
      yaw = real'($urandom % 6283) / 1000.0;
      pitch = real'($urandom % 3000) / 1000.0 - 1.5;
      X = '{$cos(yaw), 0.0, -$sin(yaw)};
      Y = '{-$sin(pitch) * $sin(yaw), $cos(pitch), -$sin(pitch) * $cos(yaw)};
      Z = '{$cos(pitch) * $sin(yaw), $sin(pitch), $cos(pitch) * $cos(yaw)};
      for (int c = 0; c < 3; c++) p[c] = (real'($urandom % 2001) - 1000.0) / 100.0;
      vx = '{x: r2f(X[0]), y: r2f(X[1]), z: r2f(X[2])};
      vy = '{x: r2f(Y[0]), y: r2f(Y[1]), z: r2f(Y[2])};
      vz = '{x: r2f(Z[0]), y: r2f(Z[1]), z: r2f(Z[2])};
      cam_pos = '{x: r2f(p[0]), y: r2f(p[1]), z: r2f(p[2])};
      X = '{f2r(vx.x), f2r(vx.y), f2r(vx.z)};
      Y = '{f2r(vy.x), f2r(vy.y), f2r(vy.z)};
      Z = '{f2r(vz.x), f2r(vz.y), f2r(vz.z)};
      p = '{f2r(cam_pos.x), f2r(cam_pos.y), f2r(cam_pos.z)};
      A = -(FAR + NEAR) / (FAR - NEAR);
      B = -2.0 * FAR * NEAR / (FAR - NEAR);
      d[0] = X[0]*p[0] + X[1]*p[1] + X[2]*p[2];
      d[1] = Y[0]*p[0] + Y[1]*p[1] + Y[2]*p[2];
      d[2] = Z[0]*p[0] + Z[1]*p[1] + Z[2]*p[2];
      for (int c = 0; c < 3; c++) begin
        ex[i][0][c] = SX * X[c]; ex[i][1][c] = SY * Y[c]; ex[i][2][c] = A * Z[c]; ex[i][3][c] = -Z[c];
      end
      ex[i][0][3] = -SX * d[0]; ex[i][1][3] = -SY * d[1]; ex[i][2][3] = -A * d[2] + B;
      ex[i][3][3] = d[2];
      valid_in = 1;
      if (t_in < 0) t_in = cyc;
      @(negedge clk);
    end
    valid_in = 0;
  end

  always @(posedge clk) if (valid_out && !rst) begin
    if (t_out < 0) t_out = cyc;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (fabs(f2r(transform[r][c]) - ex[got][r][c]) > 1e-5 * (1.0 + fabs(ex[got][r][c]))) begin
          failures++;
          if (failures < 5) $display("m%0d [%0d][%0d] %f vs %f", got, r, c, f2r(transform[r][c]), ex[got][r][c]);
        end
      end
    got++;
    if (got == N) begin
      checks++;
      if (t_out - t_in != 41) begin failures++; $display("latency %0d", t_out - t_in); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
