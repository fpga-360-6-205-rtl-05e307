// tb_dir_vector: random yaw/pitch pairs, one per cycle; the nine vector
// components are compared with the real-valued formulas (absolute error
// below 2e-6) and the 9-cycle latency is checked.
module tb_dir_vector;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 200;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  logic [11:0] yaw = 0, pitch = 0;
  fvec3_t vx, vy, vz;
  int checks = 0, failures = 0, got = 0, cyc = 0, t_in = -1, t_out = -1;
  real ex [N][9];

  dir_vector dut (.clk, .rst, .valid_in, .yaw, .pitch, .valid_out, .vec_x(vx), .vec_y(vy), .vec_z(vz));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      real y, p;
      yaw = (i == 0) ? 12'h000 : (i == 1) ? 12'h400 : 12'($urandom);
      pitch = (i == 0) ? 12'h000 : (i == 1) ? 12'hC00 : 12'($urandom);
      y = real'(yaw) * PI / 2048.0; p = real'(pitch) * PI / 2048.0;
      ex[i] = '{$cos(y), 0.0, -$sin(y),
                -$sin(p) * $sin(y), $cos(p), -$sin(p) * $cos(y),
                $cos(p) * $sin(y), $sin(p), $cos(p) * $cos(y)};
      valid_in = 1;
      if (t_in < 0) t_in = cyc;
      @(negedge clk);
    end
    valid_in = 0;
  end

  always @(posedge clk) if (valid_out && !rst) begin
    real g [9];
    if (t_out < 0) t_out = cyc;
    g = '{f2r(vx.x), f2r(vx.y), f2r(vx.z), f2r(vy.x), f2r(vy.y), f2r(vy.z),
          f2r(vz.x), f2r(vz.y), f2r(vz.z)};
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (fabs(g[k] - ex[got][k]) > 2e-6) begin
        failures++;
        if (failures < 5) $display("pair %0d comp %0d: %f vs %f", got, k, g[k], ex[got][k]);
      end
    end
    got++;
    if (got == N) begin
      checks++;
      if (t_out - t_in != 9) begin failures++; $display("latency %0d", t_out - t_in); end
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
