// tb_vertex_shader: random 4x4 transforms and vertices, one per cycle,
// compared with a real-valued matrix product (relative tolerance 1e-5), plus
// the 25-cycle latency and the attribute delay.
module tb_vertex_shader;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 100;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  mat4_t transform;
  fvec3_t position = '0;
  attr_t attr_in = '0, attr_out;
  fvec4_t clip;
  int checks = 0, failures = 0, got = 0, cyc = 0, t_in = -1, t_out = -1;
  real m [4][4];
  real ex [N][4];

  vertex_shader dut (.clk, .rst, .transform, .valid_in, .position, .attr_in,
                     .valid_out, .clip, .attr_out);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real rr();
    return (real'($urandom % 20001) - 10000.0) / 1000.0;
  endfunction

  initial begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        m[r][c] = rr();
        transform[r][c] = r2f(m[r][c]);
        m[r][c] = f2r(transform[r][c]);
      end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      real v [4];
      v[0] = rr(); v[1] = rr(); v[2] = rr(); v[3] = 1.0;
      position = '{x: r2f(v[0]), y: r2f(v[1]), z: r2f(v[2])};
      v[0] = f2r(position.x); v[1] = f2r(position.y); v[2] = f2r(position.z);
      for (int r = 0; r < 4; r++) begin
        ex[i][r] = 0.0;
        for (int c = 0; c < 4; c++) ex[i][r] += m[r][c] * v[c];
      end
      attr_in = '{material: 12'(i), normal: 12'(i + 7)};
      valid_in = 1;
      if (t_in < 0) t_in = cyc;
      @(negedge clk);
    end
    valid_in = 0;
  end

  always @(posedge clk) if (valid_out && !rst) begin
    real g [4];
    if (t_out < 0) t_out = cyc;
    g = '{f2r(clip.x), f2r(clip.y), f2r(clip.z), f2r(clip.w)};
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (fabs(g[r] - ex[got][r]) > 1e-5 * 400.0) begin
        failures++;
        if (failures < 5) $display("v%0d row %0d: %f vs %f", got, r, g[r], ex[got][r]);
      end
    end
    checks++;
    if (attr_out.material != 12'(got) || attr_out.normal != 12'(got + 7)) failures++;
    got++;
    if (got == N) begin
      checks++;
      if (t_out - t_in != 25) begin failures++; $display("latency %0d", t_out - t_in); end
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
