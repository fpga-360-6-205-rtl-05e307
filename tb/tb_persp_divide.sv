// tb_persp_divide: random clip-space vertices with w > 0, one per cycle;
// outputs compared with real-valued x/w, y/w, z/w, 1/w (relative 1e-6) and
// the 30-cycle latency checked.
module tb_persp_divide;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 100;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  fvec4_t clip = '0, ndc;
  attr_t attr_in = '0, attr_out;
  int checks = 0, failures = 0, got = 0, cyc = 0, t_in = -1, t_out = -1;
  real ex [N][4];

  persp_divide dut (.clk, .rst, .valid_in, .clip, .attr_in, .valid_out, .ndc, .attr_out);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real rr();
    return (real'($urandom % 20001) - 10000.0) / 1000.0;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      real v [4];
      v[0] = rr(); v[1] = rr(); v[2] = rr(); v[3] = 0.05 + real'($urandom % 1000) / 50.0;
      clip = '{x: r2f(v[0]), y: r2f(v[1]), z: r2f(v[2]), w: r2f(v[3])};
      v = '{f2r(clip.x), f2r(clip.y), f2r(clip.z), f2r(clip.w)};
      ex[i] = '{v[0] / v[3], v[1] / v[3], v[2] / v[3], 1.0 / v[3]};
      attr_in = '{material: 12'(i), normal: 12'(3 * i)};
      valid_in = 1;
      if (t_in < 0) t_in = cyc;
      @(negedge clk);
    end
    valid_in = 0;
  end

  always @(posedge clk) if (valid_out && !rst) begin
    real g [4];
    if (t_out < 0) t_out = cyc;
    g = '{f2r(ndc.x), f2r(ndc.y), f2r(ndc.z), f2r(ndc.w)};
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (fabs(g[r] - ex[got][r]) > 1e-6 * fabs(ex[got][r]) + 1e-30) begin
        failures++;
        if (failures < 5) $display("v%0d c%0d: %f vs %f", got, r, g[r], ex[got][r]);
      end
    end
    checks++;
    if (attr_out.material != 12'(got) || attr_out.normal != 12'(3 * got)) failures++;
    got++;
    if (got == N) begin
      checks++;
      if (t_out - t_in != 30) begin failures++; $display("latency %0d", t_out - t_in); end
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
