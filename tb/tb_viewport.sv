// tb_viewport: random normalised coordinates, one per cycle; screen
// coordinates compared with real-valued (x+1)*160, (1-y)*120, (z+1)/2 and the
// 16-cycle latency checked.
module tb_viewport;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 100;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  fvec4_t clip = '0;
  fvec3_t screen;
  attr_t attr_in = '0, attr_out;
  int checks = 0, failures = 0, got = 0, cyc = 0, t_in = -1, t_out = -1;
  real ex [N][4];

  viewport dut (.clk, .rst, .valid_in, .ndc(clip), .attr_in, .valid_out, .screen, .attr_out);
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
      ex[i] = '{(v[0] + 1.0) * 160.0, (1.0 - v[1]) * 120.0, (v[2] + 1.0) * 0.5, 0.0};
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
    g = '{f2r(screen.x), f2r(screen.y), f2r(screen.z), 0.0};
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (fabs(g[r] - ex[got][r]) > 1e-6 * (fabs(ex[got][r]) + 160.0)) begin
        failures++;
        if (failures < 5) $display("v%0d c%0d: %f vs %f", got, r, g[r], ex[got][r]);
      end
    end
    checks++;
    if (attr_out.material != 12'(got) || attr_out.normal != 12'(3 * got)) failures++;
    got++;
    if (got == N) begin
      checks++;
      if (t_out - t_in != 16) begin failures++; $display("latency %0d", t_out - t_in); end
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
