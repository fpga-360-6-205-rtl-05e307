// tb_frag_shader: random fragments with random unit normals and material
// colours held in behavioural one-cycle memories. Each pixel's colour is
// compared with a real-valued evaluation of
// floor(15 * m * min(1, max(L.n, 0) + 0.1)) (a difference of one is accepted
// only next to an integer boundary), position and 14-bit depth are checked,
// and so is the 43-cycle latency at one fragment per cycle.
module tb_frag_shader;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 200;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  fragment_t fragment = '0;
  attr_t attr_in = '0;
  logic [10:0] na;
  logic [4:0] ma;
  fvec3_t normal, material;
  pixel_t pixel;
  fvec3_t nmem [2048], mmem [32];
  real nr [2048][3], mr [32][3];
  real lx, ly, lz;
  int checks = 0, failures = 0, got = 0, cyc = 0, t_in = -1, t_out = -1;
  real ex [N][3];
  pixel_t exp_pix [N];

  frag_shader dut (.clk, .rst, .valid_in, .fragment, .attr_in, .normal_read_addr(na),
                   .normal, .material_read_addr(ma), .material, .valid_out, .pixel);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    normal <= nmem[na];
    material <= mmem[ma];
    cyc <= cyc + 1;
  end

  function automatic real minr(input real a, input real b); return a < b ? a : b; endfunction
  function automatic real maxr(input real a, input real b); return a > b ? a : b; endfunction

  initial begin
    lx = 1.0 / $sqrt(14.0); ly = 2.0 / $sqrt(14.0); lz = 3.0 / $sqrt(14.0);
    for (int i = 0; i < 2048; i++) begin
      real x, y, z, l;
      x = real'($urandom % 2001) - 1000.0; y = real'($urandom % 2001) - 1000.0;
      z = real'($urandom % 2001) - 1000.0;
      if (i < 2) begin x = 1.0; y = 2.0; z = 3.0; end           // facing the light: clamps to 1
      l = $sqrt(x*x + y*y + z*z) + 1e-9;
      nmem[i] = '{x: r2f(x/l), y: r2f(y/l), z: r2f(z/l)};
      nr[i] = '{f2r(nmem[i].x), f2r(nmem[i].y), f2r(nmem[i].z)};
    end
    for (int i = 0; i < 32; i++) begin
      mmem[i] = '{x: r2f(real'($urandom % 1001) / 1000.0), y: r2f(real'($urandom % 1001) / 1000.0),
                  z: r2f(real'($urandom % 1001) / 1000.0)};
      mr[i] = '{f2r(mmem[i].x), f2r(mmem[i].y), f2r(mmem[i].z)};
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      int n, m;
      real it;
      n = (i < 4) ? i % 2 : $urandom % 2048;
      m = $urandom % 32;
      fragment = '{x: 17'($urandom % 320), y: 17'($urandom % 240), z: 17'($urandom % 65536)};
      if (i == 5) fragment.z = 17'h10000;
      attr_in = '{material: 12'(m), normal: 12'(n)};
      it = minr(1.0, maxr(lx*nr[n][0] + ly*nr[n][1] + lz*nr[n][2], 0.0) + 0.1);
      for (int c = 0; c < 3; c++) ex[i][c] = 15.0 * mr[m][c] * it;
      exp_pix[i] = '{x: fragment.x[8:0], y: fragment.y[7:0],
                     z: fragment.z[16] ? 14'h3FFF : fragment.z[15:2], rgb: 12'h0};
      valid_in = 1;
      if (t_in < 0) t_in = cyc;
      @(negedge clk);
    end
    valid_in = 0;
  end

  always @(posedge clk) if (valid_out && !rst) begin
    logic [3:0] ch [3];
    if (t_out < 0) t_out = cyc;
    ch = '{pixel.rgb[11:8], pixel.rgb[7:4], pixel.rgb[3:0]};
    for (int c = 0; c < 3; c++) begin
      int e;
      e = int'($floor(ex[got][c]));
      checks++;
      if (!(int'(ch[c]) == e ||
            ((ex[got][c] - $floor(ex[got][c]) < 1e-3 || $ceil(ex[got][c]) - ex[got][c] < 1e-3) &&
             (int'(ch[c]) - e == 1 || e - int'(ch[c]) == 1)))) begin
        failures++;
        if (failures < 6) $display("frag %0d ch %0d: %0d vs %f", got, c, ch[c], ex[got][c]);
      end
    end
    checks++;
    if (pixel.x != exp_pix[got].x || pixel.y != exp_pix[got].y || pixel.z != exp_pix[got].z) begin
      failures++;
      $display("frag %0d position/depth", got);
    end
    got++;
    if (got == N) begin
      checks++;
      if (t_out - t_in != 43) begin failures++; $display("latency %0d", t_out - t_in); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
