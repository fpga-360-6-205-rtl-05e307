// tb_rasterizer: drives triangles with integer screen coordinates through the
// rasterizer and compares the set of fragments with an exact integer
// reference (pixel centres, edges inclusive) and the depth with a real-valued
// barycentric reference. Also checks back-face rejection (same triangle with
// reversed winding gives no fragments) and the timing: one sample per cycle
// plus 10 setup cycles per triangle.
module tb_rasterizer;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1;
  logic valid_in = 0, ready, valid_out, idle;
  fvec3_t vertex = '0;
  attr_t attr_in = '0, attr_out;
  fragment_t fragment;
  int checks = 0, failures = 0;

  rasterizer dut (.clk, .rst, .valid_in, .ready, .vertex, .attr_in,
                  .valid_out, .fragment, .attr_out, .idle);
  always #5 clk = ~clk;

  // triangles: 4 triangles x 3 vertices (x, y, z)
  localparam int NT = 4;
  real tv [NT][3][3];
  bit  hit [NT][320*240];
  int  nexp [NT], ngot [NT];
  int  cur_tri = 0;
  int  accept_cyc [NT*3+1];
  int  nacc = 0, cyc = 0;

  function automatic longint edge2(input longint ax, ay, bx, by, cx, cy);
    return (bx - ax) * (cy - ay) - (by - ay) * (cx - ax);
  endfunction

  // reference coverage and depth; coordinates doubled so centres are integer
  task automatic ref_tri(input int t);
    longint x[3], y[3], f, e0, e1, e2;
    nexp[t] = 0;
    for (int i = 0; i < 3; i++) begin
      x[i] = longint'(tv[t][i][0] * 2.0);
      y[i] = longint'(tv[t][i][1] * 2.0);
    end
    f = edge2(x[0], y[0], x[1], y[1], x[2], y[2]);
    for (int py = 0; py < 240; py++)
      for (int px = 0; px < 320; px++) begin
        longint cx, cy;
        cx = 2 * px + 1; cy = 2 * py + 1;
        e0 = edge2(x[1], y[1], x[2], y[2], cx, cy);
        e1 = edge2(x[2], y[2], x[0], y[0], cx, cy);
        e2 = edge2(x[0], y[0], x[1], y[1], cx, cy);
        hit[t][py*320+px] = (f < 0) && e0 <= 0 && e1 <= 0 && e2 <= 0;
        if (hit[t][py*320+px]) nexp[t]++;
      end
  endtask

  function automatic real ref_z(input int t, input int px, input int py);
    real x[3], y[3], f, a, b, c, cx, cy;
    for (int i = 0; i < 3; i++) begin x[i] = tv[t][i][0]; y[i] = tv[t][i][1]; end
    cx = px + 0.5; cy = py + 0.5;
    f = (x[1]-x[0])*(y[2]-y[0]) - (y[1]-y[0])*(x[2]-x[0]);
    a = ((x[2]-x[1])*(cy-y[1]) - (y[2]-y[1])*(cx-x[1])) / f;
    b = ((x[0]-x[2])*(cy-y[2]) - (y[0]-y[2])*(cx-x[2])) / f;
    c = ((x[1]-x[0])*(cy-y[0]) - (y[1]-y[0])*(cx-x[0])) / f;
    return a * tv[t][0][2] + b * tv[t][1][2] + c * tv[t][2][2];
  endfunction

  initial begin
    // clockwise on screen (y down) = front facing
    tv[0] = '{'{10.0, 10.0, 0.25}, '{40.0, 50.0, 0.75}, '{60.0, 20.0, 0.5}};
    tv[1] = '{'{10.0, 10.0, 0.25}, '{60.0, 20.0, 0.5}, '{40.0, 50.0, 0.75}};  // back face
    tv[2] = '{'{300.0, 200.0, 0.1}, '{310.0, 239.0, 0.1}, '{319.0, 230.0, 0.9}};
    tv[3] = '{'{100.0, 100.0, 0.6}, '{100.0, 100.0, 0.6}, '{140.0, 100.0, 0.6}}; // degenerate
    for (int t = 0; t < NT; t++) begin ref_tri(t); ngot[t] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < 3; i++) begin
        vertex = '{x: r2f(tv[t][i][0]), y: r2f(tv[t][i][1]), z: r2f(tv[t][i][2])};
        attr_in = '{material: 12'(t), normal: 12'(10 + t)};
        valid_in = 1;
        @(posedge clk);
        while (!ready) @(posedge clk);
        accept_cyc[nacc++] = cyc;
        @(negedge clk);
      end
    valid_in = 0;
    @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (ngot[t] != nexp[t]) begin
        failures++;
        $display("triangle %0d: %0d fragments, expected %0d", t, ngot[t], nexp[t]);
      end
    end
    // setup plus one cycle per bounding-box pixel: 10 + 51*41 for triangle 0
    checks++;
    if (accept_cyc[3] - accept_cyc[0] != 10 + 51 * 41) begin
      failures++;
      $display("triangle 0 took %0d cycles", accept_cyc[3] - accept_cyc[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid_out && !rst) begin
      int t, px, py;
      real zr;
      t = int'(attr_out.material);
      px = int'(fragment.x); py = int'(fragment.y);
      checks++;
      if (t >= NT || attr_out.normal != 12'(10 + t) || !hit[t][py*320+px]) begin
        failures++;
        if (failures < 6) $display("unexpected fragment t%0d (%0d,%0d)", t, px, py);
      end else begin
        ngot[t]++;
        zr = ref_z(t, px, py) * 65536.0;
        if (fabs(real'(fragment.z) - zr) > 3.0) begin
          failures++;
          if (failures < 6) $display("depth t%0d (%0d,%0d) %0d vs %f", t, px, py, fragment.z, zr);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
