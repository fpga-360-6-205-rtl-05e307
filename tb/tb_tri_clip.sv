// tb_tri_clip: random triangles, some with a vertex outside the clip volume
// (|coordinate| > w or w <= 0), sent back to back and with gaps. Triangles
// fully inside must come out unchanged and in order; all others must be
// dropped and counted.
module tb_tri_clip;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int NT = 60;
  logic clk = 0, rst = 1, valid_in = 0, valid_out, dropped;
  fvec4_t vertex = '0, vertex_out;
  attr_t attr_in = '0, attr_out;
  int checks = 0, failures = 0, ndrop = 0, exp_drop = 0;
  fvec4_t exp_q [$];

  tri_clip dut (.clk, .rst, .valid_in, .vertex, .attr_in, .valid_out, .vertex_out, .attr_out, .dropped);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (dropped) ndrop++;
    if (valid_out) begin
      checks++;
      if (exp_q.size() == 0 || vertex_out != exp_q[0]) begin
        failures++;
        if (failures < 5) $display("unexpected vertex %h exp %h n=%0d", vertex_out, exp_q[0], exp_q.size());
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < NT; t++) begin
      fvec4_t v [3];
      bit ok;
      ok = 1;
      for (int i = 0; i < 3; i++) begin
        real w, x, y, z;
        w = 1.0 + real'($urandom % 100) / 10.0;
        x = (real'($urandom % 2001) - 1000.0) / 1000.0 * w;
        y = (real'($urandom % 2001) - 1000.0) / 1000.0 * w;
        z = (real'($urandom % 2001) - 1000.0) / 1000.0 * w;
        case ($urandom % 12)
          0: begin x = 1.01 * w; ok = 0; end
          1: begin y = -1.2 * w; ok = 0; end
          2: begin z = 2.0 * w; ok = 0; end
          3: begin w = -w; ok = 0; end
          default: ;
        endcase
        v[i] = '{x: r2f(x), y: r2f(y), z: r2f(z), w: r2f(w)};
      end
      if (ok) for (int i = 0; i < 3; i++) exp_q.push_back(v[i]);
      else exp_drop++;
      for (int i = 0; i < 3; i++) begin
        vertex = v[i]; attr_in = '{material: 12'(t), normal: 12'(i)};
        valid_in = 1;
        @(negedge clk);
        valid_in = 0;
        if (t % 3 == 0) repeat ($urandom % 3) @(negedge clk);
      end
    end
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d vertices missing", exp_q.size()); end
    checks++;
    if (ndrop != exp_drop || exp_drop == 0) begin failures++; $display("dropped %0d, expected %0d", ndrop, exp_drop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
