// tb_position_logic: gimbal-lock updates must give pos = a*Z after 8 cycles;
// free-mode updates must accumulate pos += x*X + y*Z after 26 cycles. The
// real-valued reference accumulates the same steps (relative error 1e-5).
module tb_position_logic;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, update = 0, cam_mode = 0, pos_valid;
  logic [31:0] x_inc = 0, y_inc = 0;
  fvec3_t vx = '0, vz = '0, pos;
  int checks = 0, failures = 0, cyc = 0;

  position_logic dut (.clk, .rst, .update, .cam_mode, .x_inc, .y_inc, .vec_x(vx), .vec_z(vz),
                      .pos, .pos_valid);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check_pos(input real e [3], input int lat, input int t0, input string m);
    real g [3];
    g = '{f2r(pos.x), f2r(pos.y), f2r(pos.z)};
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (fabs(g[k] - e[k]) > 1e-5 * (1.0 + fabs(e[k]))) begin
        failures++;
        $display("%s comp %0d: %f vs %f", m, k, g[k], e[k]);
      end
    end
    checks++;
    if (cyc - t0 != lat) begin failures++; $display("%s latency %0d", m, cyc - t0); end
  endtask

  initial begin
    real p [3], X [3], Z [3], a, dx, dz;
    int t0;
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (pos != fvec3_t'({32'h0, 32'h0, 32'h4080_0000})) failures++;
    for (int i = 0; i < 20; i++) begin
      real yw;
      yw = real'($urandom % 6283) / 1000.0;
      X = '{$cos(yw), 0.0, -$sin(yw)};
      Z = '{$sin(yw) * 0.8, 0.6, $cos(yw) * 0.8};
      vx = '{x: r2f(X[0]), y: r2f(X[1]), z: r2f(X[2])};
      vz = '{x: r2f(Z[0]), y: r2f(Z[1]), z: r2f(Z[2])};
      X = '{f2r(vx.x), f2r(vx.y), f2r(vx.z)};
      Z = '{f2r(vz.x), f2r(vz.y), f2r(vz.z)};
      cam_mode = (i >= 5);
      if (!cam_mode) begin
        a = 1.0 + real'($urandom % 600) / 100.0;
        x_inc = r2f(a); y_inc = r2f(a);
        a = f2r(x_inc);
        for (int k = 0; k < 3; k++) p[k] = a * Z[k];
      end else begin
        dx = (real'($urandom % 7) - 3.0) * 5.0 / 256.0;
        dz = (real'($urandom % 7) - 3.0) * 5.0 / 256.0;
        x_inc = r2f(dx); y_inc = r2f(dz);
        for (int k = 0; k < 3; k++) p[k] = f2r(pos_k(k)) + dx * X[k] + dz * Z[k];
      end
      update = 1;
      t0 = cyc;
      @(negedge clk) update = 0;
      while (!pos_valid) @(negedge clk);
      check_pos(p, cam_mode ? 26 : 8, t0, cam_mode ? "free" : "gimbal");
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pos_k(input int k);
    return (k == 0) ? pos.x : (k == 1) ? pos.y : pos.z;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
