// tb_graphics_module: uploads the test scene (tb_scene_pkg) over the serial
// line, points the camera from (0,0,4) down the -z axis, lets the frame FSM
// render it and checks the finished frame: the occluding triangle at the
// centre, the cube's lit front face, the background colour, and the same
// three pixels on the VGA output after the buffers swap. It also counts the
// mechanisms involved (clipped triangle, back-face and outside rejections,
// depth-test failures, frame switches) and fails if any never happened.
// Reduced sizes: 8 clocks per UART bit and a 150,000-cycle frame period.
module tb_graphics_module;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int CPB = 8;
  localparam int FRAME = 150_000;
  logic clk = 0, vga_clk = 0, rst = 1, vga_rst = 1, rx = 1, tx, hsync, vsync, ovf;
  logic [11:0] rgb;
  logic [15:0] frames;
  fvec3_t cam_pos, vx, vy, vz;
  int checks = 0, failures = 0;

  graphics_module #(.FRAME_CYCLES(FRAME), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .vga_clk, .vga_rst, .cam_pos, .vec_x(vx), .vec_y(vy), .vec_z(vz),
    .uart_rx_in(rx), .uart_tx_out(tx), .hsync, .vsync, .rgb, .frames, .fifo_overflow(ovf));
  always #5 clk = ~clk;
  always #20 vga_clk = ~vga_clk;

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // mechanism counters
  int n_clip = 0, n_reject = 0, n_depth_fail = 0, n_switch = 0, n_frag = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.cl_dropped) n_clip++;
    if (dut.u_raster.b_valid && dut.u_raster.b_neg) n_reject++;
    if (dut.u_fb.s1_valid && !dut.u_fb.pass) n_depth_fail++;
    if (dut.fb_switch) n_switch++;
    if (dut.px_valid) n_frag++;
  end

  // VGA sampling at frame pixels
  int sx [3] = '{160, 192, 110};
  logic [11:0] seen [3];
  logic [9:0] hc_d, vc_d;
  always @(posedge vga_clk) begin
    hc_d <= dut.u_fb.hc;
    vc_d <= dut.u_fb.vc;
    for (int i = 0; i < 3; i++)
      if (hc_d == 10'(2 * sx[i]) && vc_d == 10'(2 * 120)) seen[i] = rgb;
  end

  function automatic logic [11:0] fb_pixel(input int x, input int y);
    return dut.u_fb.target ? dut.u_fb.frame1[y*320+x] : dut.u_fb.frame0[y*320+x];
  endfunction

  byte unsigned bytes [$];
  initial begin
    int f0;
    cam_pos = '{x: r2f(0.0), y: r2f(0.0), z: r2f(4.0)};
    vx = '{x: r2f(1.0), y: 0, z: 0};
    vy = '{x: 0, y: r2f(1.0), z: 0};
    vz = '{x: 0, y: 0, z: r2f(1.0)};
    tb_scene_pkg::build(bytes);
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge vga_clk) vga_rst = 0;
    foreach (bytes[i]) begin
      rx = 0; repeat (CPB) @(negedge clk);
      for (int b = 0; b < 8; b++) begin rx = bytes[i][b]; repeat (CPB) @(negedge clk); end
      rx = 1; repeat (CPB) @(negedge clk);
    end
    repeat (2 * CPB) @(negedge clk);
    // next frame start renders the full scene
    f0 = frames;
    while (frames == f0) @(negedge clk);
    repeat (100) @(negedge clk);
    while (!dut.pipeline_idle) @(negedge clk);
    check(fb_pixel(160, 120) == tb_scene_pkg::RGB_TRI, $sformatf("centre %h", fb_pixel(160, 120)));
    check(fb_pixel(192, 120) == tb_scene_pkg::RGB_CUBE, $sformatf("cube face %h", fb_pixel(192, 120)));
    check(fb_pixel(110, 120) == tb_scene_pkg::RGB_BG, $sformatf("background %h", fb_pixel(110, 120)));
    check(fb_pixel(121, 81) == tb_scene_pkg::RGB_CUBE, "cube corner");
    check(fb_pixel(119, 79) == tb_scene_pkg::RGB_BG, "outside cube corner");
    // after the next switch these pixels are on screen
    f0 = frames;
    while (frames == f0) @(negedge clk);
    repeat (2) @(posedge dut.u_fb.u_vga.frame_start);
    repeat (5) @(posedge vga_clk);
    check(seen[0] == tb_scene_pkg::RGB_TRI, $sformatf("VGA centre %h", seen[0]));
    check(seen[1] == tb_scene_pkg::RGB_CUBE, $sformatf("VGA cube %h", seen[1]));
    check(seen[2] == tb_scene_pkg::RGB_BG, $sformatf("VGA background %h", seen[2]));
    check(n_clip > 0, "no triangle clipped");
    check(n_reject > 0, "no sample rejected");
    check(n_depth_fail > 0, "no depth test failed");
    check(n_switch > 1, "no frame switch");
    check(!ovf, "FIFO overflow");
    $display("clipped %0d, rejected samples %0d, depth failures %0d, switches %0d, fragments %0d",
             n_clip, n_reject, n_depth_fail, n_switch, n_frag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
