// tb_fpga360_top: end-to-end test of the whole viewer. A behavioural XADC
// with joystick multiplexer answers the DRP reads; the test scene
// (tb_scene_pkg) is uploaded over the serial line and echoed back.
//  1. Sticks at rest: the camera orbits at (0, 0, 4) looking at the origin;
//     the rendered frame must show the near triangle at the centre, the
//     cube's front face and the background, and so must the VGA output.
//  2. Right stick pushed right: yaw grows, the camera moves round the orbit
//     and the next rendered frame must differ from the first in many pixels
//     while the centre still shows the near triangle (orbit centre).
//  3. btnr press: cam_mode must switch to free mode.
// Mechanisms counted, each must occur: echoed UART bytes, XADC sample pairs
// from both joysticks, control updates, camera position changes, clipped
// triangles, rejected samples, failed depth tests, frame switches and the
// mode switch. Reduced sizes: 8 clocks per UART bit, 150,000-cycle frames
// and control updates, 200-cycle XADC slots.
module tb_fpga360_top;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int CPB = 8, FRAME = 150_000;
  logic clk = 0, vga_clk = 0, rst = 1, btnr = 0, rx = 1, tx, hsync, vsync, ovf, mode, jsel;
  logic [11:0] rgb;
  logic [15:0] frames, di, do_data = 0;
  logic [6:0] daddr; logic den, dwe, drdy = 0;
  logic [11:0] joy [2][2];
  int checks = 0, failures = 0, div = 0;
  byte unsigned bytes [$];

  fpga360_top #(.FRAME_CYCLES(FRAME), .CLKS_PER_BIT(CPB), .SAMPLE_CYCLES(200),
                .UPDATE_CYCLES(FRAME)) dut (
    .gpu_clk(clk), .vga_clk, .rst, .btnr, .drp_daddr(daddr), .drp_den(den), .drp_dwe(dwe),
    .drp_di(di), .drp_do(do_data), .drp_drdy(drdy), .joystick_select(jsel), .uart_rx(rx),
    .uart_tx(tx), .hsync, .vsync, .rgb, .cam_mode(mode), .frames, .fifo_overflow(ovf));
  always #5 clk = ~clk;
  always #20 vga_clk = ~vga_clk;

  // XADC: a conversion every 26 cycles on the addressed channel
  always @(posedge clk) begin
    div <= (div == 25) ? 0 : div + 1;
    drdy <= (div == 25) && den && !dwe;
    if (div == 25) do_data <= {(daddr == 7'h13) ? joy[jsel][0] : joy[jsel][1], 4'h0};
  end

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // mechanism counters
  int n_clip = 0, n_reject = 0, n_depth_fail = 0, n_switch = 0, n_echo = 0;
  int n_pair [2] = '{0, 0};
  int n_update = 0, n_move = 0, n_mode = 0;
  logic mode_q = 0;
  fvec3_t pos_q = '0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_graphics.cl_dropped) n_clip++;
    if (dut.u_graphics.u_raster.b_valid && dut.u_graphics.u_raster.b_neg) n_reject++;
    if (dut.u_graphics.u_fb.s1_valid && !dut.u_graphics.u_fb.pass) n_depth_fail++;
    if (dut.u_graphics.fb_switch) n_switch++;
    if (dut.u_control.s_valid) n_pair[dut.u_control.s_joy]++;
    if (dut.u_control.u_msr.update) n_update++;
    if (dut.u_control.cam_pos != pos_q) n_move++;
    if (mode != mode_q) n_mode++;
    pos_q <= dut.u_control.cam_pos; mode_q <= mode;
  end

  // serial receiver for the echo: every byte must come back unchanged
  int n_echo_bad = 0;
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      if (!tx || n_echo >= bytes.size() || b != bytes[n_echo]) n_echo_bad++;
      n_echo++;
    end
  end

  logic [11:0] seen;
  logic [9:0] hc_d, vc_d;
  always @(posedge vga_clk) begin
    hc_d <= dut.u_graphics.u_fb.hc;
    vc_d <= dut.u_graphics.u_fb.vc;
    if (hc_d == 10'(2 * 192) && vc_d == 10'(2 * 120)) seen = rgb;
  end

  function automatic logic [11:0] fb_pixel(input int x, input int y);
    return dut.u_graphics.u_fb.target ? dut.u_graphics.u_fb.frame1[y*320+x]
                                      : dut.u_graphics.u_fb.frame0[y*320+x];
  endfunction

  task automatic wait_rendered();
    int f0;
    f0 = frames;
    while (frames == f0) @(negedge clk);
    repeat (100) @(negedge clk);
    while (!dut.u_graphics.pipeline_idle) @(negedge clk);
  endtask

  logic [11:0] snap [320*240];
  initial begin
    int diff;
    logic [31:0] px0;
    joy = '{'{12'h400, 12'h400}, '{12'h400, 12'h400}};
    tb_scene_pkg::build(bytes);
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (bytes[i]) begin
      rx = 0; repeat (CPB) @(negedge clk);
      for (int b = 0; b < 8; b++) begin rx = bytes[i][b]; repeat (CPB) @(negedge clk); end
      rx = 1; repeat (CPB) @(negedge clk);
    end
    repeat (2 * CPB) @(negedge clk);
    // 1. camera at rest
    wait_rendered();
    check(fb_pixel(160, 120) == tb_scene_pkg::RGB_TRI, $sformatf("centre %h", fb_pixel(160, 120)));
    check(fb_pixel(192, 120) == tb_scene_pkg::RGB_CUBE, $sformatf("cube face %h", fb_pixel(192, 120)));
    check(fb_pixel(110, 120) == tb_scene_pkg::RGB_BG, $sformatf("background %h", fb_pixel(110, 120)));
    for (int i = 0; i < 320 * 240; i++) snap[i] = fb_pixel(i % 320, i / 320);
    wait_rendered();
    repeat (2) @(posedge dut.u_graphics.u_fb.u_vga.frame_start);
    repeat (5) @(posedge vga_clk);
    check(seen == tb_scene_pkg::RGB_CUBE, $sformatf("VGA cube %h", seen));
    // 2. turn: right stick fully right
    px0 = dut.u_control.cam_pos.x;
    joy[1][0] = 12'hFFF;
    while (dut.u_control.yaw < 12'd45) @(negedge clk);
    joy[1][0] = 12'h400;
    repeat (60) @(negedge clk);
    check(dut.u_control.cam_pos.x != px0, "camera did not move");
    check(f2r(dut.u_control.cam_pos.x) > 0.2, $sformatf("camera x %f", f2r(dut.u_control.cam_pos.x)));
    wait_rendered();
    diff = 0;
    for (int i = 0; i < 320 * 240; i++) if (snap[i] != fb_pixel(i % 320, i / 320)) diff++;
    check(diff > 500, $sformatf("only %0d pixels changed after turning", diff));
    check(fb_pixel(160, 120) == tb_scene_pkg::RGB_TRI, "centre after turning");
    // 3. mode switch
    btnr = 1; repeat (10) @(negedge clk); btnr = 0;
    repeat (10) @(negedge clk);
    check(mode == 1, "btnr did not switch to free mode");
    check(n_echo == bytes.size() && n_echo_bad == 0,
          $sformatf("echoed %0d of %0d bytes, %0d wrong", n_echo, bytes.size(), n_echo_bad));
    check(n_pair[0] > 0 && n_pair[1] > 0, "joystick pairs");
    check(n_update > 2, "control updates");
    check(n_move > 0, "camera moves");
    check(n_clip > 0, "no triangle clipped");
    check(n_reject > 0, "no sample rejected");
    check(n_depth_fail > 0, "no depth test failed");
    check(n_switch > 2, "frame switches");
    check(n_mode == 1, "mode switches");
    check(!ovf, "FIFO overflow");
    $display("echo %0d, pairs %0d/%0d, updates %0d, moves %0d, clipped %0d, rejected %0d, depth fails %0d, switches %0d, changed pixels %0d",
             n_echo, n_pair[0], n_pair[1], n_update, n_move, n_clip, n_reject, n_depth_fail, n_switch, diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #150ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
