// tb_framebuffer: clears the buffers, writes pixels that must pass or fail
// the depth test (including back-to-back writes to one address that need the
// bypass), swaps frames and reads the picture back through the VGA scan-out,
// checking colours at 2x2-scaled positions, the clear colour, the length of
// the clearing period (one address per cycle) and that inputs are ignored
// while clearing.
module tb_framebuffer;
  import gfx_pkg::*;
  logic gpu_clk = 0, vga_clk = 0, rst = 1, vga_rst = 1;
  logic valid_in = 0, clear = 0, swap = 0, ready, target, hsync, vsync;
  pixel_t pixel = '0;
  logic [11:0] rgb;
  int checks = 0, failures = 0;

  framebuffer dut (.gpu_clk, .rst, .valid_in, .pixel, .clear, .swap, .ready, .target,
                   .vga_clk, .vga_rst, .hsync, .vsync, .rgb);
  always #5 gpu_clk = ~gpu_clk;
  always #20 vga_clk = ~vga_clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic put(input int x, input int y, input int z, input logic [11:0] c);
    pixel = '{x: 9'(x), y: 8'(y), z: 14'(z), rgb: c};
    valid_in = 1;
    @(negedge gpu_clk);
    valid_in = 0;
  endtask

  // colour seen on screen at frame pixel (x, y): sample the VGA output
  logic [9:0] hc_d, vc_d;
  logic [11:0] seen [4];
  int want_x [4] = '{5, 6, 7, 100};
  always @(posedge vga_clk) begin
    hc_d <= dut.hc;
    vc_d <= dut.vc;
    for (int i = 0; i < 4; i++)
      if (hc_d == 10'(2 * want_x[i] + 1) && vc_d == 10'(2 * 5 + 1)) seen[i] = rgb;
  end

  int clr_cycles;
  initial begin
    repeat (3) @(negedge gpu_clk);
    rst = 0;
    @(negedge vga_clk) vga_rst = 0;
    @(negedge gpu_clk);
    while (!ready) @(negedge gpu_clk);
    check(dut.depth[5*320+5] == 14'h3FFF && dut.frame0[5*320+5] == 12'h000, "cleared");
    put(5, 5, 100, 12'hF00);
    put(5, 5, 200, 12'h0F0);   // behind: rejected
    put(5, 5, 50, 12'h00F);    // in front, back to back: accepted
    put(6, 5, 16'h3FFE, 12'h0F0);
    put(7, 5, 16'h3FFF, 12'hFFF);  // equal to cleared depth: rejected
    repeat (3) @(negedge gpu_clk);
    check(dut.frame0[5*320+5] == 12'h00F, "depth test / bypass at (5,5)");
    check(dut.depth[5*320+5] == 14'd50, "depth stored at (5,5)");
    check(dut.frame0[5*320+6] == 12'h0F0, "(6,5) written");
    check(dut.frame0[5*320+7] == 12'h000, "(7,5) rejected");
    // swap: frame 0 is now displayed
    swap = 1;
    @(negedge gpu_clk) swap = 0;
    check(target == 1'b1, "target toggled");
    // clear the new target and time it
    clear = 1;
    @(negedge gpu_clk) clear = 0;
    clr_cycles = 1;
    put(9, 9, 1, 12'hABC);     // ignored while clearing
    clr_cycles++;
    while (!ready) begin @(negedge gpu_clk); clr_cycles++; end
    check(clr_cycles == 320 * 240 + 1, $sformatf("clear took %0d cycles", clr_cycles));
    check(dut.frame1[9*320+9] == 12'h000, "input ignored while clearing");
    check(dut.frame0[5*320+5] == 12'h00F, "displayed frame untouched by clear");
    // wait for one full VGA frame
    repeat (2) @(posedge dut.u_vga.frame_start);
    repeat (5) @(posedge vga_clk);
    check(seen[0] == 12'h00F, $sformatf("VGA (5,5) = %h", seen[0]));
    check(seen[1] == 12'h0F0, $sformatf("VGA (6,5) = %h", seen[1]));
    check(seen[2] == 12'h000, $sformatf("VGA (7,5) = %h", seen[2]));
    check(seen[3] == 12'h000, $sformatf("VGA (100,5) = %h", seen[3]));
    check(hl_max == 96, $sformatf("hsync low %0d clocks", hl_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sync pulse widths: hsync low for 96 pixel clocks
  int hlow = 0, hl_max = 0;
  always @(posedge vga_clk) if (!vga_rst) begin
    if (!hsync) hlow++;
    else begin
      if (hlow > hl_max) hl_max = hlow;
      hlow = 0;
    end
  end

  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
