// tb_vga_timing: runs two whole 640x480 frames and measures the line and
// frame periods, the active-pixel count, the position and width of both
// sync pulses and the frame_start spacing.
module tb_vga_timing;
  logic clk = 0, rst = 1, hs, vs, act, fs;
  logic [9:0] hc, vc;
  int checks = 0, failures = 0, cyc = 0;
  int act_n = 0, hs_n = 0, vs_n = 0, fs_last = -1, fs_n = 0, hs_fall = -1;

  vga_timing dut (.clk, .rst, .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs), .active(act),
                  .frame_start(fs));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    logic hs_q = 1, vs_q = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2 * 800 * 525) begin
      @(posedge clk);
      #1;
      if (act) act_n++;
      if (!hs) hs_n++;
      if (!vs) vs_n++;
      if (hs_q && !hs) begin
        chk(hc == 656, $sformatf("hsync falls at %0d", hc));
        if (hs_fall >= 0) chk(cyc - hs_fall == 800, "line period");
        hs_fall = cyc;
      end
      if (vs_q && !vs) chk(vc == 490 && hc == 0, $sformatf("vsync falls at line %0d", vc));
      if (fs) begin
        if (fs_last >= 0) chk(cyc - fs_last == 420000, "frame period");
        fs_last = cyc; fs_n++;
      end
      chk(act == (hc < 640 && vc < 480), "active");
      hs_q = hs; vs_q = vs;
      cyc++;
    end
    chk(act_n == 2 * 640 * 480, $sformatf("active count %0d", act_n));
    chk(hs_n == 2 * 525 * 96, $sformatf("hsync low %0d", hs_n));
    chk(vs_n == 2 * 2 * 800, $sformatf("vsync low %0d", vs_n));
    chk(fs_n == 2, "frame starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
