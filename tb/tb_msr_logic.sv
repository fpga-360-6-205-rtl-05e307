// tb_msr_logic: random stick positions (including every threshold edge) and
// button presses between updates; yaw, pitch, cam_mode, the zoom distance
// and the free-mode increments are compared with a reference model at each
// `update` pulse, which must come every UPDATE_CYCLES cycles.
module tb_msr_logic;
  import tb_fp_pkg::*;
  localparam int UC = 30;
  logic clk = 0, rst = 1, sv = 0, sj = 0, btnr = 0, mode, update;
  logic [11:0] jx = 0, jy = 0, yaw, pitch;
  logic [31:0] x_inc, y_inc;
  int checks = 0, failures = 0, cyc = 0, last = -1, n = 0;
  logic [11:0] m_yaw = 0, m_pitch = 0, lx = 12'h400, ly = 12'h400, rx = 12'h400, ry = 12'h400;
  int m_zoom = 1024;
  logic m_mode = 0;
  logic [11:0] edges [14] = '{12'h000, 12'h0FF, 12'h100, 12'h1FF, 12'h200, 12'h2FF, 12'h300,
                              12'h500, 12'h501, 12'h600, 12'h601, 12'h700, 12'h701, 12'hFFF};

  msr_logic #(.UPDATE_CYCLES(UC)) dut (.clk, .rst, .sample_valid(sv), .sample_joystick(sj),
    .joy_x(jx), .joy_y(jy), .btnr, .cam_mode(mode), .yaw, .pitch, .x_inc, .y_inc, .update);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int step(input logic [11:0] v);
    if (v > 12'h700) return 15;
    if (v > 12'h600) return 10;
    if (v > 12'h500) return 5;
    if (v < 12'h100) return -15;
    if (v < 12'h200) return -10;
    if (v < 12'h300) return -5;
    return 0;
  endfunction

  function automatic logic [11:0] pick();
    return ($urandom % 2) ? edges[$urandom % 14] : 12'($urandom);
  endfunction

  // between updates: new samples for both sticks and sometimes a press
  always @(negedge clk) if (!rst && update) begin
    fork begin
      @(negedge clk); sv = 1; sj = 0; jx = pick(); jy = pick(); lx = jx; ly = jy;
      @(negedge clk); sj = 1; jx = pick(); jy = pick(); rx = jx; ry = jy;
      @(negedge clk); sv = 0;
      if ($urandom % 4 == 0) begin
        btnr = 1; repeat (3) @(negedge clk); btnr = 0; m_mode = ~m_mode;
      end
    end join_none
  end

  always @(posedge clk) if (!rst && update) begin
    m_yaw   = m_yaw + 12'(step(rx));
    m_pitch = m_pitch + 12'(step(ry));
    checks += 4;
    if (yaw != m_yaw || pitch != m_pitch) begin
      failures++; $display("upd %0d: yaw %h/%h pitch %h/%h", n, yaw, m_yaw, pitch, m_pitch); end
    if (mode != m_mode) begin failures++; $display("upd %0d: mode", n); end
    if (!m_mode) begin
      m_zoom = m_zoom - step(ly);
      if (m_zoom < 256) m_zoom = 256;
      if (m_zoom > 16384) m_zoom = 16384;
      if (f2r(x_inc) != m_zoom / 256.0 || f2r(y_inc) != m_zoom / 256.0) begin
        failures++; $display("upd %0d: zoom %f vs %f", n, f2r(x_inc), m_zoom / 256.0); end
    end else if (f2r(x_inc) != step(lx) / 256.0 || f2r(y_inc) != -step(ly) / 256.0) begin
      failures++; $display("upd %0d: free inc %f %f", n, f2r(x_inc), f2r(y_inc));
    end
    if (n > 0 && cyc - last != UC) begin failures++; $display("interval %0d", cyc - last); end
    last = cyc; n++;
    if (n == 400) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    checks++;
    if (f2r(x_inc) != 4.0 || mode != 0) failures++;
  end

  initial begin
    repeat (500 * UC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
