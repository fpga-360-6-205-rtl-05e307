// tb_control_module: the control path from DRP reads to camera position.
// A behavioural XADC and joystick multiplexer supply stick positions. With
// the sticks at rest the camera sits at (0, 0, 4) looking at the origin;
// pushing the right stick right turns yaw by 15 per update and the camera
// must stay on the orbit pos = zoom * Z; pulling the left stick back zooms
// out by 15/256 per update; after a btnr press (free mode) pushing the left
// stick up must move the camera by 15/256 along -Z each update. Positions are
// checked after every update against values computed from yaw/pitch with
// real arithmetic.
module tb_control_module;
  import gfx_pkg::*;
  import tb_fp_pkg::*;
  localparam int SC = 20, UC = 400;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst = 1, btnr = 0;
  logic [6:0] daddr; logic den, dwe, drdy = 0, jsel, mode;
  logic [15:0] di, do_data = 0;
  logic [11:0] yaw, pitch;
  fvec3_t pos, vx, vy, vz;
  logic [11:0] joy [2][2];
  int checks = 0, failures = 0, div = 0;

  control_module #(.SAMPLE_CYCLES(SC), .UPDATE_CYCLES(UC)) dut (.clk, .rst, .btnr,
    .drp_daddr(daddr), .drp_den(den), .drp_dwe(dwe), .drp_di(di), .drp_do(do_data),
    .drp_drdy(drdy), .joystick_select(jsel), .cam_mode(mode), .yaw, .pitch, .cam_pos(pos),
    .vec_x(vx), .vec_y(vy), .vec_z(vz));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    div <= (div == 4) ? 0 : div + 1;
    drdy <= (div == 4);
    if (div == 4) do_data <= {(daddr == 7'h13) ? joy[jsel][0] : joy[jsel][1], 4'h0};
  end

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic bit near(input logic [31:0] f, input real e);
    return fabs(f2r(f) - e) < 1e-4;
  endfunction

  // waits for the next update and for the position computed from it
  task automatic next_update();
    @(posedge dut.update);
    repeat (45) @(negedge clk);
  endtask

  task automatic chk_orbit(input real zoom, input string m);
    real y, p;
    y = real'(yaw) * PI / 2048.0; p = real'(pitch) * PI / 2048.0;
    chk(near(vz.x, $cos(p) * $sin(y)) && near(vz.y, $sin(p)) && near(vz.z, $cos(p) * $cos(y)),
        {m, " Z axis"});
    chk(near(pos.x, zoom * f2r(vz.x)) && near(pos.y, zoom * f2r(vz.y)) &&
        near(pos.z, zoom * f2r(vz.z)), $sformatf("%s orbit %f %f %f", m, f2r(pos.x), f2r(pos.y), f2r(pos.z)));
  endtask

  initial begin
    real zoom, px, py, pz;
    logic [11:0] y0;
    joy = '{'{12'h400, 12'h400}, '{12'h400, 12'h400}};
    repeat (3) @(negedge clk);
    rst = 0;
    next_update();
    chk(yaw == 0 && pitch == 0 && mode == 0, "rest angles");
    chk(near(pos.x, 0.0) && near(pos.y, 0.0) && near(pos.z, 4.0), "rest position");
    // right stick fully right: yaw +15 per update
    joy[1][0] = 12'hFFF;
    next_update(); next_update();
    for (int i = 0; i < 6; i++) begin
      y0 = yaw;
      next_update();
      chk(yaw == y0 + 12'd15 && pitch == 0, $sformatf("yaw step %h -> %h", y0, yaw));
      chk_orbit(4.0, "turning");
    end
    // right stick up as well: pitch +15 per update
    joy[1][1] = 12'hFFF;
    next_update(); next_update();
    for (int i = 0; i < 4; i++) begin
      y0 = pitch;
      next_update();
      chk(pitch == y0 + 12'd15, "pitch step");
      chk_orbit(4.0, "tilting");
    end
    joy[1] = '{12'h400, 12'h400};
    // left stick pulled back: zoom out by 15/256 per update
    joy[0][1] = 12'h000;
    next_update(); next_update();
    zoom = f2r(dut.x_inc);
    for (int i = 0; i < 4; i++) begin
      next_update();
      zoom += 15.0 / 256.0;
      chk_orbit(zoom, "zooming");
    end
    joy[0][1] = 12'h400;
    next_update(); next_update();
    // free mode: left stick up moves along -Z
    btnr = 1; repeat (5) @(negedge clk); btnr = 0;
    next_update();
    chk(mode == 1, "btnr switches to free mode");
    joy[0][1] = 12'hFFF;
    next_update(); next_update();
    for (int i = 0; i < 4; i++) begin
      px = f2r(pos.x); py = f2r(pos.y); pz = f2r(pos.z);
      next_update();
      chk(near(pos.x, px - 15.0 / 256.0 * f2r(vz.x)) && near(pos.y, py - 15.0 / 256.0 * f2r(vz.y)) &&
          near(pos.z, pz - 15.0 / 256.0 * f2r(vz.z)), "free forward move");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * UC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
