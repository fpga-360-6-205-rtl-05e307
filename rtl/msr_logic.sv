// msr_logic: move, scale and rotate logic of the camera control.
//
// Each XADC sample pair is stored as the left or the right joystick's X/Y
// according to the joystick it came from. btnr (already debounced) toggles
// cam_mode between gimbal-lock (0) and free (1) on its rising edge. Every
// UPDATE_CYCLES clocks (2,000,000 = 20 ms) the stick deflections are turned
// into steps by threshold ranges around the rest value 0x400:
//   0x500 < v <= 0x600 : +0x5    0x300 > v >= 0x200 : -0x5
//   0x600 < v <= 0x700 : +0xA    0x200 > v >= 0x100 : -0xA
//           v >  0x700 : +0xF            v <  0x100 : -0xF
// The right stick's X step is added to yaw and its Y step to pitch (12-bit
// angles, 0x400 = 90 degrees, wrapping). In gimbal-lock mode the left
// stick's Y step changes a zoom distance (in 1/256 units, pushing up moves
// closer, clamped to 1..64) that is sent as a float on both x_inc and y_inc.
// In free mode x_inc is the left X step and y_inc minus the left Y step, in
// 1/256 units, so pushing up moves forwards (the camera looks along -Z).
// `update` is high for one cycle as the new values appear. The
// exact step sizes for zoom and movement, the zoom limits and its start value
// (4.0) are this design's choices.
module msr_logic #(
  parameter int unsigned UPDATE_CYCLES = 2_000_000,
  parameter logic [15:0] ZOOM_RESET = 16'h0400,    // 4.0
  parameter logic [15:0] ZOOM_MIN   = 16'h0100,    // 1.0
  parameter logic [15:0] ZOOM_MAX   = 16'h4000     // 64.0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sample_valid,
  input  logic        sample_joystick,   // 0 left, 1 right
  input  logic [11:0] joy_x,
  input  logic [11:0] joy_y,
  input  logic        btnr,
  output logic        cam_mode,          // 0 gimbal-lock, 1 free
  output logic [11:0] yaw,
  output logic [11:0] pitch,
  output logic [31:0] x_inc,
  output logic [31:0] y_inc,
  output logic        update
);
  import fp_pkg::*;

  logic [11:0] lx, ly, rx, ry;
  logic [$clog2(UPDATE_CYCLES)-1:0] timer;
  logic        btn_q;
  logic [15:0] zoom;

  function automatic logic signed [4:0] step(input logic [11:0] v);
    if (v > 12'h700) return 5'sd15;
    if (v > 12'h600) return 5'sd10;
    if (v > 12'h500) return 5'sd5;
    if (v < 12'h100) return -5'sd15;
    if (v < 12'h200) return -5'sd10;
    if (v < 12'h300) return -5'sd5;
    return 5'sd0;
  endfunction

  logic signed [16:0] zoom_next;
  assign zoom_next = $signed({1'b0, zoom}) - 17'(step(ly));

  always_ff @(posedge clk) begin
    if (rst) begin
      lx <= 12'h400; ly <= 12'h400; rx <= 12'h400; ry <= 12'h400;
      timer    <= '0;
      btn_q    <= 1'b0;
      cam_mode <= 1'b0;
      yaw      <= '0;
      pitch    <= '0;
      zoom     <= ZOOM_RESET;
      x_inc    <= f_from_int(32'(ZOOM_RESET), 8);
      y_inc    <= f_from_int(32'(ZOOM_RESET), 8);
      update   <= 1'b0;
    end else begin
      update <= 1'b0;
      btn_q  <= btnr;
      if (btnr && !btn_q) cam_mode <= ~cam_mode;
      if (sample_valid) begin
        if (sample_joystick) begin rx <= joy_x; ry <= joy_y; end
        else                 begin lx <= joy_x; ly <= joy_y; end
      end
      if (timer == ($bits(timer))'(UPDATE_CYCLES - 1)) begin
        timer  <= '0;
        update <= 1'b1;
        yaw    <= yaw + 12'(signed'(step(rx)));
        pitch  <= pitch + 12'(signed'(step(ry)));
        if (!cam_mode) begin
          logic [15:0] z;
          if (zoom_next < $signed({1'b0, ZOOM_MIN}))      z = ZOOM_MIN;
          else if (zoom_next > $signed({1'b0, ZOOM_MAX})) z = ZOOM_MAX;
          else                                            z = zoom_next[15:0];
          zoom  <= z;
          x_inc <= f_from_int(32'(z), 8);
          y_inc <= f_from_int(32'(z), 8);
        end else begin
          x_inc <= f_from_int(32'(step(lx)), 8);
          y_inc <= f_from_int(-32'(step(ly)), 8);
        end
      end else timer <= timer + 1'b1;
    end
  end
endmodule
