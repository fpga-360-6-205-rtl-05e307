// fpga360_top: a 3-D model viewer. Triangle models uploaded over a serial
// line are rendered by a floating-point transform and rasterization pipeline
// into a double-buffered 320x240 frame with depth buffer, shown on a
// 640x480 VGA display; two analog joysticks, read through the XADC, steer
// the camera in gimbal-lock (orbit) or free mode.
//
// control_module produces the camera position and axes; graphics_module
// renders with them 50 times per second. Both run on gpu_clk (100 MHz);
// the VGA scan-out runs on vga_clk (25.175 MHz nominal). rst is synchronous
// to gpu_clk and is passed through two flip-flops into the VGA domain. The
// XADC, the clock generator and the button debouncer are outside this
// design: the XADC's DRP port, both clocks and a debounced btnr are ports.
module fpga360_top
  import gfx_pkg::*;
#(
  parameter int unsigned FRAME_CYCLES  = 2_000_000,
  parameter int unsigned CLKS_PER_BIT  = 868,
  parameter int unsigned SAMPLE_CYCLES = 60_000,
  parameter int unsigned UPDATE_CYCLES = 2_000_000
) (
  input  logic        gpu_clk,
  input  logic        vga_clk,
  input  logic        rst,
  input  logic        btnr,
  // XADC dynamic reconfiguration port
  output logic [6:0]  drp_daddr,
  output logic        drp_den,
  output logic        drp_dwe,
  output logic [15:0] drp_di,
  input  logic [15:0] drp_do,
  input  logic        drp_drdy,
  output logic        joystick_select,
  // serial model upload
  input  logic        uart_rx,
  output logic        uart_tx,
  // VGA
  output logic        hsync,
  output logic        vsync,
  output logic [11:0] rgb,
  // status
  output logic        cam_mode,
  output logic [15:0] frames,
  output logic        fifo_overflow
);
  fvec3_t      cam_pos, vec_x, vec_y, vec_z;
  logic [11:0] yaw, pitch;

  control_module #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .UPDATE_CYCLES(UPDATE_CYCLES)) u_control (
    .clk(gpu_clk), .rst, .btnr, .drp_daddr, .drp_den, .drp_dwe, .drp_di, .drp_do, .drp_drdy,
    .joystick_select, .cam_mode, .yaw, .pitch, .cam_pos, .vec_x, .vec_y, .vec_z
  );

  logic vga_rst_s1, vga_rst;
  always_ff @(posedge vga_clk) begin
    vga_rst_s1 <= rst;
    vga_rst    <= vga_rst_s1;
  end

  graphics_module #(.FRAME_CYCLES(FRAME_CYCLES), .CLKS_PER_BIT(CLKS_PER_BIT)) u_graphics (
    .clk(gpu_clk), .rst, .vga_clk, .vga_rst, .cam_pos, .vec_x, .vec_y, .vec_z,
    .uart_rx_in(uart_rx), .uart_tx_out(uart_tx), .hsync, .vsync, .rgb, .frames, .fifo_overflow
  );
endmodule
