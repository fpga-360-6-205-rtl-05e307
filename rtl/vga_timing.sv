// vga_timing: 640x480 at 60 Hz sync generator, one pixel per vga_clk.
//
// Counts 800 clocks per line (640 visible, 16 front porch, 96 sync, 48 back
// porch) and 525 lines per frame (480 visible, 10, 2 sync, 33), the standard
// VGA mode the display uses; sync pulses are active low. hcount/vcount give
// the current position and `active` marks the visible area. The standard
// pixel clock is 25.175 MHz.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync,
  output logic       vsync,
  output logic       active,
  output logic       frame_start
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 10'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign hsync  = !(hcount >= 10'(H_ACTIVE + H_FP) && hcount < 10'(H_ACTIVE + H_FP + H_SYNC));
  assign vsync  = !(vcount >= 10'(V_ACTIVE + V_FP) && vcount < 10'(V_ACTIVE + V_FP + V_SYNC));
  assign active = (hcount < 10'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
  assign frame_start = (hcount == 0) && (vcount == 0);
endmodule
