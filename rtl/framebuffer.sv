// framebuffer: double-buffered 320x240 colour frames with a depth buffer,
// clearing FSM and 640x480 VGA scan-out.
//
// Write side (gpu_clk): a pixel (x, y, 14-bit z, 12-bit RGB) is depth-tested
// against the depth memory and, if its z is strictly less than the stored
// one, written to the current target frame and the depth memory. The test is
// a two-stage pipeline (read depth, then compare and write) that accepts one
// pixel per cycle; a pixel to the same address as the one in the write stage
// sees that write through a bypass. `clear` starts the clearing mode: inputs
// are ignored and every address gets depth 0x3FFF (0xFFFF cut to 14 bits)
// and colour 0 (black), as the original clear write, one address per cycle; `ready` is low while clearing. `swap` toggles
// which frame is written and which is displayed.
// Read side (vga_clk): vga_timing scans 640x480; each frame pixel is shown
// as a 2x2 block. The displayed-frame select is synchronised into the VGA
// domain. Memory reads have one cycle of latency, so the syncs are delayed by
// one cycle to stay aligned with rgb. Outside the visible area rgb is 0.
// The memories are plain arrays (two 76800x12, one 76800x14) meant to map
// to block RAM.
module framebuffer
  import gfx_pkg::*;
#(
  parameter int unsigned W = SCREEN_W,
  parameter int unsigned H = SCREEN_H,
  parameter logic [11:0] CLEAR_RGB = 12'h000
) (
  input  logic        gpu_clk,
  input  logic        rst,
  input  logic        valid_in,
  input  pixel_t      pixel,
  input  logic        clear,
  input  logic        swap,
  output logic        ready,
  output logic        target,     // frame currently written
  input  logic        vga_clk,
  input  logic        vga_rst,
  output logic        hsync,
  output logic        vsync,
  output logic [11:0] rgb
);
  localparam int unsigned N  = W * H;
  localparam int unsigned AW = $clog2(N);
  typedef logic [AW-1:0] addr_t;
  localparam logic [DEPTH_W-1:0] MAX_DEPTH = '1;

  logic [11:0]        frame0 [N];
  logic [11:0]        frame1 [N];
  logic [DEPTH_W-1:0] depth  [N];

  // ---------------- clearing FSM ----------------
  typedef enum logic {NORMAL, CLEARING} fb_state_t;
  fb_state_t state;
  addr_t     clr_addr;

  always_ff @(posedge gpu_clk) begin
    if (rst) begin
      state    <= CLEARING;
      clr_addr <= '0;
      target   <= 1'b0;
    end else begin
      if (swap) target <= ~target;
      case (state)
        NORMAL: if (clear) begin
          state    <= CLEARING;
          clr_addr <= '0;
        end
        CLEARING: begin
          if (clr_addr == addr_t'(N - 1)) state <= NORMAL;
          clr_addr <= clr_addr + 1'b1;
        end
      endcase
    end
  end
  assign ready = (state == NORMAL) && !clear;

  // ---------------- depth test pipeline ----------------
  logic               s1_valid;
  addr_t              s1_addr;
  logic [DEPTH_W-1:0] s1_z;
  logic [11:0]        s1_rgb;
  logic [DEPTH_W-1:0] s1_depth_rd;
  logic               wr_en;
  addr_t              wr_addr;
  logic [DEPTH_W-1:0] wr_z;
  logic [11:0]        wr_rgb;
  logic               fwd_valid;
  logic [DEPTH_W-1:0] fwd_z;

  addr_t in_addr;
  assign in_addr = addr_t'(pixel.y * W + 32'(pixel.x));

  always_ff @(posedge gpu_clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= valid_in && state == NORMAL && pixel.x < 9'(W) && pixel.y < 8'(H);
    s1_addr     <= in_addr;
    s1_z        <= pixel.z;
    s1_rgb      <= pixel.rgb;
    s1_depth_rd <= depth[in_addr];
    // bypass: the stage-2 write of this cycle lands after the read above
    fwd_valid   <= wr_en && (wr_addr == in_addr);
    fwd_z       <= wr_z;
  end

  logic [DEPTH_W-1:0] stored_z;
  logic               pass;
  always_comb begin
    stored_z = fwd_valid ? fwd_z : s1_depth_rd;
    pass     = s1_valid && (s1_z < stored_z);
    if (state == CLEARING) begin
      wr_en   = 1'b1;
      wr_addr = clr_addr;
      wr_z    = MAX_DEPTH;
      wr_rgb  = CLEAR_RGB;
    end else begin
      wr_en   = pass;
      wr_addr = s1_addr;
      wr_z    = s1_z;
      wr_rgb  = s1_rgb;
    end
  end

  always_ff @(posedge gpu_clk) begin
    if (wr_en) begin
      depth[wr_addr] <= wr_z;
      if (target) frame1[wr_addr] <= wr_rgb;
      else        frame0[wr_addr] <= wr_rgb;
    end
  end

  // ---------------- VGA read side ----------------
  logic [9:0] hc, vc;
  logic       hs, vs, act, fs_unused;
  vga_timing u_vga (.clk(vga_clk), .rst(vga_rst), .hcount(hc), .vcount(vc),
                    .hsync(hs), .vsync(vs), .active(act), .frame_start(fs_unused));

  logic  disp_sync1, disp_sync2;
  addr_t rd_addr;
  logic [11:0] rd0, rd1;
  logic  act_q, disp_q;

  assign rd_addr = addr_t'(32'(vc[9:1]) * W + 32'(hc[9:1]));  // 2x2 pixel replication

  always_ff @(posedge vga_clk) begin
    disp_sync1 <= ~target;
    disp_sync2 <= disp_sync1;
    rd0    <= frame0[rd_addr];
    rd1    <= frame1[rd_addr];
    disp_q <= disp_sync2;
    act_q  <= act;
    hsync  <= hs;
    vsync  <= vs;
  end

  assign rgb = !act_q ? 12'h000 : (disp_q ? rd1 : rd0);
endmodule
