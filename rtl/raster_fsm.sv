// raster_fsm: the rasterizer's input FSM with triangle assembly.
//
// Consumes one vertex at a time (valid/ready) and walks through the states
// Ready -> Convert -> Store (x3) -> Assemble -> Raster, as in the design's
// rasterizer FSM. Convert turns the float screen coordinates into 17-bit
// fixed point (x, y with 7 fractional bits, z with 16); Store keeps the vertex
// and widens the pixel bounding box; Assemble sets the first sample to the
// box's upper-left pixel; Raster issues one sample per cycle, scanning x and
// wrapping to the next row, and returns to Ready when the box is done. Triangle
// setup therefore takes 10 cycles when vertices are waiting. Each sample
// carries the triangle's three fixed-point vertices and attributes so that
// downstream stages need no per-triangle state. The attributes (material and
// normal index) are taken from the triangle's first vertex, and sample points
// are pixel centres: both are this design's choices. The box is clamped to
// the 320x240 screen.
module raster_fsm
  import gfx_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // vertex input
  input  logic         valid_in,
  output logic         ready,
  input  fvec3_t       vertex,
  input  attr_t        attr_in,
  // sample output, one per cycle in Raster
  output logic         s_valid,
  output sfix_t        s_x,        // sample point, fixed point
  output sfix_t        s_y,
  output fixvert_t     s_v [3],
  output attr_t        s_attr,
  output logic         idle
);
  import fp_pkg::*;

  typedef enum logic [2:0] {READY, CONVERT, STORE, ASSEMBLE, RASTER} state_t;
  state_t state;

  fvec3_t     in_q;
  fixvert_t   conv_q;
  fixvert_t   v_q [3];
  attr_t      attr_q, tri_attr_q;
  logic [1:0] count;
  logic [8:0] xmin, xmax, px;
  logic [8:0] ymin, ymax, py;

  function automatic logic [8:0] to_pix(input sfix_t v, input int lim);
    logic signed [16:0] p;
    p = v >>> XY_FRAC;
    if (p < 0) return 9'd0;
    if (32'(p) > lim - 1) return 9'(lim - 1);
    return 9'(p);
  endfunction

  logic [8:0] cx, cy;
  assign cx = to_pix(conv_q.x, SCREEN_W);
  assign cy = to_pix(conv_q.y, SCREEN_H);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= READY;
      count <= '0;
    end else begin
      case (state)
        READY: if (valid_in) begin
          in_q   <= vertex;
          attr_q <= attr_in;
          state  <= CONVERT;
        end
        CONVERT: begin
          logic signed [31:0] zf;
          conv_q.x <= sfix_t'(f_to_fixed(in_q.x, XY_FRAC, FIX_W));
          conv_q.y <= sfix_t'(f_to_fixed(in_q.y, XY_FRAC, FIX_W));
          zf = f_to_fixed(in_q.z, Z_FRAC, FIX_W + 1);
          conv_q.z <= (zf < 0) ? '0 : ufix_t'(zf);
          state    <= STORE;
        end
        STORE: begin
          v_q[count] <= conv_q;
          if (count == 0) begin
            xmin <= cx; xmax <= cx; ymin <= cy; ymax <= cy;
            tri_attr_q <= attr_q;
          end else begin
            if (cx < xmin) xmin <= cx;
            if (cx > xmax) xmax <= cx;
            if (cy < ymin) ymin <= cy;
            if (cy > ymax) ymax <= cy;
          end
          if (count == 2'd2) begin
            count <= '0;
            state <= ASSEMBLE;
          end else begin
            count <= count + 1'b1;
            state <= READY;
          end
        end
        ASSEMBLE: begin
          px    <= xmin;
          py    <= ymin;
          state <= RASTER;
        end
        RASTER: begin
          if (px < xmax) px <= px + 1'b1;
          else begin
            px <= xmin;
            py <= py + 1'b1;
            if (py >= ymax) state <= READY;
          end
        end
        default: state <= READY;
      endcase
    end
  end

  assign ready   = (state == READY);
  assign idle    = (state == READY) && (count == 0);
  assign s_valid = (state == RASTER);
  assign s_x     = sfix_t'({px, 7'd64});          // pixel centre
  assign s_y     = sfix_t'({py, 7'd64});
  assign s_v     = v_q;
  assign s_attr  = tri_attr_q;
endmodule
