// rasterizer: turns a stream of screen-space vertices into fragments.
//
// Three parts, in a chain: raster_fsm assembles three vertices into a
// triangle and scans its bounding box one sample per cycle; barycentric
// converts each sample to barycentric coefficients and rejects samples that
// are outside or back-facing; interpolate computes the fragment depth.
// The conversion and interpolation are fully pipelined (one pixel per cycle);
// per-triangle setup costs 10 cycles. Vertex input is valid/ready, fragment
// output is a valid strobe with no back-pressure. `idle` is high when no
// triangle is being assembled or scanned and no sample is in flight.
module rasterizer
  import gfx_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      valid_in,
  output logic      ready,
  input  fvec3_t    vertex,
  input  attr_t     attr_in,
  output logic      valid_out,
  output fragment_t fragment,
  output attr_t     attr_out,
  output logic      idle
);
  logic     s_valid;
  sfix_t    s_x, s_y;
  fixvert_t s_v [3];
  attr_t    s_attr;
  logic     fsm_idle;

  raster_fsm u_fsm (
    .clk, .rst, .valid_in, .ready, .vertex, .attr_in,
    .s_valid, .s_x, .s_y, .s_v, .s_attr, .idle(fsm_idle)
  );

  logic              b_valid, b_neg;
  logic [COEF_W-1:0] ca, cb, cc;
  ufix_t             zv [3];
  ufix_t             bx, by;
  attr_t             b_attr;

  barycentric u_bary (
    .clk, .rst, .valid_in(s_valid), .px(s_x), .py(s_y), .v(s_v), .attr_in(s_attr),
    .valid_out(b_valid), .coeffs_negative(b_neg), .a(ca), .b(cb), .c(cc),
    .z_vals(zv), .x_out(bx), .y_out(by), .attr_out(b_attr)
  );

  interpolate u_interp (
    .clk, .rst, .valid_in(b_valid), .coeffs_negative(b_neg), .a(ca), .b(cb), .c(cc),
    .z_vals(zv), .x_in(bx), .y_in(by), .attr_in(b_attr),
    .valid_out, .fragment, .attr_out
  );

  // samples in flight: raster_fsm output to interpolate output
  localparam int FLIGHT = 4 + COEF_W + 1 + 2;
  logic [FLIGHT-1:0] busy_sr;
  always_ff @(posedge clk) begin
    if (rst) busy_sr <= '0;
    else     busy_sr <= {busy_sr[FLIGHT-2:0], s_valid};
  end
  assign idle = fsm_idle && (busy_sr == '0);
endmodule
