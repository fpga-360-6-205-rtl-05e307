// barycentric: converts each sample point to barycentric coefficients.
//
// For sample P and triangle (V0,V1,V2) it forms the edge-function areas
//   full = E(V0,V1,V2), a' = E(V1,V2,P), b' = E(V2,V0,P), c' = E(V0,V1,P)
// with E(A,B,C) = (Bx-Ax)(Cy-Ay) - (By-Ay)(Cx-Ax), two multiplies each, then
// divides a', b', c' by full with three pipelined fixed_div units, giving
// 26-bit coefficients with 24 fractional bits (1.0 = 2^24). The sample is
// rejected (coeffs_negative) when it lies outside the triangle (a sub-area of
// the other sign) or when the triangle is back-facing. Screen y grows
// downwards, so a triangle wound counter-clockwise in the usual y-up sense
// has a negative full area here; such triangles are the front faces (the
// winding convention is this design's choice). Fully pipelined: one sample
// per cycle, latency 4 + 27 cycles. Per-sample side data (z values,
// attributes, position) travels with the sample.
module barycentric
  import gfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_in,
  input  sfix_t       px,
  input  sfix_t       py,
  input  fixvert_t    v [3],
  input  attr_t       attr_in,
  output logic        valid_out,
  output logic        coeffs_negative,
  output logic [COEF_W-1:0] a,
  output logic [COEF_W-1:0] b,
  output logic [COEF_W-1:0] c,
  output ufix_t       z_vals [3],
  output ufix_t       x_out,
  output ufix_t       y_out,
  output attr_t       attr_out
);
  localparam int AW = 2 * (FIX_W + 1) + 1;  // area width (signed)

  typedef struct packed {
    ufix_t z0, z1, z2;
    ufix_t x, y;
    attr_t attr;
  } side_t;

  typedef logic signed [FIX_W:0] diff_t;
  typedef logic signed [AW-1:0]  area_t;

  // stage 1: coordinate differences
  diff_t d1 [4][4];   // per area: (Bx-Ax), (Cy-Ay), (By-Ay), (Cx-Ax)
  logic  v1;
  side_t s1;
  // stage 2: products
  area_t p2 [4][2];
  logic  v2;
  side_t s2;
  // stage 3: areas
  area_t ar3 [4];
  logic  v3;
  side_t s3;
  // stage 4: sign checks and magnitudes for the dividers
  logic [AW-2:0] mag4 [4];
  logic  v4, neg4;
  side_t s4;

  function automatic diff_t dif(input sfix_t p, input sfix_t q);
    return diff_t'(p) - diff_t'(q);
  endfunction

  always_ff @(posedge clk) begin
    sfix_t ax [4], ay [4], bx [4], by [4], cx [4], cy [4];
    // area 0: full triangle, 1..3: sub-triangles opposite V0, V1, V2
    ax[0] = v[0].x; ay[0] = v[0].y; bx[0] = v[1].x; by[0] = v[1].y; cx[0] = v[2].x; cy[0] = v[2].y;
    ax[1] = v[1].x; ay[1] = v[1].y; bx[1] = v[2].x; by[1] = v[2].y; cx[1] = px;     cy[1] = py;
    ax[2] = v[2].x; ay[2] = v[2].y; bx[2] = v[0].x; by[2] = v[0].y; cx[2] = px;     cy[2] = py;
    ax[3] = v[0].x; ay[3] = v[0].y; bx[3] = v[1].x; by[3] = v[1].y; cx[3] = px;     cy[3] = py;
    for (int i = 0; i < 4; i++) begin
      d1[i][0] <= dif(bx[i], ax[i]);
      d1[i][1] <= dif(cy[i], ay[i]);
      d1[i][2] <= dif(by[i], ay[i]);
      d1[i][3] <= dif(cx[i], ax[i]);
    end
    s1 <= '{z0: v[0].z, z1: v[1].z, z2: v[2].z, x: ufix_t'(px >>> XY_FRAC),
            y: ufix_t'(py >>> XY_FRAC), attr: attr_in};
    for (int i = 0; i < 4; i++) begin
      p2[i][0] <= area_t'(d1[i][0]) * area_t'(d1[i][1]);
      p2[i][1] <= area_t'(d1[i][2]) * area_t'(d1[i][3]);
      ar3[i]   <= p2[i][0] - p2[i][1];
    end
    s2 <= s1;
    s3 <= s2;
    // front faces have a negative full area; flip so inside points are >= 0
    neg4 <= !(ar3[0] < 0) || (ar3[1] > 0) || (ar3[2] > 0) || (ar3[3] > 0);
    for (int i = 0; i < 4; i++) mag4[i] <= (AW-1)'(-ar3[i]);
    s4 <= s3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
    end else begin
      v1 <= valid_in; v2 <= v1; v3 <= v2; v4 <= v3;
    end
  end

  // three dividers: coefficient = sub-area * 2^24 / full area
  localparam int NW = AW - 1 + COEF_FRAC;
  logic [COEF_W-1:0] q [3];
  logic [AW-2:0]     rem_unused [3];
  logic              dv [3];
  for (genvar i = 0; i < 3; i++) begin : g_div
    fixed_div #(.NW(NW), .DW(AW - 1), .QW(COEF_W)) u_div (
      .clk, .rst, .valid_in(v4),
      .n({mag4[i+1], {COEF_FRAC{1'b0}}}),
      .d(mag4[0]),
      .valid_out(dv[i]), .q(q[i]), .rem(rem_unused[i])
    );
  end

  // side data delayed to match the dividers
  localparam int DL = COEF_W + 1;
  side_t side_d [DL];
  logic  neg_d  [DL];
  always_ff @(posedge clk) begin
    side_d[0] <= s4;
    neg_d[0]  <= neg4;
    for (int i = 1; i < DL; i++) begin
      side_d[i] <= side_d[i-1];
      neg_d[i]  <= neg_d[i-1];
    end
  end

  assign valid_out       = dv[0];
  assign coeffs_negative = neg_d[DL-1];
  assign a               = q[0];
  assign b               = q[1];
  assign c               = q[2];
  assign z_vals          = '{side_d[DL-1].z0, side_d[DL-1].z1, side_d[DL-1].z2};
  assign x_out           = side_d[DL-1].x;
  assign y_out           = side_d[DL-1].y;
  assign attr_out        = side_d[DL-1].attr;
endmodule
