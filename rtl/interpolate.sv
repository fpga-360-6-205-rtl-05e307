// interpolate: the rasterizer's interpolation stage.
//
// Drops rejected samples (coeffs_negative) and interpolates depth as
// z = a*za + b*zb + c*zc, with coefficients in 24-bit fraction fixed point and
// z in 16-bit fraction fixed point, saturating at the largest 17-bit value.
// Two pipeline stages (products, then sum); one fragment per cycle. The
// fragment leaves with its pixel position and the triangle's material and
// normal indices.
module interpolate
  import gfx_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              valid_in,
  input  logic              coeffs_negative,
  input  logic [COEF_W-1:0] a,
  input  logic [COEF_W-1:0] b,
  input  logic [COEF_W-1:0] c,
  input  ufix_t             z_vals [3],
  input  ufix_t             x_in,
  input  ufix_t             y_in,
  input  attr_t             attr_in,
  output logic              valid_out,
  output fragment_t         fragment,
  output attr_t             attr_out
);
  localparam int PW = COEF_W + FIX_W;

  logic [PW-1:0] p1 [3];
  logic          v1, v2;
  ufix_t         x1, y1;
  attr_t         at1;
  logic [PW+1:0] sum;

  assign sum = ((PW+2)'(p1[0]) + (PW+2)'(p1[1]) + (PW+2)'(p1[2])) >> COEF_FRAC;

  always_ff @(posedge clk) begin
    p1[0] <= PW'(a) * PW'(z_vals[0]);
    p1[1] <= PW'(b) * PW'(z_vals[1]);
    p1[2] <= PW'(c) * PW'(z_vals[2]);
    x1    <= x_in;
    y1    <= y_in;
    at1   <= attr_in;
    fragment.x <= x1;
    fragment.y <= y1;
    fragment.z <= (sum > (PW+2)'(17'h1FFFF)) ? 17'h1FFFF : sum[FIX_W-1:0];
    attr_out   <= at1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= valid_in && !coeffs_negative;
      v2 <= v1;
    end
  end
  assign valid_out = v2;
endmodule
