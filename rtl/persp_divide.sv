// persp_divide: perspective division of clip coordinates.
//
// Four pipelined fp_div units compute x/w, y/w, z/w and 1/w; the result is
// (x/w, y/w, z/w, 1/w). One vertex per cycle, 30-cycle latency, attributes
// delayed to match.
module persp_divide
  import gfx_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   valid_in,
  input  fvec4_t clip,
  input  attr_t  attr_in,
  output logic   valid_out,
  output fvec4_t ndc,
  output attr_t  attr_out
);
  logic [31:0] num [4];
  logic [31:0] q   [4];
  logic        v   [4];
  assign num = '{clip.x, clip.y, clip.z, fp_pkg::F_ONE};

  for (genvar i = 0; i < 4; i++) begin : g_div
    fp_div u_div (.clk, .rst, .valid_in, .a(num[i]), .b(clip.w), .valid_out(v[i]), .y(q[i]));
  end

  delay_line #(.W($bits(attr_t)), .N(30)) u_attr (.clk, .d(attr_in), .q(attr_out));

  assign valid_out = v[0];
  assign ndc       = '{x: q[0], y: q[1], z: q[2], w: q[3]};
endmodule
