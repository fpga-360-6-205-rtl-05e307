// dir_vector: camera axis vectors from yaw and pitch, 9-cycle latency.
//
//   X = ( cos(yaw),               0,           -sin(yaw)             )
//   Y = (-sin(pitch) sin(yaw),    cos(pitch),  -sin(pitch) cos(yaw)  )
//   Z = ( cos(pitch) sin(yaw),    sin(pitch),   cos(pitch) cos(yaw)  )
// Four sine tables give sin/cos of both angles in 2 cycles; four fp_mul
// units form the products in 7 more. Negation is a sign flip, and the terms
// that need no product are delayed 7 cycles to stay aligned. Angles use the
// 12-bit encoding of sine_lut. A new pair of angles can enter every cycle.
module dir_vector
  import gfx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_in,
  input  logic [11:0] yaw,
  input  logic [11:0] pitch,
  output logic        valid_out,
  output fvec3_t      vec_x,
  output fvec3_t      vec_y,
  output fvec3_t      vec_z
);
  import fp_pkg::*;

  logic [31:0] sy, cy, sp, cp;
  sine_lut u_sy (.clk, .angle(yaw),            .sine(sy));
  sine_lut u_cy (.clk, .angle(yaw + 12'h400),  .sine(cy));
  sine_lut u_sp (.clk, .angle(pitch),          .sine(sp));
  sine_lut u_cp (.clk, .angle(pitch + 12'h400), .sine(cp));

  logic [1:0] v_sr;
  always_ff @(posedge clk) v_sr <= rst ? 2'b00 : {v_sr[0], valid_in};

  logic [31:0] spsy, spcy, cpsy, cpcy;
  logic        mv;
  logic        mv_unused [3];
  fp_mul u_m0 (.clk, .rst, .valid_in(v_sr[1]), .a(sp), .b(sy), .valid_out(mv), .y(spsy));
  fp_mul u_m1 (.clk, .rst, .valid_in(v_sr[1]), .a(sp), .b(cy), .valid_out(mv_unused[0]), .y(spcy));
  fp_mul u_m2 (.clk, .rst, .valid_in(v_sr[1]), .a(cp), .b(sy), .valid_out(mv_unused[1]), .y(cpsy));
  fp_mul u_m3 (.clk, .rst, .valid_in(v_sr[1]), .a(cp), .b(cy), .valid_out(mv_unused[2]), .y(cpcy));

  logic [31:0] sy_d, cy_d, sp_d, cp_d;
  delay_line #(.W(128), .N(7)) u_d (.clk, .d({sy, cy, sp, cp}), .q({sy_d, cy_d, sp_d, cp_d}));

  assign vec_x     = '{x: cy_d, y: F_ZERO, z: f_neg(sy_d)};
  assign vec_y     = '{x: f_neg(spsy), y: cp_d, z: f_neg(spcy)};
  assign vec_z     = '{x: cpsy, y: sp_d, z: cpcy};
  assign valid_out = mv;
endmodule
