// position_logic: camera position from the MSR increments and the camera
// axes.
//
// On each `update` pulse it starts one computation with the current inputs:
//   gimbal-lock mode (cam_mode = 0): pos = a * Z, where a = x_inc = y_inc is
//     the zoom distance, so the camera orbits the origin and looks at it;
//   free mode (cam_mode = 1): pos = x_inc * X + y_inc * Z + pos, moving the
//     camera sideways along X and forwards/backwards along Z.
// Six fp_mul units form x_inc*X and y_inc*Z (7 cycles); in free mode three
// fp_add units sum the two (9 cycles) and three more add the old position
// (9 cycles); `pos` follows 8 cycles after `update` in gimbal mode and 26 in
// free mode (each includes the final output register). `pos`
// changes only when a result completes and `pos_valid`
// pulses then. The reset position (0, 0, 4) is this design's choice.
module position_logic
  import gfx_pkg::*;
#(
  parameter logic [95:0] RESET_POS = {32'h0, 32'h0, 32'h4080_0000}
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   update,
  input  logic   cam_mode,
  input  logic [31:0] x_inc,
  input  logic [31:0] y_inc,
  input  fvec3_t vec_x,
  input  fvec3_t vec_z,
  output fvec3_t pos,
  output logic   pos_valid
);
  logic [31:0] xv [3], zv [3], px [3], pz [3], d [3], n [3], pos_a [3];
  logic        pxv [3], pzv [3], dv [3], nv [3];
  logic        mode_q;

  assign xv    = '{vec_x.x, vec_x.y, vec_x.z};
  assign zv    = '{vec_z.x, vec_z.y, vec_z.z};
  assign pos_a = '{pos.x, pos.y, pos.z};

  for (genvar i = 0; i < 3; i++) begin : g_axis
    fp_mul u_mx (.clk, .rst, .valid_in(update), .a(x_inc), .b(xv[i]), .valid_out(pxv[i]), .y(px[i]));
    fp_mul u_mz (.clk, .rst, .valid_in(update), .a(y_inc), .b(zv[i]), .valid_out(pzv[i]), .y(pz[i]));
    fp_add u_ad (.clk, .rst, .valid_in(pxv[i] & mode_q), .a(px[i]), .b(pz[i]), .valid_out(dv[i]), .y(d[i]));
    fp_add u_ap (.clk, .rst, .valid_in(dv[i]), .a(d[i]), .b(pos_a[i]), .valid_out(nv[i]), .y(n[i]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos       <= fvec3_t'(RESET_POS);
      mode_q    <= 1'b0;
      pos_valid <= 1'b0;
    end else begin
      pos_valid <= 1'b0;
      if (update) mode_q <= cam_mode;
      if (pzv[0] && !mode_q) begin
        pos       <= '{x: pz[0], y: pz[1], z: pz[2]};
        pos_valid <= 1'b1;
      end else if (nv[0]) begin
        pos       <= '{x: n[0], y: n[1], z: n[2]};
        pos_valid <= 1'b1;
      end
    end
  end
endmodule
