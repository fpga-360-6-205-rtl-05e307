// control_module: camera control from two analog joysticks.
//
// xadc_reader alternates the XADC DRP address between the x and y
// multiplexer channels every 0.6 ms and toggles joystick_select after each
// pair; msr_logic turns the sampled deflections into yaw, pitch and
// zoom/translation increments every 20 ms and holds the camera mode (btnr);
// dir_vector turns yaw and pitch into the camera axes X, Y, Z; position_logic
// places the camera (orbit at distance a along Z in gimbal-lock mode,
// accumulated movement in free mode). The position update is started 10
// cycles after the MSR update so that it uses the axes of the new angles
// (dir_vector's latency is 9); this small offset is this design's choice. The
// graphics side samples the outputs once per frame.
module control_module
  import gfx_pkg::*;
#(
  parameter int unsigned SAMPLE_CYCLES = 60_000,
  parameter int unsigned UPDATE_CYCLES = 2_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        btnr,
  // XADC DRP
  output logic [6:0]  drp_daddr,
  output logic        drp_den,
  output logic        drp_dwe,
  output logic [15:0] drp_di,
  input  logic [15:0] drp_do,
  input  logic        drp_drdy,
  output logic        joystick_select,
  // camera
  output logic        cam_mode,
  output logic [11:0] yaw,
  output logic [11:0] pitch,
  output fvec3_t      cam_pos,
  output fvec3_t      vec_x,
  output fvec3_t      vec_y,
  output fvec3_t      vec_z
);
  logic        s_valid, s_joy;
  logic [11:0] s_x, s_y;

  xadc_reader #(.SAMPLE_CYCLES(SAMPLE_CYCLES)) u_xadc (
    .clk, .rst, .daddr(drp_daddr), .den(drp_den), .dwe(drp_dwe), .di(drp_di),
    .do_data(drp_do), .drdy(drp_drdy), .joystick_select,
    .sample_valid(s_valid), .sample_joystick(s_joy), .x(s_x), .y(s_y)
  );

  logic [31:0] x_inc, y_inc;
  logic        update;
  msr_logic #(.UPDATE_CYCLES(UPDATE_CYCLES)) u_msr (
    .clk, .rst, .sample_valid(s_valid), .sample_joystick(s_joy), .joy_x(s_x), .joy_y(s_y),
    .btnr, .cam_mode, .yaw, .pitch, .x_inc, .y_inc, .update
  );

  logic dv_valid;
  dir_vector u_dir (
    .clk, .rst, .valid_in(1'b1), .yaw, .pitch,
    .valid_out(dv_valid), .vec_x, .vec_y, .vec_z
  );

  logic [9:0] upd_sr;
  always_ff @(posedge clk) upd_sr <= rst ? '0 : {upd_sr[8:0], update};

  logic pos_valid;
  position_logic u_pos (
    .clk, .rst, .update(upd_sr[9] & dv_valid), .cam_mode, .x_inc, .y_inc,
    .vec_x, .vec_z, .pos(cam_pos), .pos_valid
  );
endmodule
