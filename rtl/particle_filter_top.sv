// particle_filter_top: real-time colour object tracker built as a
// particle filter with FPGA-optimised resampling, streaming at one camera
// pixel per clock with no frame memory.
//
// Data path (one pixel per clock, clocked by the camera pixel clock):
//   camera RGB -> likelihood (3 clocks) -> all M particles in parallel
//   -> weighted_center -> center_drawing -> video out
// Each particle keeps one real particle and B virtual particles.  During
// the valid pixel region every particle watches the likelihood stream and
// remembers the best-weighted pixel that one of its B+1 candidates sits
// on.  In the blanking region after the last valid pixel, pf_controller
// runs prediction (1 clock) and virtual particle generation (B+1 clocks)
// in all particles at once, while weighted_center computes the weighted
// centre of the selected states (M+36 clocks).
//
// Camera interface: cam_valid marks a valid pixel, cam_h / cam_v are its
// column and row (0-based) within the valid region.  Frames are assumed to
// arrive as a raster whose valid region is H_VALID x V_VALID; at 640x480
// in an 858x525 raster with a 27 MHz clock this is 60 frames/s.  The centre
// of frame n is presented M+36+4 clocks after that frame's last valid
// pixel enters, and is drawn on the following frames.
// The Bayer-to-RGB conversion in front of the tracker belongs to the
// camera interface and is outside this module: it takes RGB pixels.
module particle_filter_top
  import pf_pkg::*;
#(
  parameter int unsigned M       = 100,
  parameter int unsigned B       = 50,
  parameter int unsigned H_VALID = H_VALID_DEF,
  parameter int unsigned V_VALID = V_VALID_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  // camera stream
  input  logic          cam_valid,
  input  logic [7:0]    cam_r,
  input  logic [7:0]    cam_g,
  input  logic [7:0]    cam_b,
  input  logic [CW-1:0] cam_h,
  input  logic [CW-1:0] cam_v,
  // video output with the centre drawn
  output logic          vid_valid,
  output logic [7:0]    vid_r,
  output logic [7:0]    vid_g,
  output logic [7:0]    vid_b,
  output logic [CW-1:0] vid_h,
  output logic [CW-1:0] vid_v,
  output logic          vid_mark,
  // tracking result
  output logic [XW-1:0] center_x,
  output logic [YW-1:0] center_y,
  output logic          center_valid,
  output logic          center_hold,
  // status
  output logic [1:0]    phase,
  output logic [31:0]   frames
);

  localparam int unsigned MIW = $clog2(M+1);

  // ---------------- likelihood ----------------
  logic          lk_valid;
  logic [WW-1:0] lk_w;
  logic [CW-1:0] lk_h, lk_v;

  likelihood u_likelihood (
    .clk, .rst_n, .in_valid(cam_valid), .r(cam_r), .g(cam_g), .b(cam_b),
    .in_h(cam_h), .in_v(cam_v),
    .out_valid(lk_valid), .w(lk_w), .out_h(lk_h), .out_v(lk_v)
  );

  // ---------------- control ----------------
  logic init_start, init_done, predict, vp_start, cmp_en, cmp_start, center_start;
  logic [M-1:0] vp_done;

  pf_controller #(.H_VALID(H_VALID), .V_VALID(V_VALID)) u_ctrl (
    .clk, .rst_n, .lk_valid, .lk_h, .lk_v,
    .init_start, .init_done, .predict, .vp_start, .vp_done(vp_done[0]),
    .cmp_en, .cmp_start, .center_start, .phase, .frames
  );

  // ---------------- initial particles ----------------
  logic           init_ld;
  logic [MIW-1:0] init_idx;
  pstate_t        init_state;

  init_rp_generator #(.M(M), .H_VALID(H_VALID), .V_VALID(V_VALID)) u_init (
    .clk, .rst_n, .start(init_start), .ld(init_ld), .idx(init_idx),
    .state(init_state), .done(init_done)
  );

  // ---------------- particles ----------------
  logic [WW-1:0] w_max [M];
  logic [XW-1:0] x_max [M];
  logic [YW-1:0] y_max [M];

  for (genvar i = 0; i < M; i++) begin : g_particle
    pstate_t ms, rs;
    particle #(.B(B), .H_VALID(H_VALID), .V_VALID(V_VALID), .IDX(i)) u_particle (
      .clk, .rst_n,
      .init_ld(init_ld && init_idx == MIW'(i)), .init_state,
      .predict, .vp_start, .vp_done(vp_done[i]),
      .cmp_en, .cmp_start, .w(lk_w), .xw(lk_h), .yw(lk_v),
      .w_max(w_max[i]), .max_state(ms), .rp_state(rs)
    );
    assign x_max[i] = ms.x;
    assign y_max[i] = ms.y;
    logic unused;
    assign unused = ^{ms.vx, ms.vy, rs};
  end

  // ---------------- centre of gravity ----------------
  weighted_center #(.M(M)) u_center (
    .clk, .rst_n, .start(center_start), .w_i(w_max), .x_i(x_max), .y_i(y_max),
    .xc(center_x), .yc(center_y), .valid(center_valid), .hold(center_hold)
  );

  logic show;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            show <= 1'b0;
    else if (center_valid) show <= 1'b1;
  end

  center_drawing u_draw (
    .clk, .rst_n, .show, .xc(center_x), .yc(center_y),
    .in_valid(cam_valid), .in_r(cam_r), .in_g(cam_g), .in_b(cam_b),
    .in_h(cam_h), .in_v(cam_v),
    .out_valid(vid_valid), .out_r(vid_r), .out_g(vid_g), .out_b(vid_b),
    .out_h(vid_h), .out_v(vid_v), .out_mark(vid_mark)
  );

  logic unused_done;
  assign unused_done = ^vp_done[M-1:1];

endmodule
