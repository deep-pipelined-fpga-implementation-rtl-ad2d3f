// prediction: next state of one real particle under a constant-velocity
// model with random noise.
//   x' = x + vx + nx,  y' = y + vy + ny,  vx' = vx + nvx,  vy' = vy + nvy
// Two private rand_generator instances supply the noise.  Position noise is
// the difference of two 3-bit random numbers (-7..7, triangular, zero
// mean); velocity noise is the difference of two random bits (-1, 0, 1).
// The motion model follows the architecture; the noise distributions and
// ranges are this design's choice.  Positions saturate to the valid pixel
// area and velocities to the 5-bit signed range.
//
// Timing: combinational from st_in to st_out; the particle registers the
// result in its single prediction clock.
module prediction
  import pf_pkg::*;
#(
  parameter int unsigned H_VALID = H_VALID_DEF,
  parameter int unsigned V_VALID = V_VALID_DEF,
  parameter logic [32:0] SEED0   = 33'h0_2468_ACE1,
  parameter logic [32:0] SEED1   = 33'h1_1357_9BDF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pstate_t st_in,
  output pstate_t st_out
);

  logic [31:0] ra1, ra2, rb1, rb2;

  rand_generator #(.SEED(SEED0)) u_rand_pos (.clk, .rst_n, .rand1(ra1), .rand2(ra2));
  rand_generator #(.SEED(SEED1)) u_rand_vel (.clk, .rst_n, .rand1(rb1), .rand2(rb2));

  logic signed [XW+2:0] nx, ny, xs, ys;
  logic signed [VW+3:0] nvx, nvy, vxs, vys;

  always_comb begin
    nx  = $signed((XW+3)'(ra1[2:0])) - $signed((XW+3)'(ra1[5:3]));
    ny  = $signed((XW+3)'(ra1[18:16])) - $signed((XW+3)'(ra1[21:19]));
    nvx = $signed((VW+4)'(rb1[0])) - $signed((VW+4)'(rb1[8]));
    nvy = $signed((VW+4)'(rb1[16])) - $signed((VW+4)'(rb1[24]));
    xs  = $signed((XW+3)'(st_in.x)) + (XW+3)'(st_in.vx) + nx;
    ys  = $signed((XW+3)'(st_in.y)) + (XW+3)'(st_in.vy) + ny;
    vxs = (VW+4)'(st_in.vx) + nvx;
    vys = (VW+4)'(st_in.vy) + nvy;
    st_out.x  = clamp_coord(xs, H_VALID);
    st_out.y  = YW'(clamp_coord(ys, V_VALID));
    st_out.vx = clamp_vel(vxs);
    st_out.vy = clamp_vel(vys);
  end

  // Random bits not used by this noise model.
  logic unused;
  assign unused = ^{ra1[31:22], ra1[15:6], ra2, rb1[31:25], rb1[23:17], rb1[15:9], rb1[7:1], rb2};

endmodule
