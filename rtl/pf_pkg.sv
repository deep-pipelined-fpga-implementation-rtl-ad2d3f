// pf_pkg: types and constants shared by the particle filter tracker.
//
// The frame geometry is that of a VGA camera clocked at 27 MHz: 640x480
// valid pixels inside an 858x525 raster (60 frames/s).  Particle state
// widths follow the packed 29-bit (x, y, vx, vy) word used for particle
// velocity storage in the optimised variant of this architecture:
// 10-bit x, 9-bit y and two 5-bit signed velocities.  Weights are 10-bit
// (0..1023).  The target hue (40), weight scale (1023) and weight spread
// (20) are the values of the colour tracker.
package pf_pkg;

  localparam int unsigned XW = 10;   // x coordinate width
  localparam int unsigned YW = 9;    // y coordinate width
  localparam int unsigned VW = 5;    // signed velocity width
  localparam int unsigned WW = 10;   // weight width
  localparam int unsigned CW = 10;   // camera raster counter width

  localparam int unsigned H_VALID_DEF = 640;
  localparam int unsigned V_VALID_DEF = 480;
  localparam int unsigned H_TOTAL_DEF = 858;
  localparam int unsigned V_TOTAL_DEF = 525;

  localparam int unsigned HUE_TARGET = 40;
  localparam int unsigned W_ALPHA    = 1023;
  localparam int unsigned W_SPREAD   = 20;

  // State of one (real or virtual) particle.
  typedef struct packed {
    logic [XW-1:0]        x;
    logic [YW-1:0]        y;
    logic signed [VW-1:0] vx;
    logic signed [VW-1:0] vy;
  } pstate_t;

  // Saturate a signed sum to the range 0..limit-1.
  function automatic logic [XW-1:0] clamp_coord(input logic signed [XW+2:0] v,
                                                input int unsigned limit);
    if (v < 0) return '0;
    if (v > $signed((XW+3)'(limit - 1))) return XW'(limit - 1);
    return v[XW-1:0];
  endfunction

  // Saturate a signed sum to the velocity range.
  function automatic logic signed [VW-1:0] clamp_vel(input logic signed [VW+3:0] v);
    localparam logic signed [VW+3:0] VMAX = (1 <<< (VW-1)) - 1;
    localparam logic signed [VW+3:0] VMIN = -(1 <<< (VW-1));
    if (v > VMAX) return VMAX[VW-1:0];
    if (v < VMIN) return VMIN[VW-1:0];
    return v[VW-1:0];
  endfunction

endpackage
