// resampling: weight comparison for one real particle and its B virtual
// particles (FPGA-optimised resampling).
//
// Instead of drawing particles from the whole weight distribution, each
// real particle is replaced by whichever of itself and its B virtual
// particles lies on the pixel of highest likelihood in the frame.  The
// likelihood stream (w, xw, yw) passes every particle at once: every
// candidate compares its (x, y) with the stream coordinate each clock, and
// the match bits are ORed.  If any candidate matches and w > w_max, w_max,
// x_max and y_max take w and the stream coordinate, and vx_max / vy_max
// take the velocity of the matching candidate.  The velocity is gathered
// as in an OR bus: each candidate drives its velocity through an AND mask
// (zero when it does not match) into a (B+1)-input OR.  When several
// candidates share the matching coordinate their velocities are ORed, as
// the OR-bus structure implies.
//
// cmp_start marks the first pixel of a frame: for that pixel the compare
// base is w = 0 and the real particle's own state, so a real particle no
// candidate beats keeps its state.  load presets the max registers (used
// by the random initialisation) and clears w_max.
//
// Timing: one compare per clock; the max registers hold the frame's result
// one clock after the last valid pixel and keep it until the next frame's
// cmp_start.
module resampling
  import pf_pkg::*;
#(
  parameter int unsigned B = 50
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmp_en,
  input  logic          cmp_start,
  input  logic [WW-1:0] w,
  input  logic [CW-1:0] xw,
  input  logic [CW-1:0] yw,
  input  pstate_t       rp,
  input  pstate_t       vp [B],
  input  logic          load,
  input  pstate_t       load_state,
  output logic [WW-1:0] w_max,
  output pstate_t       max_state
);

  // candidate 0 is the real particle, 1..B the virtual particles
  pstate_t cand [B+1];
  logic [B:0] match;
  logic signed [VW-1:0] vx_or, vy_or;

  always_comb begin
    cand[0] = rp;
    for (int n = 0; n < B; n++) cand[n+1] = vp[n];
    vx_or = '0;
    vy_or = '0;
    for (int n = 0; n <= B; n++) begin
      match[n] = (CW'(cand[n].x) == xw) && (CW'(cand[n].y) == yw);
      vx_or = vx_or | (match[n] ? cand[n].vx : '0);
      vy_or = vy_or | (match[n] ? cand[n].vy : '0);
    end
  end

  logic [WW-1:0] base_w;
  pstate_t       base_s;
  logic          update;

  assign base_w = cmp_start ? '0 : w_max;
  assign base_s = cmp_start ? rp : max_state;
  assign update = cmp_en && (|match) && (w > base_w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_max     <= '0;
      max_state <= '0;
    end else if (load) begin
      w_max     <= '0;
      max_state <= load_state;
    end else if (cmp_en) begin
      if (update) begin
        w_max        <= w;
        max_state.x  <= xw[XW-1:0];
        max_state.y  <= yw[YW-1:0];
        max_state.vx <= vx_or;
        max_state.vy <= vy_or;
      end else begin
        w_max     <= base_w;
        max_state <= base_s;
      end
    end
  end

  // The start-of-frame marker is only meaningful on a compared pixel.
  a_start_en: assert property (@(posedge clk) disable iff (!rst_n) cmp_start |-> cmp_en);

endmodule
