// next_vp_generator: places B new virtual particles around a real particle.
//
// The spread shrinks as the real particle's weight grows:
//   sigma = floor((1023 - w) / 16)      (a shift, 0..63)
// and every virtual particle is the real particle plus a uniform random
// offset in [-sigma, sigma] on x and y.  The offset of one coordinate is
// floor(r * (2*sigma + 1) / 256) - sigma for an 8-bit random r, which
// covers exactly [-sigma, sigma].  The velocities get offsets in
// [-sigma/8, sigma/8]: the architecture adds noise to all states, and the
// reduced velocity spread is this design's choice to stay within the 5-bit
// velocity range.  Positions saturate to the valid pixel area.
//
// One virtual particle is produced per clock from one private
// rand_generator.  After a start pulse the generator spends one clock
// computing sigma and then writes virtual particles 0..B-1 on B
// consecutive clocks (vp_we, vp_idx, vp_state): B + 1 clocks in all.
// done pulses with the last write.
module next_vp_generator
  import pf_pkg::*;
#(
  parameter int unsigned B       = 50,
  parameter int unsigned H_VALID = H_VALID_DEF,
  parameter int unsigned V_VALID = V_VALID_DEF,
  parameter logic [32:0] SEED    = 33'h0_0BAD_5EED
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  pstate_t               rp,
  input  logic [WW-1:0]         w_rp,
  output logic                  vp_we,
  output logic [$clog2(B+1)-1:0] vp_idx,
  output pstate_t               vp_state,
  output logic                  done
);

  localparam int unsigned IW = $clog2(B+1);

  logic [31:0] r1, r2;
  rand_generator #(.SEED(SEED)) u_rand (.clk, .rst_n, .rand1(r1), .rand2(r2));

  logic          busy;
  logic [IW-1:0] cnt;
  logic [5:0]    sigma;

  // uniform offset in [-s, s] from an 8-bit random value
  function automatic logic signed [XW+2:0] offset(input logic [7:0] rv, input logic [5:0] s);
    logic [14:0] prod;
    prod = 15'(rv) * 15'({s, 1'b1});
    return $signed((XW+3)'(prod[14:8])) - $signed((XW+3)'(s));
  endfunction

  logic signed [XW+2:0] xs, ys, ovx, ovy;
  pstate_t nxt;
  always_comb begin
    xs  = $signed((XW+3)'(rp.x)) + offset(r1[7:0], sigma);
    ys  = $signed((XW+3)'(rp.y)) + offset(r1[15:8], sigma);
    ovx = offset(r1[23:16], sigma >> 3);
    ovy = offset(r1[31:24], sigma >> 3);
    nxt.x  = clamp_coord(xs, H_VALID);
    nxt.y  = YW'(clamp_coord(ys, V_VALID));
    nxt.vx = clamp_vel((VW+4)'(rp.vx) + (VW+4)'(ovx));
    nxt.vy = clamp_vel((VW+4)'(rp.vy) + (VW+4)'(ovy));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; sigma <= '0;
      vp_we <= 1'b0; vp_idx <= '0; vp_state <= '0; done <= 1'b0;
    end else begin
      vp_we <= 1'b0;
      done  <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        cnt   <= '0;
        sigma <= 6'((WW'(W_ALPHA) - w_rp) >> 4);
      end else if (busy) begin
        vp_we    <= 1'b1;
        vp_idx   <= cnt;
        vp_state <= nxt;
        if (cnt == IW'(B - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  // A new start must not arrive while virtual particles are being written.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

  logic unused;
  assign unused = ^r2;

endmodule
