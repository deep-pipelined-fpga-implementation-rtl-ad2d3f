// init_rp_generator: random initial states for the M real particles.
//
// Shared by all particles.  After a start pulse it produces one particle
// state per clock for M clocks (ld, idx, state), the first two clocks after
// the start pulse; particle idx copies the
// state.  Two rand_generator instances supply the numbers.  x and y are
// uniform over the valid pixel area, computed as floor(r * H_VALID / 2^16)
// and floor(r * V_VALID / 2^16) from 16-bit random values; velocities are
// the difference of two 2-bit random numbers (-3..3).  Random
// initialisation follows the architecture; the distributions are this
// design's choice.  done pulses with the last state.
module init_rp_generator
  import pf_pkg::*;
#(
  parameter int unsigned M       = 100,
  parameter int unsigned H_VALID = H_VALID_DEF,
  parameter int unsigned V_VALID = V_VALID_DEF,
  parameter logic [32:0] SEED0   = 33'h0_C0FF_EE11,
  parameter logic [32:0] SEED1   = 33'h1_5EED_1234
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   ld,
  output logic [$clog2(M+1)-1:0] idx,
  output pstate_t                state,
  output logic                   done
);

  localparam int unsigned IW = $clog2(M+1);

  logic [31:0] ra1, ra2, rb1, rb2;
  rand_generator #(.SEED(SEED0)) u_rand_a (.clk, .rst_n, .rand1(ra1), .rand2(ra2));
  rand_generator #(.SEED(SEED1)) u_rand_b (.clk, .rst_n, .rand1(rb1), .rand2(rb2));

  logic          busy;
  logic [IW-1:0] cnt;
  logic [25:0]   px, py;

  assign px = 26'(ra1[15:0]) * 26'(H_VALID);
  assign py = 26'(rb1[15:0]) * 26'(V_VALID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0;
      ld <= 1'b0; idx <= '0; state <= '0; done <= 1'b0;
    end else begin
      ld   <= 1'b0;
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        ld       <= 1'b1;
        idx      <= cnt;
        state.x  <= px[16+XW-1:16];
        state.y  <= py[16+YW-1:16];
        state.vx <= VW'($signed({1'b0, ra1[17:16]}) - $signed({1'b0, ra1[19:18]}));
        state.vy <= VW'($signed({1'b0, rb1[17:16]}) - $signed({1'b0, rb1[19:18]}));
        if (cnt == IW'(M - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  // A new start must not arrive while initial states are being produced.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

  logic unused;
  assign unused = ^{ra1[31:20], rb1[31:20], ra2, rb2, px[15:0], py[15:0], py[25:16+YW]};

endmodule
