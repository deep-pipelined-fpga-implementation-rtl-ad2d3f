// particle: one real particle with its B virtual particles.
//
// Holds the real particle state, the B virtual particle states and the
// real particle's last weight, and contains the units that work on them:
//   resampling         picks the best of the B+1 candidates over a frame
//   prediction         moves the selected state one frame ahead
//   next_vp_generator  scatters B new virtual particles around it
// Sequencing (from pf_controller, shared by all particles):
//   init_ld   presets the resampling result to a random initial state
//   predict   one clock: real particle <= prediction(selected state),
//             its weight <= w_max
//   vp_start  starts the B+1-clock virtual particle generation
//   cmp_*     the likelihood stream during the valid pixel region
// The selected state and weight (w_max, max_state) stay readable for the
// weighted centre until the next frame's first compare.
module particle
  import pf_pkg::*;
#(
  parameter int unsigned B       = 50,
  parameter int unsigned H_VALID = H_VALID_DEF,
  parameter int unsigned V_VALID = V_VALID_DEF,
  parameter int unsigned IDX     = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init_ld,
  input  pstate_t       init_state,
  input  logic          predict,
  input  logic          vp_start,
  output logic          vp_done,
  input  logic          cmp_en,
  input  logic          cmp_start,
  input  logic [WW-1:0] w,
  input  logic [CW-1:0] xw,
  input  logic [CW-1:0] yw,
  output logic [WW-1:0] w_max,
  output pstate_t       max_state,
  output pstate_t       rp_state
);

  // per-instance seeds, low 32 bits never zero
  function automatic logic [32:0] seed(input int unsigned k);
    logic [31:0] s;
    s = 32'h9E37_79B9 * (IDX * 4 + k + 1) + 32'h7F4A_7C15;
    if (s == 0) s = 32'h1;
    return {1'b0, s};
  endfunction

  localparam int unsigned IW  = $clog2(B+1);
  localparam int unsigned VIW = (B > 1) ? $clog2(B) : 1;   // virtual particle index width

  pstate_t       rp;
  logic [WW-1:0] w_rp;
  pstate_t       vp [B];
  pstate_t       pred;
  logic          vp_we;
  logic [IW-1:0] vp_idx;
  pstate_t       vp_new;

  resampling #(.B(B)) u_resampling (
    .clk, .rst_n, .cmp_en, .cmp_start, .w, .xw, .yw,
    .rp, .vp, .load(init_ld), .load_state(init_state),
    .w_max, .max_state
  );

  prediction #(.H_VALID(H_VALID), .V_VALID(V_VALID),
               .SEED0(seed(0)), .SEED1(seed(1))) u_prediction (
    .clk, .rst_n, .st_in(max_state), .st_out(pred)
  );

  next_vp_generator #(.B(B), .H_VALID(H_VALID), .V_VALID(V_VALID),
                      .SEED(seed(2))) u_next_vp (
    .clk, .rst_n, .start(vp_start), .rp, .w_rp,
    .vp_we, .vp_idx, .vp_state(vp_new), .done(vp_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp   <= '0;
      w_rp <= '0;
    end else if (predict) begin
      rp   <= pred;
      w_rp <= w_max;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < B; n++) vp[n] <= '0;
    end else if (vp_we) begin
      vp[VIW'(vp_idx)] <= vp_new;
    end
  end

  assign rp_state = rp;

endmodule
