// pf_controller: sequencer of the particle filter.
//
// Four states, as in the architecture's state diagram:
//   INIT     random initialisation of the real particles (once, after reset)
//   PREDICT  one clock: every real particle takes its predicted state
//   VP_SET   B+1 clocks: every particle generates its virtual particles
//   COMPARE  weight comparison over the frame's valid pixels
// Prediction and virtual particle setting fit in the synchronisation
// (blanking) region of the video frame; comparison runs on the valid pixel
// region.  The controller watches the likelihood stream: in COMPARE it
// waits for the frame's first valid pixel (0, 0), which starts the
// comparison (cmp_start), and leaves after the last one
// (H_VALID-1, V_VALID-1).  The clock after that last pixel is PREDICT, and
// the weighted centre calculation is started in that same clock
// (center_start) so that it overlaps prediction and virtual particle
// setting.  frames counts completed comparisons.
module pf_controller
  import pf_pkg::*;
#(
  parameter int unsigned H_VALID = H_VALID_DEF,
  parameter int unsigned V_VALID = V_VALID_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          lk_valid,
  input  logic [CW-1:0] lk_h,
  input  logic [CW-1:0] lk_v,
  output logic          init_start,
  input  logic          init_done,
  output logic          predict,
  output logic          vp_start,
  input  logic          vp_done,
  output logic          cmp_en,
  output logic          cmp_start,
  output logic          center_start,
  output logic [1:0]    phase,
  output logic [31:0]   frames
);

  typedef enum logic [1:0] {INIT, PREDICT, VP_SET, COMPARE} state_e;

  state_e state;
  logic   init_issued;   // init_start already given
  logic   vp_issued;     // vp_start already given
  logic   in_frame;      // COMPARE has seen the first pixel
  logic   after_cmp;     // PREDICT follows a comparison

  logic first_px, last_px;
  assign first_px = lk_valid && lk_h == '0 && lk_v == '0;
  assign last_px  = lk_valid && lk_h == CW'(H_VALID - 1) && lk_v == CW'(V_VALID - 1);

  always_comb begin
    init_start   = (state == INIT) && !init_issued;
    predict      = (state == PREDICT);
    center_start = (state == PREDICT) && after_cmp;
    vp_start     = (state == VP_SET) && !vp_issued;
    cmp_start    = (state == COMPARE) && !in_frame && first_px;
    cmp_en       = (state == COMPARE) && lk_valid && (in_frame || first_px);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= INIT;
      init_issued <= 1'b0; vp_issued <= 1'b0; in_frame <= 1'b0; after_cmp <= 1'b0;
      frames <= '0;
    end else begin
      unique case (state)
        INIT: begin
          init_issued <= 1'b1;
          if (init_done) begin
            state     <= PREDICT;
            after_cmp <= 1'b0;
          end
        end
        PREDICT: begin
          state     <= VP_SET;
          vp_issued <= 1'b0;
        end
        VP_SET: begin
          vp_issued <= 1'b1;
          if (vp_done) begin
            state    <= COMPARE;
            in_frame <= 1'b0;
          end
        end
        COMPARE: begin
          if (cmp_start) in_frame <= 1'b1;
          if (cmp_en && last_px) begin
            state     <= PREDICT;
            after_cmp <= 1'b1;
            frames    <= frames + 1;
          end
        end
      endcase
    end
  end

  // Sequencing rules: prediction lasts one clock and is followed by the
  // start of virtual particle generation; the particle side reports
  // completion only in the state that waits for it; comparison is enabled
  // only in COMPARE and starts on pixel (0,0).
  a_predict_one: assert property (@(posedge clk) disable iff (!rst_n) predict |=> !predict);
  a_vp_follows:  assert property (@(posedge clk) disable iff (!rst_n) predict |=> vp_start);
  a_vp_done:     assert property (@(posedge clk) disable iff (!rst_n) vp_done |-> state == VP_SET);
  a_init_done:   assert property (@(posedge clk) disable iff (!rst_n) init_done |-> state == INIT);
  a_cmp_start:   assert property (@(posedge clk) disable iff (!rst_n) cmp_start |-> cmp_en && first_px);

  assign phase = state;

endmodule
