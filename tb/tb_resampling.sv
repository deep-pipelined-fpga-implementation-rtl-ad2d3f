// tb_resampling: one particle with B = 6 virtual particles watches random
// likelihood streams over a small 16x12 frame.  A reference written here
// keeps the best (weight, coordinate, velocity) among the candidates'
// pixels; after each frame the block's w_max and selected state must equal
// it.  Covers: a virtual particle winning, the real particle being kept
// when nothing beats weight 0, candidates sharing a coordinate (their
// velocities are ORed), equal weights (the first one stays), and load.
module tb_resampling;
  import pf_pkg::*;
  localparam int B = 6;
  localparam int HV = 16, VV = 12;
  logic clk = 0, rst_n = 0;
  logic cmp_en = 0, cmp_start = 0, load = 0;
  logic [WW-1:0] w = 0;
  logic [CW-1:0] xw = 0, yw = 0;
  pstate_t rp, load_state;
  pstate_t vp [B];
  logic [WW-1:0] w_max;
  pstate_t max_state;
  int checks = 0, failures = 0;
  int vp_wins = 0, rp_kept = 0, shared = 0;

  resampling #(.B(B)) dut (.clk, .rst_n, .cmp_en, .cmp_start, .w, .xw, .yw,
                           .rp, .vp, .load, .load_state, .w_max, .max_state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pstate_t rnd_state();
    pstate_t s;
    s.x = XW'($urandom_range(0, HV - 1));
    s.y = YW'($urandom_range(0, VV - 1));
    s.vx = VW'($urandom_range(0, 31));
    s.vy = VW'($urandom_range(0, 31));
    return s;
  endfunction

  initial begin
    int bw;
    pstate_t bs;
    bit zero_frame;
    rp = '0; load_state = '0;
    for (int n = 0; n < B; n++) vp[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // load presets the selection
    load_state = rnd_state();
    load = 1; @(negedge clk); load = 0;
    checks++;
    if (w_max != 0 || max_state != load_state) begin failures++; $display("load failed"); end

    for (int f = 0; f < 300; f++) begin
      zero_frame = (f % 10 == 3);
      rp = rnd_state();
      for (int n = 0; n < B; n++) begin
        vp[n] = rnd_state();
        if (f % 7 == 2 && n == 1) vp[n].x = vp[0].x;     // shared coordinate
        if (f % 7 == 2 && n == 1) vp[n].y = vp[0].y;
      end
      bw = 0; bs = rp;
      for (int y = 0; y < VV; y++) begin
        for (int x = 0; x < HV; x++) begin
          int ww;
          bit m;
          logic signed [VW-1:0] ovx, ovy;
          ww = zero_frame ? 0 : ((f % 5 == 0) ? 512 : $urandom_range(0, 1023));
          cmp_en = 1; cmp_start = (x == 0 && y == 0);
          xw = CW'(x); yw = CW'(y); w = WW'(ww);
          m = 0; ovx = 0; ovy = 0;
          if (rp.x == x && rp.y == y) begin m = 1; ovx |= rp.vx; ovy |= rp.vy; end
          for (int n = 0; n < B; n++)
            if (vp[n].x == x && vp[n].y == y) begin m = 1; ovx |= vp[n].vx; ovy |= vp[n].vy; end
          if (m && ww > bw) begin
            bw = ww; bs.x = XW'(x); bs.y = YW'(y); bs.vx = ovx; bs.vy = ovy;
          end
          @(negedge clk);
          // a gap of invalid pixels at the end of each row
          if (x == HV - 1) begin cmp_en = 0; cmp_start = 0; w = 1023; @(negedge clk); @(negedge clk); end
        end
      end
      cmp_en = 0; cmp_start = 0;
      @(negedge clk);
      checks++;
      if (w_max != WW'(bw) || max_state != bs) begin
        failures++;
        if (failures < 10) $display("frame %0d: w_max %0d want %0d, state %h want %h", f, w_max, bw, max_state, bs);
      end
      if (bw == 0) rp_kept++;
      else if (bs.x != rp.x || bs.y != rp.y) vp_wins++;
      if (f % 7 == 2 && bw != 0 && bs.x == vp[0].x && bs.y == vp[0].y) shared++;
    end
    checks++;
    if (vp_wins == 0 || rp_kept == 0 || shared == 0) begin
      failures++; $display("coverage: vp_wins=%0d rp_kept=%0d shared=%0d", vp_wins, rp_kept, shared);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
