// tb_particle: one particle (B = 8) on a 32x24 frame, driven through the
// controller's sequence by hand.  Checks: init load; prediction within the
// noise bounds of x + vx; virtual particle generation finishing B+1 clocks
// after vp_start with every virtual particle within sigma of the real one;
// a frame whose best pixel sits on virtual particle 3 selects that particle
// (state and weight); the spread after a weight-900 selection shrinks to
// sigma = 7; a frame with no weight keeps the real particle.
module tb_particle;
  import pf_pkg::*;
  localparam int B = 8, HV = 32, VV = 24;
  logic clk = 0, rst_n = 0;
  logic init_ld = 0, predict = 0, vp_start = 0, vp_done;
  logic cmp_en = 0, cmp_start = 0;
  pstate_t init_state, max_state, rp_state;
  logic [WW-1:0] w = 0, w_max;
  logic [CW-1:0] xw = 0, yw = 0;
  int checks = 0, failures = 0;

  particle #(.B(B), .H_VALID(HV), .V_VALID(VV), .IDX(3)) dut (
    .clk, .rst_n, .init_ld, .init_state, .predict, .vp_start, .vp_done,
    .cmp_en, .cmp_start, .w, .xw, .yw, .w_max, .max_state, .rp_state);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic do_predict_and_vp(int sigma);
    pstate_t src;
    int lat;
    src = max_state;
    @(negedge clk) predict = 1;
    @(negedge clk) predict = 0;
    check(iabs(int'(rp_state.x) - (int'(src.x) + int'(src.vx))) <= 7 ||
          rp_state.x == 0 || int'(rp_state.x) == HV - 1, "prediction x");
    check(iabs(int'(rp_state.y) - (int'(src.y) + int'(src.vy))) <= 7 ||
          rp_state.y == 0 || int'(rp_state.y) == VV - 1, "prediction y");
    check(iabs(int'(rp_state.vx) - int'(src.vx)) <= 1, "prediction vx");
    vp_start = 1;
    @(negedge clk) vp_start = 0;
    lat = 1;
    while (!vp_done && lat < 50) begin @(negedge clk); lat++; end
    check(lat == B + 1, $sformatf("vp generation took %0d clocks", lat));
    for (int n = 0; n < B; n++) begin
      check(iabs(int'(dut.vp[n].x) - int'(rp_state.x)) <= sigma &&
            iabs(int'(dut.vp[n].y) - int'(rp_state.y)) <= sigma,
            $sformatf("vp %0d outside sigma %0d", n, sigma));
    end
  endtask

  // stream one frame; weight wt at (hx, hy), w2 at (h2x, h2y), 0 elsewhere
  task automatic frame(int hx, int hy, int wt, int h2x, int h2y, int w2);
    for (int y = 0; y < VV; y++)
      for (int x = 0; x < HV; x++) begin
        cmp_en = 1; cmp_start = (x == 0 && y == 0);
        xw = CW'(x); yw = CW'(y);
        w = (x == hx && y == hy) ? WW'(wt) : (x == h2x && y == h2y) ? WW'(w2) : '0;
        @(negedge clk);
      end
    cmp_en = 0; cmp_start = 0;
    @(negedge clk);
  endtask

  initial begin
    pstate_t tgt, rp0;
    logic signed [VW-1:0] ovx, ovy;
    init_state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    init_state = '{x: 10'd16, y: 9'd12, vx: 5'sd2, vy: -5'sd1};
    init_ld = 1;
    @(negedge clk) init_ld = 0;
    check(max_state == init_state && w_max == 0, "init load");
    do_predict_and_vp(63);
    // target: virtual particle 3, and a weaker pixel on the real particle
    tgt = dut.vp[3];
    ovx = 0; ovy = 0;
    if (rp_state.x == tgt.x && rp_state.y == tgt.y) begin ovx |= rp_state.vx; ovy |= rp_state.vy; end
    for (int n = 0; n < B; n++)
      if (dut.vp[n].x == tgt.x && dut.vp[n].y == tgt.y) begin ovx |= dut.vp[n].vx; ovy |= dut.vp[n].vy; end
    rp0 = rp_state;
    frame(int'(tgt.x), int'(tgt.y), 900, int'(rp0.x), int'(rp0.y), 500);
    check(w_max == 900 && max_state.x == tgt.x && max_state.y == tgt.y &&
          max_state.vx == ovx && max_state.vy == ovy, "virtual particle selected");
    do_predict_and_vp((1023 - 900) / 16);
    rp0 = rp_state;
    frame(-1, -1, 0, -1, -1, 0);
    check(w_max == 0 && max_state == rp0, "real particle kept on an empty frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
