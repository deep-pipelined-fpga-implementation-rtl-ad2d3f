// tb_pf_controller: runs the controller against a continuous 12x6 raster
// with an 8x4 valid region and simple models of the particle side
// (init_done 5 clocks after init_start, vp_done 4 clocks after vp_start).
// Checks the state sequence INIT -> PREDICT -> VP_SET -> COMPARE ->
// PREDICT ...: one init_start; predict for one clock, vp_start the clock
// after it; comparison starting only at pixel (0,0), never on a partial
// frame; exactly 32 compared pixels per frame; PREDICT and center_start in
// the clock after the last pixel (but no center_start after INIT).
module tb_pf_controller;
  import pf_pkg::*;
  localparam int HV = 8, VV = 4, HT = 12, VT = 6;
  logic clk = 0, rst_n = 0;
  logic lk_valid = 0;
  logic [CW-1:0] lk_h = 0, lk_v = 0;
  logic init_start, init_done = 0, predict, vp_start, vp_done = 0;
  logic cmp_en, cmp_start, center_start;
  logic [1:0] phase;
  logic [31:0] frames;
  int checks = 0, failures = 0;

  pf_controller #(.H_VALID(HV), .V_VALID(VV)) dut (
    .clk, .rst_n, .lk_valid, .lk_h, .lk_v, .init_start, .init_done, .predict,
    .vp_start, .vp_done, .cmp_en, .cmp_start, .center_start, .phase, .frames);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("%0t: %s", $time, s);
  endtask

  int hc = 5, vc = 0;      // raster position, starting mid-frame
  int init_cnt = 0, vp_cnt = 0, cmp_cnt = 0, frames_seen = 0;
  int init_timer = -1, vp_timer = -1;
  bit prev_predict = 0, prev_last = 0, in_cmp = 0, seen_center = 0;

  always @(negedge clk) if (rst_n) begin
    // checks on the outputs of this clock
    checks++;
    if (init_start) begin init_cnt++; init_timer = 5; end
    if (predict && (prev_predict)) fail("predict longer than one clock");
    if (vp_start != prev_predict) fail("vp_start must follow predict");
    if (vp_start) vp_timer = 4;
    if (cmp_start && !(lk_valid && lk_h == 0 && lk_v == 0)) fail("cmp_start off pixel (0,0)");
    if (cmp_start) begin in_cmp = 1; cmp_cnt = 0; end
    if (cmp_en && !in_cmp) fail("compare outside a whole frame");
    if (cmp_en) cmp_cnt++;
    if (predict != prev_last && !(predict && frames == 0)) fail("predict must follow the last pixel");
    if (center_start != (predict && prev_last)) fail("center_start wrong");
    if (center_start) seen_center = 1;
    if (prev_last) begin
      frames_seen++;
      if (cmp_cnt != HV * VV) fail($sformatf("compared %0d pixels", cmp_cnt));
      if (int'(frames) != frames_seen) fail("frame counter");
      in_cmp = 0;
    end
    prev_predict = predict;
    prev_last = cmp_en && lk_h == CW'(HV - 1) && lk_v == CW'(VV - 1);
  end

  // particle-side models and raster, driven just after the rising edge
  always @(posedge clk) if (rst_n) begin
    #1;
    init_done = (init_timer == 0);
    if (init_timer >= 0) init_timer--;
    vp_done = (vp_timer == 0);
    if (vp_timer >= 0) vp_timer--;
    // raster
    hc++;
    if (hc == HT) begin hc = 0; vc = (vc + 1) % VT; end
    lk_valid = (hc < HV && vc < VV);
    lk_h = CW'(hc); lk_v = CW'(vc);
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (12 * 6 * 8) @(posedge clk);
    @(negedge clk);
    checks++;
    if (init_cnt != 1) fail("init_start count");
    checks++;
    if (frames_seen < 6 || !seen_center) fail($sformatf("only %0d frames", frames_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
