// tb_particle_filter_full: the tracker at its default size (M = 100 real
// particles, B = 50 virtual particles each, 640x480 valid pixels in an
// 858x525 raster, one pixel per clock) over four frames.  The camera model
// sends a grey background with a red ball of radius 20 moving 2 pixels per
// frame.  Checks: the centre of each frame arrives exactly
//   858 * 479 + 640 + 3 + 100 + 36 = 411,761
// clocks after the frame's first valid pixel, i.e. before the next frame
// starts (a frame is 858 * 525 = 450,450 clocks); from the second frame on
// the centre is inside the ball's bounding box; virtual particles replace
// real ones; the cross is drawn through the centre.
module tb_particle_filter_full;
  import pf_pkg::*;
  localparam int M = 100, B = 50;
  localparam int HV = 640, VV = 480, HT = 858, VT = 525;
  localparam int RAD = 20;
  localparam int NFRAMES = 4;
  localparam int EMPTY_FRAME = -1;
  localparam int LAT = HT * (VV - 1) + HV + 3 + M + 36;
  localparam int BX0 = 300, BY0 = 200;

  logic clk = 0, rst_n = 0;
  logic cam_valid = 0;
  logic [7:0] cam_r = 0, cam_g = 0, cam_b = 0;
  logic [CW-1:0] cam_h = 0, cam_v = 0;
  logic vid_valid, vid_mark, center_valid, center_hold;
  logic [7:0] vid_r, vid_g, vid_b;
  logic [CW-1:0] vid_h, vid_v;
  logic [XW-1:0] center_x;
  logic [YW-1:0] center_y;
  logic [1:0] phase;
  logic [31:0] frames;
  int checks = 0, failures = 0;

  particle_filter_top dut (
    .clk, .rst_n, .cam_valid, .cam_r, .cam_g, .cam_b, .cam_h, .cam_v,
    .vid_valid, .vid_r, .vid_g, .vid_b, .vid_h, .vid_v, .vid_mark,
    .center_x, .center_y, .center_valid, .center_hold, .phase, .frames);

  always #5 clk = ~clk;

  initial begin
    repeat (HT * VT * (NFRAMES + 3)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  // camera raster, starting in the blanking region so the filter can
  // initialise before the first frame
  int hc = 0, vc = VV, fno = -1;
  longint cyc = 0, t_first = -1;
  int bx = BX0, by = BY0;
  bit ball_on = 1;

  always @(posedge clk) if (rst_n) begin
    #1;
    cyc++;
    hc++;
    if (hc == HT) begin
      hc = 0; vc++;
      if (vc == VT) begin
        vc = 0; fno++;
        bx = BX0 + 2 * fno; by = BY0;
        ball_on = (fno != EMPTY_FRAME);
      end
    end
    cam_valid = (hc < HV && vc < VV);
    cam_h = CW'(hc); cam_v = CW'(vc);
    if (cam_valid && ball_on && (hc - bx) * (hc - bx) + (vc - by) * (vc - by) <= RAD * RAD) begin
      cam_r = 200; cam_g = 20; cam_b = 24;
    end else begin
      cam_r = 100; cam_g = 100; cam_b = 100;
    end
  end

  // mechanism counters
  int n_init = 0, n_vp_win = 0, n_rp_kept = 0, n_vp_gen = 0, n_hold = 0, n_mark = 0, n_centre = 0;
  int n_pred = 0;
  longint frame_start [int];
  int mark_bad = 0;

  // a virtual particle replaces the real one: an update whose match
  // does not include the real particle (candidate 0), in any particle
  for (genvar i = 0; i < M; i++) begin : g_mon
    always @(negedge clk)
      if (dut.g_particle[i].u_particle.u_resampling.update &&
          !dut.g_particle[i].u_particle.u_resampling.match[0]) n_vp_win++;
  end

  always @(negedge clk) if (rst_n) begin
    if (dut.u_ctrl.init_start) n_init++;
    if (dut.u_ctrl.predict) n_pred++;
    if (dut.u_ctrl.vp_start) n_vp_gen++;
    if (dut.u_ctrl.center_start && dut.g_particle[0].u_particle.w_max == 0) n_rp_kept++;
    if (cam_valid && cam_h == 0 && cam_v == 0) frame_start[fno] = cyc;
    if (vid_mark) begin
      n_mark++;
      if (vid_h != CW'(center_x) && vid_v != CW'(center_y)) mark_bad++;
      if ({vid_r, vid_g, vid_b} != 24'h00FF00) mark_bad++;
    end
    if (center_valid) begin
      int f, ex, ey;
      n_centre++;
      f = int'(frames) - 1;    // frame just compared, counted from the first compared one
      // the frame the centre belongs to is the latest that started LAT clocks ago
      check(frame_start.exists(fno) && cyc - frame_start[fno] == LAT,
            $sformatf("centre latency %0d, expected %0d", cyc - frame_start[fno], LAT));
      check(!(hc < HV && vc < VV), "centre must appear in the blanking region");
      if (fno == EMPTY_FRAME) begin
        n_hold++;
        check(center_hold == 1, "empty frame must hold the centre");
      end else begin
        check(center_hold == 0, "hold without reason");
        ex = BX0 + 2 * fno; ey = BY0;
        if (f >= 1)
          check(iabs(int'(center_x) - ex) <= RAD && iabs(int'(center_y) - ey) <= RAD,
                $sformatf("frame %0d: centre (%0d,%0d), ball (%0d,%0d)", fno, center_x, center_y, ex, ey));
      end
      $display("frame %0d: centre (%0d,%0d) hold=%0d", fno, center_x, center_y, center_hold);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (fno == NFRAMES);
    @(negedge clk);
    check(n_init == 1, "initialisation");
    check(n_centre >= NFRAMES - 2, $sformatf("only %0d centres", n_centre));
    check(n_vp_win > 0, "no virtual particle ever replaced a real one");
    check(n_pred >= NFRAMES - 1 && n_vp_gen == n_pred, "prediction / vp generation");
    check(n_mark > 0 && mark_bad == 0, $sformatf("drawing: %0d marks, %0d bad", n_mark, mark_bad));
    $display("mechanisms: init=%0d predict=%0d vp_gen=%0d vp_win=%0d rp_kept=%0d hold=%0d marks=%0d centres=%0d",
             n_init, n_pred, n_vp_gen, n_vp_win, n_rp_kept, n_hold, n_mark, n_centre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
