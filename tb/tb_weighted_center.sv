// tb_weighted_center: random particle sets (M = 7 and full size M = 100 in
// a second instance) against sum(x w) / sum(w) computed here; the result
// must appear exactly M + 36 clocks after start.  An all-zero weight set
// must keep the previous centre and raise hold.
module tb_weighted_center;
  import pf_pkg::*;
  localparam int M1 = 7, M2 = 100;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic start1 = 0, start2 = 0;
  logic [WW-1:0] w1 [M1];  logic [XW-1:0] x1 [M1];  logic [YW-1:0] y1 [M1];
  logic [WW-1:0] w2 [M2];  logic [XW-1:0] x2 [M2];  logic [YW-1:0] y2 [M2];
  logic [XW-1:0] xc1, xc2;  logic [YW-1:0] yc1, yc2;
  logic v1, v2, h1, h2;

  weighted_center #(.M(M1)) dut1 (.clk, .rst_n, .start(start1), .w_i(w1), .x_i(x1), .y_i(y1),
                                  .xc(xc1), .yc(yc1), .valid(v1), .hold(h1));
  weighted_center dut2 (.clk, .rst_n, .start(start2), .w_i(w2), .x_i(x2), .y_i(y2),
                        .xc(xc2), .yc(yc2), .valid(v2), .hold(h2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sw, sx, sy;
    int ex, ey, px, py, lat;
    bit zero;
    repeat (3) @(posedge clk);
    rst_n = 1;
    px = 0; py = 0;
    for (int t = 0; t < 60; t++) begin
      zero = (t % 10 == 4);
      sw = 0; sx = 0; sy = 0;
      for (int i = 0; i < M1; i++) begin
        w1[i] = zero ? '0 : WW'($urandom_range(0, 1023));
        x1[i] = XW'($urandom_range(0, 639));
        y1[i] = YW'($urandom_range(0, 479));
        sw += w1[i]; sx += longint'(x1[i]) * w1[i]; sy += longint'(y1[i]) * w1[i];
      end
      ex = (sw == 0) ? px : int'(sx / sw);
      ey = (sw == 0) ? py : int'(sy / sw);
      @(negedge clk); start1 = 1; @(negedge clk); start1 = 0;
      lat = 1;
      while (!v1 && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (lat != M1 + 36 || int'(xc1) != ex || int'(yc1) != ey || h1 != (sw == 0)) begin
        failures++;
        $display("M1 t=%0d lat=%0d xc=%0d/%0d yc=%0d/%0d hold=%0d", t, lat, xc1, ex, yc1, ey, h1);
      end
      px = ex; py = ey;
    end
    for (int t = 0; t < 5; t++) begin
      sw = 0; sx = 0; sy = 0;
      for (int i = 0; i < M2; i++) begin
        w2[i] = WW'((t == 0) ? 1023 : $urandom_range(0, 1023));
        x2[i] = XW'((t == 0) ? 639 : $urandom_range(0, 639));
        y2[i] = YW'((t == 0) ? 479 : $urandom_range(0, 479));
        sw += w2[i]; sx += longint'(x2[i]) * w2[i]; sy += longint'(y2[i]) * w2[i];
      end
      @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
      lat = 1;
      while (!v2 && lat < 400) begin @(negedge clk); lat++; end
      checks++;
      if (lat != M2 + 36 || longint'(xc2) != sx / sw || longint'(yc2) != sy / sw) begin
        failures++;
        $display("M2 t=%0d lat=%0d xc=%0d/%0d yc=%0d/%0d", t, lat, xc2, sx / sw, yc2, sy / sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
