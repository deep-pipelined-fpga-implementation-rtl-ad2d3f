// tb_center_drawing: streams a small random frame through the drawing
// stage and checks each output pixel one clock later: marker colour on the
// centre's row and column once show is set, the camera pixel elsewhere and
// before show.
module tb_center_drawing;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0, show = 0, in_valid = 0;
  logic [XW-1:0] xc = 0;  logic [YW-1:0] yc = 0;
  logic [7:0] in_r = 0, in_g = 0, in_b = 0, out_r, out_g, out_b;
  logic [CW-1:0] in_h = 0, in_v = 0, out_h, out_v;
  logic out_valid, out_mark;
  int checks = 0, failures = 0, marks = 0;

  center_drawing dut (.clk, .rst_n, .show, .xc, .yc, .in_valid, .in_r, .in_g, .in_b,
                      .in_h, .in_v, .out_valid, .out_r, .out_g, .out_b, .out_h, .out_v, .out_mark);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp_rgb;
    bit exp_mark;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      show = (f != 0);
      xc = XW'($urandom_range(0, 31)); yc = YW'($urandom_range(0, 23));
      for (int y = 0; y < 24; y++)
        for (int x = 0; x < 36; x++) begin
          @(negedge clk);
          in_valid = (x < 32);
          in_h = CW'(x); in_v = CW'(y);
          in_r = 8'($urandom); in_g = 8'($urandom); in_b = 8'($urandom);
          exp_mark = show && in_valid && (x == int'(xc) || y == int'(yc));
          exp_rgb = exp_mark ? 24'h00FF00 : {in_r, in_g, in_b};
          @(negedge clk);
          checks++;
          if (out_valid != in_valid || out_mark != exp_mark || {out_r, out_g, out_b} != exp_rgb ||
              out_h != in_h || out_v != in_v) begin
            failures++;
            if (failures < 10) $display("x=%0d y=%0d mark=%0d/%0d", x, y, out_mark, exp_mark);
          end
          if (exp_mark) marks++;
        end
    end
    checks++;
    if (marks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
