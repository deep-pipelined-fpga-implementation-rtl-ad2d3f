// tb_likelihood: drives random and hand-picked RGB pixels into the
// likelihood pipeline and compares each weight, three clocks later, with a
// reference computed here in real arithmetic (floor of the hue formula and
// floor(1023 exp(-Hd^2/800))).  Also checks that the coordinates and the
// valid flag are delayed by exactly three clocks.
module tb_likelihood;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] r = 0, g = 0, b = 0;
  logic [CW-1:0] in_h = 0, in_v = 0;
  logic out_valid;
  logic [WW-1:0] w;
  logic [CW-1:0] out_h, out_v;
  int checks = 0, failures = 0;

  likelihood dut (.clk, .rst_n, .in_valid, .r, .g, .b, .in_h, .in_v,
                  .out_valid, .w, .out_h, .out_v);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_hue(int rr, int gg, int bb);
    int mx, mn, d;
    mx = rr; if (gg > mx) mx = gg; if (bb > mx) mx = bb;
    mn = rr; if (gg < mn) mn = gg; if (bb < mn) mn = bb;
    d = mx - mn;
    if (!(2 * d > mx)) return -1;
    if (rr == mx) return 42 + int'($floor(42.0 * real'(gg - bb) / real'(d)));
    if (gg == mx) return 126 + int'($floor(42.0 * real'(bb - rr) / real'(d)));
    return 210 + int'($floor(42.0 * real'(rr - gg) / real'(d)));
  endfunction

  function automatic int ref_w(int rr, int gg, int bb);
    int h, dh, hd;
    h = ref_hue(rr, gg, bb);
    if (h == -1 || rr < 64) return 0;
    dh = (h > 40) ? h - 40 : 40 - h;
    hd = (253 - dh < dh) ? 253 - dh : dh;
    return int'($floor(1023.0 * $exp(-real'(hd * hd) / 800.0)));
  endfunction

  typedef struct { int w; int h; int v; } exp_t;
  exp_t q[$];
  int pix_in = 0, pix_out = 0, nonzero = 0, peak = 0;

  task automatic drive(int rr, int gg, int bb);
    exp_t e;
    r = 8'(rr); g = 8'(gg); b = 8'(bb); in_valid = 1;
    in_h = CW'(pix_in % 640); in_v = CW'(pix_in / 640);
    e.w = ref_w(rr, gg, bb); e.h = pix_in % 640; e.v = pix_in / 640;
    q.push_back(e);
    pix_in++;
  endtask

  // output checker: the i-th output must follow the i-th input by 3 clocks
  int sent_cycle[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) sent_cycle.push_back(cyc);
    if (out_valid) begin
      exp_t e;
      int sc;
      e = q.pop_front();
      sc = sent_cycle.pop_front();
      checks++;
      if (int'(w) != e.w || int'(out_h) != e.h || int'(out_v) != e.v || cyc - sc != 3) begin
        failures++;
        if (failures < 10) $display("mismatch: w=%0d want %0d h=%0d/%0d v=%0d/%0d lat=%0d",
                                    w, e.w, out_h, e.h, out_v, e.v, cyc - sc);
      end
      if (w != 0) nonzero++;
      if (w == 1023) peak++;
      pix_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // hand-picked pixels: target hue (R max, G < B), exact hue 40, ties, grey,
    // dark red, pure colours, boundary delta = max/2
    drive(200, 20, 24);  @(negedge clk);
    drive(210, 0, 5);    @(negedge clk);
    drive(255, 0, 0);    @(negedge clk);
    drive(255, 255, 0);  @(negedge clk);
    drive(0, 255, 0);    @(negedge clk);
    drive(0, 0, 255);    @(negedge clk);
    drive(100, 100, 100);@(negedge clk);
    drive(63, 0, 2);     @(negedge clk);
    drive(64, 0, 2);     @(negedge clk);
    drive(200, 100, 100);@(negedge clk);
    drive(200, 99, 99);  @(negedge clk);
    drive(100, 0, 200);  @(negedge clk);
    drive(255, 0, 254);  @(negedge clk);
    drive(0, 0, 0);      @(negedge clk);
    in_valid = 0;        @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      drive($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
      @(negedge clk);
      if (i % 97 == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (pix_out != pix_in) begin failures++; $display("count %0d vs %0d", pix_out, pix_in); end
    checks++;
    if (nonzero < 100 || peak < 1) begin failures++; $display("too few non-zero weights"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
