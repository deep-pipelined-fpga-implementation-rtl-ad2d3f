// tb_prediction: feeds random states to the prediction unit and compares
// its output with a model written here: its own copy of the two LFSRs
// (seeded like the block) and the motion equations x' = x + vx + nx,
// y' = y + vy + ny, v' = v + nv with saturation.  Checks also that the
// noise stays within -7..7 (position) and -1..1 (velocity) and is not
// constant, and that saturation at the frame edges is reached.
module tb_prediction;
  import pf_pkg::*;
  localparam logic [32:0] S0 = 33'h0_1357_2468;
  localparam logic [32:0] S1 = 33'h1_ABCD_0123;
  localparam int HV = 640, VV = 480;
  logic clk = 0, rst_n = 0;
  pstate_t st_in, st_out;
  int checks = 0, failures = 0;
  int sat_lo = 0, sat_hi = 0, noise_pos = 0, noise_neg = 0;

  prediction #(.H_VALID(HV), .V_VALID(VV), .SEED0(S0), .SEED1(S1)) dut (.clk, .rst_n, .st_in, .st_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [32:0] lfsr2(logic [32:0] s);
    for (int k = 0; k < 2; k++) s = {s[31:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    return s;
  endfunction

  function automatic int sat(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  initial begin
    logic [32:0] a, b;
    int nx, ny, nvx, nvy, ex, ey, evx, evy;
    a = S0; b = S1;
    st_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      st_in.x  = XW'((c % 50 == 0) ? 0 : (c % 50 == 1) ? HV - 1 : $urandom_range(0, HV - 1));
      st_in.y  = YW'((c % 50 == 2) ? 0 : (c % 50 == 3) ? VV - 1 : $urandom_range(0, VV - 1));
      st_in.vx = VW'($urandom_range(0, 31));
      st_in.vy = VW'($urandom_range(0, 31));
      #1;
      nx  = int'(a[2:0]) - int'(a[5:3]);
      ny  = int'(a[18:16]) - int'(a[21:19]);
      nvx = int'(b[0]) - int'(b[8]);
      nvy = int'(b[16]) - int'(b[24]);
      ex  = sat(int'(st_in.x) + int'(st_in.vx) + nx, 0, HV - 1);
      ey  = sat(int'(st_in.y) + int'(st_in.vy) + ny, 0, VV - 1);
      evx = sat(int'(st_in.vx) + nvx, -16, 15);
      evy = sat(int'(st_in.vy) + nvy, -16, 15);
      checks++;
      if (int'(st_out.x) != ex || int'(st_out.y) != ey ||
          int'(st_out.vx) != evx || int'(st_out.vy) != evy) begin
        failures++;
        if (failures < 10) $display("c=%0d in=%p out=%p want %0d %0d %0d %0d", c, st_in, st_out, ex, ey, evx, evy);
      end
      if (ex == 0 && int'(st_in.x) + int'(st_in.vx) + nx < 0) sat_lo++;
      if (ex == HV - 1 && int'(st_in.x) + int'(st_in.vx) + nx > HV - 1) sat_hi++;
      if (nx > 0) noise_pos++;
      if (nx < 0) noise_neg++;
      @(posedge clk);
      a = lfsr2(a); b = lfsr2(b);
    end
    checks++;
    if (sat_lo == 0 || sat_hi == 0 || noise_pos < 100 || noise_neg < 100) begin
      failures++; $display("coverage sat_lo=%0d sat_hi=%0d pos=%0d neg=%0d", sat_lo, sat_hi, noise_pos, noise_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
