// tb_next_vp_generator: starts virtual particle generation for random real
// particles and weights and checks: exactly B writes with indices 0..B-1 on
// consecutive clocks, the last one B+1 clocks after start, done with it;
// every position offset within [-sigma, sigma] and every velocity offset
// within [-sigma/8, sigma/8] (sigma = (1023 - w) / 16), saturated to the
// frame; both extremes of the range reached; weight 1023 gives copies of
// the real particle.
module tb_next_vp_generator;
  import pf_pkg::*;
  localparam int B = 20, HV = 640, VV = 480;
  localparam int IW = $clog2(B+1);
  logic clk = 0, rst_n = 0, start = 0;
  pstate_t rp, vp_state;
  logic [WW-1:0] w_rp;
  logic vp_we, done;
  logic [IW-1:0] vp_idx;
  int checks = 0, failures = 0;
  int hit_lo = 0, hit_hi = 0, clamped = 0;

  next_vp_generator #(.B(B), .H_VALID(HV), .V_VALID(VV)) dut (
    .clk, .rst_n, .start, .rp, .w_rp, .vp_we, .vp_idx, .vp_state, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  initial begin
    int sig, sv, writes, lat, dx, dy;
    rp = '0; w_rp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      rp.x = XW'((t % 9 == 0) ? 2 : $urandom_range(0, HV - 1));
      rp.y = YW'((t % 9 == 1) ? VV - 2 : $urandom_range(0, VV - 1));
      rp.vx = VW'($urandom_range(0, 31));
      rp.vy = VW'($urandom_range(0, 31));
      w_rp = WW'((t % 13 == 0) ? 1023 : (t % 13 == 1) ? 0 : $urandom_range(0, 1023));
      sig = (1023 - int'(w_rp)) / 16;
      sv = sig / 8;
      start = 1;
      @(negedge clk);
      start = 0;
      writes = 0; lat = 1;
      while (writes < B && lat < B + 10) begin
        if (vp_we) begin
          checks++;
          if (int'(vp_idx) != writes) begin failures++; $display("idx %0d want %0d", vp_idx, writes); end
          dx = int'(vp_state.x) - int'(rp.x);
          dy = int'(vp_state.y) - int'(rp.y);
          checks++;
          if (!((dx >= -sig && dx <= sig) || (vp_state.x == 0 && int'(rp.x) - sig < 0) ||
                (int'(vp_state.x) == HV - 1 && int'(rp.x) + sig > HV - 1)) ||
              !((dy >= -sig && dy <= sig) || (vp_state.y == 0 && int'(rp.y) - sig < 0) ||
                (int'(vp_state.y) == VV - 1 && int'(rp.y) + sig > VV - 1)) ||
              vp_state.vx < $signed(sat(int'(rp.vx) - sv, -16, 15)) ||
              vp_state.vx > $signed(sat(int'(rp.vx) + sv, -16, 15)) ||
              vp_state.vy < $signed(sat(int'(rp.vy) - sv, -16, 15)) ||
              vp_state.vy > $signed(sat(int'(rp.vy) + sv, -16, 15))) begin
            failures++;
            if (failures < 10) $display("t=%0d sigma=%0d rp=%p vp=%p", t, sig, rp, vp_state);
          end
          if (w_rp == 1023) begin
            checks++;
            if (vp_state != rp) begin failures++; $display("sigma 0 must copy rp"); end
          end
          if (dx == -sig && sig > 0) hit_lo++;
          if (dx == sig && sig > 0) hit_hi++;
          if ((vp_state.x == 0 && dx > -sig) || (vp_state.y == VV - 1 && dy < sig)) clamped++;
          writes++;
          if (writes == B) begin
            checks++;
            if (!done || lat != B + 1) begin failures++; $display("last write at %0d, done=%0d", lat, done); end
          end
        end else if (done) begin
          failures++; $display("done early");
        end
        @(negedge clk);
        lat++;
      end
      checks++;
      if (writes != B) begin failures++; $display("only %0d writes", writes); end
      repeat (3) begin
        checks++;
        if (vp_we || done) begin failures++; $display("extra write"); end
        @(negedge clk);
      end
    end
    checks++;
    if (hit_lo == 0 || hit_hi == 0 || clamped == 0) begin
      failures++; $display("coverage lo=%0d hi=%0d clamped=%0d", hit_lo, hit_hi, clamped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
