// tb_init_rp_generator: checks that a start pulse yields exactly M loads
// with indices 0..M-1 on consecutive clocks starting two clocks after the
// pulse, done with the last, states
// inside the frame and velocities in -3..3, and that the positions are
// spread over the frame (all four quadrants used).
module tb_init_rp_generator;
  import pf_pkg::*;
  localparam int M = 64, HV = 640, VV = 480;
  logic clk = 0, rst_n = 0, start = 0;
  logic ld, done;
  logic [$clog2(M+1)-1:0] idx;
  pstate_t state;
  int checks = 0, failures = 0;

  init_rp_generator #(.M(M), .H_VALID(HV), .V_VALID(VV)) dut (.clk, .rst_n, .start, .ld, .idx, .state, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, lat;
    int quad [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      quad = '{0, 0, 0, 0};
      @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      n = 0; lat = 1;
      while (n < M && lat < M + 10) begin
        if (ld) begin
          checks++;
          if (int'(idx) != n || int'(state.x) >= HV || int'(state.y) >= VV ||
              state.vx < -3 || state.vx > 3 || state.vy < -3 || state.vy > 3 ||
              (done != (n == M - 1)) || lat != n + 2) begin
            failures++;
            if (failures < 10) $display("n=%0d idx=%0d state=%p done=%0d lat=%0d", n, idx, state, done, lat);
          end
          quad[(int'(state.x) >= HV / 2 ? 1 : 0) + (int'(state.y) >= VV / 2 ? 2 : 0)]++;
          n++;
        end
        @(negedge clk);
        lat++;
      end
      checks++;
      if (n != M || ld) begin failures++; $display("loads %0d", n); end
      checks++;
      if (quad[0] == 0 || quad[1] == 0 || quad[2] == 0 || quad[3] == 0) begin
        failures++; $display("poor spread %p", quad);
      end
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
