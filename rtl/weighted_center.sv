// weighted_center: weighted centre of gravity of the particles, the
// estimated target position:
//   xc = sum(x_i w_i) / sum(w_i),  yc = sum(y_i w_i) / sum(w_i)
// over the M selected particle states.
//
// The particles are read one per clock through a multiplier stage into
// three accumulators, then both quotients are formed by two restoring
// dividers that share the divisor and run DIV_W iterations, one bit per
// clock.  With a start pulse in clock s the result is presented in clock
// s + M + DIV_W + 4 (valid pulses for one clock): M + 36 clocks with the
// default 32-bit divider, the centre latency of the architecture.  The
// serial structure is this design's choice.  If all weights are zero the
// previous centre is kept and hold is raised with valid.
module weighted_center
  import pf_pkg::*;
#(
  parameter int unsigned M     = 100,
  parameter int unsigned DIV_W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WW-1:0] w_i [M],
  input  logic [XW-1:0] x_i [M],
  input  logic [YW-1:0] y_i [M],
  output logic [XW-1:0] xc,
  output logic [YW-1:0] yc,
  output logic          valid,
  output logic          hold
);

  localparam int unsigned CNTW = $clog2(M + DIV_W + 8);
  localparam int unsigned IW   = $clog2(M);
  localparam int unsigned RW   = WW + $clog2(M + 1) + 1;   // divisor / remainder width

  logic            running;
  logic [CNTW-1:0] cnt;

  // multiplier stage
  logic [IW-1:0]     idx;
  logic              p_v;
  logic [XW+WW-1:0]  p_x;
  logic [YW+WW-1:0]  p_y;
  logic [WW-1:0]     p_w;

  // accumulators and dividers
  logic [DIV_W-1:0] s_x, s_y;
  logic [RW-1:0]    s_w;
  logic [DIV_W-1:0] q_x, q_y;
  logic [RW:0]      r_x, r_y;

  assign idx = IW'(cnt - 1'b1);

  function automatic logic [RW:0] shift_in(input logic [RW:0] r, input logic b);
    return {r[RW-1:0], b};
  endfunction

  logic [RW:0] tx, ty;
  assign tx = shift_in(r_x, q_x[DIV_W-1]);
  assign ty = shift_in(r_y, q_y[DIV_W-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; cnt <= '0;
      p_v <= 1'b0; p_x <= '0; p_y <= '0; p_w <= '0;
      s_x <= '0; s_y <= '0; s_w <= '0;
      q_x <= '0; q_y <= '0; r_x <= '0; r_y <= '0;
      xc <= '0; yc <= '0; valid <= 1'b0; hold <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        running <= 1'b1;
        cnt <= CNTW'(1);
        s_x <= '0; s_y <= '0; s_w <= '0;
        p_v <= 1'b0;
      end else if (running) begin
        cnt <= cnt + 1'b1;
        // read particle cnt-1 during clocks 1..M
        p_v <= (cnt >= CNTW'(1)) && (cnt <= CNTW'(M));
        if ((cnt >= CNTW'(1)) && (cnt <= CNTW'(M))) begin
          p_x <= (XW+WW)'(x_i[idx]) * (XW+WW)'(w_i[idx]);
          p_y <= (YW+WW)'(y_i[idx]) * (YW+WW)'(w_i[idx]);
          p_w <= w_i[idx];
        end
        if (p_v) begin
          s_x <= s_x + DIV_W'(p_x);
          s_y <= s_y + DIV_W'(p_y);
          s_w <= s_w + RW'(p_w);
        end
        if (cnt == CNTW'(M + 2)) begin
          q_x <= s_x; q_y <= s_y;
          r_x <= '0;  r_y <= '0;
        end else if (cnt > CNTW'(M + 2) && cnt <= CNTW'(M + 2 + DIV_W)) begin
          // one restoring division step for each coordinate
          if (tx >= {1'b0, s_w}) begin
            r_x <= tx - {1'b0, s_w};
            q_x <= {q_x[DIV_W-2:0], 1'b1};
          end else begin
            r_x <= tx;
            q_x <= {q_x[DIV_W-2:0], 1'b0};
          end
          if (ty >= {1'b0, s_w}) begin
            r_y <= ty - {1'b0, s_w};
            q_y <= {q_y[DIV_W-2:0], 1'b1};
          end else begin
            r_y <= ty;
            q_y <= {q_y[DIV_W-2:0], 1'b0};
          end
        end else if (cnt == CNTW'(M + 3 + DIV_W)) begin
          running <= 1'b0;
          valid   <= 1'b1;
          hold    <= (s_w == '0);
          if (s_w != '0) begin
            xc <= q_x[XW-1:0];
            yc <= q_y[YW-1:0];
          end
        end
      end
    end
  end

  // A new start must not arrive while a calculation is running.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !running);

endmodule
