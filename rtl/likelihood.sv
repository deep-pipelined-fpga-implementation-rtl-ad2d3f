// likelihood: colour likelihood of each camera pixel, one pixel per clock.
//
// The weight of a pixel measures how close its hue is to the hue of the
// tracked object.  The hue is computed with an integer RGB-to-hue formula
// (hue -1 means "no usable hue", 0..252 otherwise):
//   delta = max(R,G,B) - min(R,G,B)
//   H =  42 + floor(42(G-B)/delta)  if R is the maximum
//   H = 126 + floor(42(B-R)/delta)  if G is the maximum
//   H = 210 + floor(42(R-G)/delta)  if B is the maximum
//   H = -1 unless delta > max/2
// The hue distance to the target is Hd = min(|H-Ht|, 253-|H-Ht|) and the
// weight is w = floor(ALPHA * exp(-Hd^2 / (2 S^2))) when H != -1 and
// R >= 64, else 0.  Ht = 40, ALPHA = 1023 and S = 20 by default.  Hd is at
// most 126, so the Gaussian is a 128-entry table computed at elaboration.
// When two channels share the maximum, R wins over G and G over B (the
// order of the cases above; this tie rule is a choice of this design).
//
// Pipeline (3 clocks from input to output, as in the architecture):
//   stage 1: max, min, delta, selected channel difference and hue offset
//   stage 2: division and hue value H
//   stage 3: hue distance and table lookup
// The pixel coordinate and the valid flag travel with the data.
module likelihood
  import pf_pkg::*;
#(
  parameter int unsigned HUE_T  = HUE_TARGET,
  parameter int unsigned ALPHA  = W_ALPHA,
  parameter int unsigned SPREAD = W_SPREAD
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    r,
  input  logic [7:0]    g,
  input  logic [7:0]    b,
  input  logic [CW-1:0] in_h,
  input  logic [CW-1:0] in_v,
  output logic          out_valid,
  output logic [WW-1:0] w,
  output logic [CW-1:0] out_h,
  output logic [CW-1:0] out_v
);

  // Gaussian weight table, evaluated once at elaboration.
  function automatic logic [WW-1:0] gauss(input int hd);
    real e;
    e = real'(ALPHA) * $exp(-(real'(hd) * real'(hd)) / (2.0 * real'(SPREAD) * real'(SPREAD)));
    return WW'($rtoi(e));
  endfunction

  logic [WW-1:0] w_table [128];
  for (genvar i = 0; i < 128; i++) begin : g_table
    localparam logic [WW-1:0] TV = gauss(i);
    assign w_table[i] = TV;
  end

  // ---------------- stage 1 ----------------
  logic [7:0] mx, mn;
  logic signed [8:0] diff_c;
  logic [7:0] base_c;
  always_comb begin
    mx = r; mn = r;
    if (g > mx) mx = g;
    if (b > mx) mx = b;
    if (g < mn) mn = g;
    if (b < mn) mn = b;
    if (r == mx) begin
      diff_c = $signed({1'b0, g}) - $signed({1'b0, b});
      base_c = 8'd42;
    end else if (g == mx) begin
      diff_c = $signed({1'b0, b}) - $signed({1'b0, r});
      base_c = 8'd126;
    end else begin
      diff_c = $signed({1'b0, r}) - $signed({1'b0, g});
      base_c = 8'd210;
    end
  end

  logic              s1_valid, s1_hue_ok, s1_r_ok;
  logic [7:0]        s1_delta, s1_base;
  logic signed [8:0] s1_diff;
  logic [CW-1:0]     s1_h, s1_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_hue_ok <= 1'b0; s1_r_ok <= 1'b0;
      s1_delta <= '0; s1_base <= '0; s1_diff <= '0;
      s1_h <= '0; s1_v <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_delta  <= mx - mn;
      // delta > max/2, kept exact by comparing 2*delta with max
      s1_hue_ok <= ({1'b0, mx - mn, 1'b0} > {2'b00, mx});
      s1_r_ok   <= (r >= 8'd64);
      s1_base   <= base_c;
      s1_diff   <= diff_c;
      s1_h      <= in_h;
      s1_v      <= in_v;
    end
  end

  // ---------------- stage 2 ----------------
  logic signed [15:0] num;
  logic signed [15:0] den;
  logic signed [15:0] quo;
  logic signed [15:0] rem;
  logic signed [15:0] flo;
  always_comb begin
    num = 16'sd42 * 16'(s1_diff);
    den = $signed({8'b0, s1_delta});
    if (s1_delta == 0) begin
      quo = '0; rem = '0;
    end else begin
      quo = num / den;
      rem = num % den;
    end
    // floor division: truncation rounds negative quotients up
    flo = (num < 0 && rem != 0) ? quo - 16'sd1 : quo;
  end

  logic              s2_valid, s2_r_ok;
  logic signed [9:0] s2_hue;
  logic [CW-1:0]     s2_h, s2_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0; s2_r_ok <= 1'b0; s2_hue <= -10'sd1;
      s2_h <= '0; s2_v <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_r_ok  <= s1_r_ok;
      s2_hue   <= s1_hue_ok ? 10'($signed({8'b0, s1_base}) + flo) : -10'sd1;
      s2_h     <= s1_h;
      s2_v     <= s1_v;
    end
  end

  // ---------------- stage 3 ----------------
  logic signed [10:0] dh;
  logic [8:0] adh, hd;
  always_comb begin
    dh  = 11'(s2_hue) - 11'(HUE_T);
    adh = dh[10] ? 9'(-dh) : 9'(dh);
    hd  = (9'd253 - adh < adh) ? 9'd253 - adh : adh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; w <= '0; out_h <= '0; out_v <= '0;
    end else begin
      out_valid <= s2_valid;
      w         <= (s2_hue != -10'sd1 && s2_r_ok) ? w_table[hd[6:0]] : '0;
      out_h     <= s2_h;
      out_v     <= s2_v;
    end
  end

endmodule
