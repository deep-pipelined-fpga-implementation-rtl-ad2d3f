// center_drawing: video output that marks the tracked position.
//
// The camera stream passes through with one clock of delay.  A valid pixel
// whose column equals the centre's x or whose row equals the centre's y is
// replaced by the marker colour, so the centre appears as the crossing
// point of a horizontal and a vertical line.  Drawing the centre as two
// crossing lines follows the architecture; the marker colour (green by
// default) and the one-pixel line width are this design's choice.  Marking
// starts once a first centre exists (show).
module center_drawing
  import pf_pkg::*;
#(
  parameter logic [23:0] MARK_RGB = 24'h00FF00
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          show,
  input  logic [XW-1:0] xc,
  input  logic [YW-1:0] yc,
  input  logic          in_valid,
  input  logic [7:0]    in_r,
  input  logic [7:0]    in_g,
  input  logic [7:0]    in_b,
  input  logic [CW-1:0] in_h,
  input  logic [CW-1:0] in_v,
  output logic          out_valid,
  output logic [7:0]    out_r,
  output logic [7:0]    out_g,
  output logic [7:0]    out_b,
  output logic [CW-1:0] out_h,
  output logic [CW-1:0] out_v,
  output logic          out_mark
);

  logic mark;
  assign mark = show && in_valid && (in_h == CW'(xc) || in_v == CW'(yc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_r <= '0; out_g <= '0; out_b <= '0;
      out_h <= '0; out_v <= '0; out_mark <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_h     <= in_h;
      out_v     <= in_v;
      out_mark  <= mark;
      {out_r, out_g, out_b} <= mark ? MARK_RGB : {in_r, in_g, in_b};
    end
  end

endmodule
