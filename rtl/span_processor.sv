// span_processor: one scan-line of the tile rasterizer.
//
// Holds four digital differential analysers (DDAs), one adder each, for the
// depth and the R, G, B colour of the pixel it is on, plus the pixel's x.
// load places it on the first column of its scan-line inside the current
// tile with the attribute values there; each step moves it one pixel to
// the right, adding d(attr)/dx to every DDA. The pixel is emitted when the
// line is enabled (covered and not rejected by the scan-line test) and x
// lies inside the span [xs, xe) held in the line's boundary registers.
// Depth and colours are the integer part of the Q.16 accumulators, clamped.
// Four DDAs per span processor follow the source; the coverage compare and
// the clamping are choices of this design.
//
// Timing: load and step act at the clock edge; outputs are combinational
// from the registers, so one pixel per cycle.
module span_processor
  import vdr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 step,
  input  coord_t               x0,
  input  fx_t [NATTR-1:0]      init,
  input  fx_t [NATTR-1:0]      inc,
  input  logic                 line_en,
  input  coord_t               xs,
  input  coord_t               xe,
  output logic                 pix_valid,
  output coord_t               pix_x,
  output z_t                   pix_z,
  output logic [3*C_W-1:0]     pix_rgb
);
  fx_t [NATTR-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      pix_x <= '0;
    end else if (load) begin
      acc   <= init;
      pix_x <= x0;
    end else if (step) begin
      for (int k = 0; k < NATTR; k++) acc[k] <= acc[k] + inc[k];
      pix_x <= pix_x + 1'b1;
    end
  end

  logic [Z_W-1:0] r16, g16, b16;
  always_comb begin
    pix_valid = line_en && (pix_x >= xs) && (pix_x < xe);
    pix_z     = fx_clamp(acc[A_Z], Z_W);
    r16       = fx_clamp(acc[A_R], C_W);
    g16       = fx_clamp(acc[A_G], C_W);
    b16       = fx_clamp(acc[A_B], C_W);
    pix_rgb   = {r16[C_W-1:0], g16[C_W-1:0], b16[C_W-1:0]};
  end

endmodule
