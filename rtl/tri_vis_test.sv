// tri_vis_test: triangle-level hierarchical Z visibility test.
//
// Placed before the lighting stage. A triangle whose covered pixels all fall
// inside one low-level block is compared with that block's HZ entry; one
// that fits inside one high-level block is compared with the high-level
// entry; a triangle crossing several high-level blocks is passed on and left
// to the visibility driven rasterizer. The comparison uses the triangle's
// nearest vertex depth (the largest z, see vdr_pkg): if even that is farther
// than the farthest depth stored for the block, every pixel of the triangle
// is hidden and it is dropped.
//
// Interface: valid/ready stream of tri_t in, the surviving triangles out
// through one register stage (one triangle per cycle). One combinational HZ
// read port. Counters tri_in/tri_discard count accepted and dropped
// triangles; tested counts triangles that fit one block.
module tri_vis_test
  import vdr_pkg::*;
#(
  parameter int LOW  = 4,
  parameter int HIGH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  tri_t        in_tri,
  output logic        out_valid,
  input  logic        out_ready,
  output tri_t        out_tri,
  output logic        hz_level,
  output coord_t      hz_bx,
  output coord_t      hz_by,
  input  hz_t         hz_data,
  output logic [31:0] tri_in,
  output logic [31:0] tri_tested,
  output logic [31:0] tri_discard
);
  localparam int LLG = $clog2(LOW);
  localparam int HLG = $clog2(HIGH);

  coord_t xmin, xmax, ymin, ymax, xl, yl;
  z_t     zmax;
  logic   in_low, in_high, tested, hidden;

  always_comb begin
    xmin = in_tri.v[0].x; xmax = in_tri.v[0].x;
    ymin = in_tri.v[0].y; ymax = in_tri.v[0].y;
    zmax = in_tri.v[0].z;
    for (int i = 1; i < 3; i++) begin
      if (in_tri.v[i].x < xmin) xmin = in_tri.v[i].x;
      if (in_tri.v[i].x > xmax) xmax = in_tri.v[i].x;
      if (in_tri.v[i].y < ymin) ymin = in_tri.v[i].y;
      if (in_tri.v[i].y > ymax) ymax = in_tri.v[i].y;
      if (in_tri.v[i].z > zmax) zmax = in_tri.v[i].z;
    end
    // last pixel column/row that can be covered (coverage is half-open)
    xl = (xmax > xmin) ? xmax - 1'b1 : xmin;
    yl = (ymax > ymin) ? ymax - 1'b1 : ymin;
    in_low  = ((xmin >> LLG) == (xl >> LLG)) && ((ymin >> LLG) == (yl >> LLG));
    in_high = ((xmin >> HLG) == (xl >> HLG)) && ((ymin >> HLG) == (yl >> HLG));
    hz_level = !in_low;
    hz_bx    = in_low ? (xmin >> LLG) : (xmin >> HLG);
    hz_by    = in_low ? (ymin >> LLG) : (ymin >> HLG);
    tested   = in_low || in_high;
    hidden   = tested && (zmax < {hz_data, {(Z_W-HZ_W){1'b0}}});
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_tri     <= '0;
      tri_in      <= '0;
      tri_tested  <= '0;
      tri_discard <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        tri_in <= tri_in + 1;
        if (tested) tri_tested <= tri_tested + 1;
        if (hidden) begin
          tri_discard <= tri_discard + 1;
        end else begin
          out_valid <= 1'b1;
          out_tri   <= in_tri;
        end
      end
    end
  end

endmodule
