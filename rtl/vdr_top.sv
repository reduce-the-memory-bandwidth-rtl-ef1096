// vdr_top: visibility driven rasterizer with a two-level hierarchical Z-buffer.
//
// Data path (left to right):
//   triangles -> tri_vis_test -> [lighting, outside] -> tri_setup
//             -> tile_rasterizer -> pixel_vis_test -> [Z-buffer / colour, outside]
// Feedback path:
//   depth writes from the Z-buffer stage -> bitmask_cache -> hz_manager -> hz_buffer
// The HZ-buffer is read by the triangle test, the rasterizer's tile and
// scan-line tests and the pixel test, and written only by the manager.
// Geometry/lighting and the Z-buffer, texture and colour memories are not
// part of this design: the triangle stream leaves through lit_out_* and
// returns lit through lit_in_*, pixel groups leave through pix_* and the
// depth writes that the Z test performed come back on zw_*.
//
// frame_clear resets every HZ entry to the farthest value (one address per
// cycle, clear_busy meanwhile; new triangles are held back) and empties the
// bit-mask cache. stats counts the events of every stage; idle is high when
// no triangle or pixel is inside the design.
module vdr_top
  import vdr_pkg::*;
#(
  parameter int SCREEN_W      = 1600,
  parameter int SCREEN_H      = 1200,
  parameter int LOW           = 4,
  parameter int HIGH          = 8,
  parameter int CACHE_ENTRIES = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_clear,
  output logic       clear_busy,
  input  logic       tri_valid,
  output logic       tri_ready,
  input  tri_t       tri_in,
  output logic       lit_out_valid,
  input  logic       lit_out_ready,
  output tri_t       lit_out_tri,
  input  logic       lit_in_valid,
  output logic       lit_in_ready,
  input  tri_t       lit_in_tri,
  output logic       pix_valid,
  input  logic       pix_ready,
  output pix_group_t pix_out,
  input  logic       zw_valid,
  output logic       zw_ready,
  input  zwrite_t    zw_in,
  output stats_t     stats,
  output logic       idle
);
  localparam int NRD = 4;

  logic [NRD-1:0] rd_level;
  coord_t [NRD-1:0] rd_bx, rd_by;
  hz_t [NRD-1:0] rd_data;
  logic wr_low_en, wr_high_en;
  coord_t wr_low_bx, wr_low_by, wr_high_bx, wr_high_by;
  hz_t wr_low_data, wr_high_data;

  hz_buffer #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H), .LOW(LOW), .HIGH(HIGH), .NRD(NRD)) u_hz (
    .clk, .rst_n, .clear_start(frame_clear), .clear_busy,
    .rd_level, .rd_bx, .rd_by, .rd_data,
    .wr_low_en, .wr_low_bx, .wr_low_by, .wr_low_data,
    .wr_high_en, .wr_high_bx, .wr_high_by, .wr_high_data
  );

  // ---------------------------------------------------- triangle test
  logic tv_in_ready;
  assign tri_ready = tv_in_ready && !clear_busy;
  tri_vis_test #(.LOW(LOW), .HIGH(HIGH)) u_tvt (
    .clk, .rst_n,
    .in_valid(tri_valid && !clear_busy), .in_ready(tv_in_ready), .in_tri(tri_in),
    .out_valid(lit_out_valid), .out_ready(lit_out_ready), .out_tri(lit_out_tri),
    .hz_level(rd_level[0]), .hz_bx(rd_bx[0]), .hz_by(rd_by[0]), .hz_data(rd_data[0]),
    .tri_in(stats.tri_in), .tri_tested(stats.tri_tested), .tri_discard(stats.tri_discard)
  );

  // ---------------------------------------------------- setup
  logic su_valid, su_ready;
  setup_t su;
  tri_setup u_setup (
    .clk, .rst_n,
    .in_valid(lit_in_valid), .in_ready(lit_in_ready), .in_tri(lit_in_tri),
    .out_valid(su_valid), .out_ready(su_ready), .out_setup(su),
    .degenerate(stats.tri_degenerate)
  );

  // ---------------------------------------------------- rasterizer
  logic rz_valid, rz_ready, rz_busy;
  pix_group_t rz_pix;
  tile_rasterizer #(.LOW(LOW), .HIGH(HIGH)) u_rast (
    .clk, .rst_n,
    .in_valid(su_valid), .in_ready(su_ready), .in_setup(su),
    .out_valid(rz_valid), .out_ready(rz_ready), .out_pix(rz_pix),
    .hz_level(rd_level[1]), .hz_bx(rd_bx[1]), .hz_by(rd_by[1]), .hz_data(rd_data[1]),
    .busy(rz_busy),
    .large_tile_test(stats.large_tile_test), .large_tile_hidden(stats.large_tile_hidden),
    .small_tile_test(stats.small_tile_test), .small_tile_hidden(stats.small_tile_hidden),
    .line_hidden_cnt(stats.line_hidden)
  );

  // ---------------------------------------------------- pixel test
  assign rd_level[2] = 1'b0;
  pixel_vis_test #(.LOW(LOW)) u_pvt (
    .clk, .rst_n,
    .in_valid(rz_valid), .in_ready(rz_ready), .in_pix(rz_pix),
    .out_valid(pix_valid), .out_ready(pix_ready), .out_pix(pix_out),
    .hz_bx(rd_bx[2]), .hz_by(rd_by[2]), .hz_data(rd_data[2]),
    .pix_in(stats.pix_in), .pix_discard(stats.pix_discard)
  );

  // ---------------------------------------------------- HZ management
  logic upd_valid, upd_ready;
  coord_t upd_bx, upd_by;
  z_t upd_z;
  bitmask_cache #(.ENTRIES(CACHE_ENTRIES), .LOW(LOW)) u_cache (
    .clk, .rst_n, .flush(frame_clear),
    .in_valid(zw_valid), .in_ready(zw_ready), .in_wr(zw_in),
    .upd_valid, .upd_ready, .upd_bx, .upd_by, .upd_z,
    .evictions(stats.cache_evict)
  );

  assign rd_level[3] = 1'b0;
  hz_manager #(.LOW(LOW), .HIGH(HIGH)) u_mgr (
    .clk, .rst_n,
    .upd_valid, .upd_ready, .upd_bx, .upd_by, .upd_z,
    .rd_bx(rd_bx[3]), .rd_by(rd_by[3]), .rd_data(rd_data[3]),
    .wr_low_en, .wr_low_bx, .wr_low_by, .wr_low_data,
    .wr_high_en, .wr_high_bx, .wr_high_by, .wr_high_data,
    .hz_updates(stats.hz_update)
  );

  assign idle = !lit_out_valid && lit_in_ready && !su_valid && !rz_busy && !pix_valid
             && !upd_valid && upd_ready && !clear_busy;

endmodule
