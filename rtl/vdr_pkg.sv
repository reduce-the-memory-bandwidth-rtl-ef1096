// vdr_pkg: types and constants shared by the visibility driven rasterizer.
//
// Number formats (all choices of this design; the source only fixes an
// 8-bit hierarchical depth):
//   * screen coordinates are unsigned 12-bit integers, vertices lie on
//     integer pixel positions and on the screen (clipping happens upstream);
//   * interpolated attributes (Z, R, G, B) and edge x positions are signed
//     64-bit fixed point with FRAC=16 fraction bits (fx_t);
//   * full-resolution depth is 16 bits, the HZ-buffer keeps the upper
//     HZ_W=8 bits of it;
//   * depth convention: a LARGER value is NEARER to the viewer. A fragment
//     passes the depth test when z_new > z_old, the buffers clear to 0, and
//     the "farthest" depth of a block is the MINIMUM of its pixels. With this
//     convention the conservative "maximum Z" estimate of a pixel group is
//     the group's nearest depth, and the group is hidden when that maximum
//     is still below (farther than) the farthest depth stored in the HZ-buffer.
package vdr_pkg;

  localparam int XY_W   = 12;          // screen coordinate width
  localparam int FRAC   = 16;          // fraction bits of fx_t
  localparam int FX_W   = 64;          // fixed-point word
  localparam int Z_W    = 16;          // full depth
  localparam int HZ_W   = 8;           // HZ-buffer depth (8-bit, Table 2)
  localparam int C_W    = 8;           // colour channel
  localparam int NATTR  = 4;           // Z, R, G, B: four DDAs per span processor
  localparam int NLANE  = 4;           // parallel span processors (Fig. 8)

  localparam int A_Z = 0, A_R = 1, A_G = 2, A_B = 3;

  typedef logic        [XY_W-1:0] coord_t;
  typedef logic signed [FX_W-1:0] fx_t;
  typedef logic        [Z_W-1:0]  z_t;
  typedef logic        [HZ_W-1:0] hz_t;

  typedef struct packed {
    coord_t         x;
    coord_t         y;
    z_t             z;
    logic [C_W-1:0] r;
    logic [C_W-1:0] g;
    logic [C_W-1:0] b;
  } vertex_t;

  typedef struct packed {
    vertex_t [2:0] v;
  } tri_t;

  // Result of triangle setup: vertices sorted so that y_top <= y_mid <= y_bot.
  typedef struct packed {
    coord_t              y_top;
    coord_t              y_mid;
    coord_t              y_bot;
    fx_t                 x_top;      // x of the top vertex, Q.16
    fx_t                 x_mid;      // x of the middle vertex, Q.16
    fx_t                 s_long;     // dx/dy of edge top->bottom
    fx_t                 s_upper;    // dx/dy of edge top->middle
    fx_t                 s_lower;    // dx/dy of edge middle->bottom
    logic                long_left;  // long edge is the left boundary
    coord_t              x_org;      // attribute origin = top vertex
    coord_t              y_org;
    fx_t [NATTR-1:0]     a_org;      // attributes at the origin, Q.16
    fx_t [NATTR-1:0]     dadx;       // d(attr)/dx, Q.16
    fx_t [NATTR-1:0]     dady;       // d(attr)/dy, Q.16
  } setup_t;

  // A column of up to NLANE pixels leaving the rasterizer: lane p is pixel
  // (x, y0+p). All lanes of one group fall in the same low-level HZ block.
  typedef struct packed {
    logic [NLANE-1:0]                  mask;
    coord_t                            x;
    coord_t                            y0;
    logic [NLANE-1:0][Z_W-1:0]         z;
    logic [NLANE-1:0][3*C_W-1:0]       rgb;
  } pix_group_t;

  // Depth-write report returned by the external Z-buffer stage.
  typedef struct packed {
    logic [NLANE-1:0]          mask;     // lanes whose depth was written
    coord_t                    x;
    coord_t                    y0;
    logic [NLANE-1:0][Z_W-1:0] z;
  } zwrite_t;

  typedef struct packed {
    logic [31:0] tri_in;            // triangles offered to the triangle test
    logic [31:0] tri_tested;        // triangles inside one HZ block (tested)
    logic [31:0] tri_discard;       // triangles rejected before lighting
    logic [31:0] tri_degenerate;    // zero-area triangles dropped by setup
    logic [31:0] large_tile_test;   // tiles tested at large (high-level) size
    logic [31:0] large_tile_hidden;
    logic [31:0] small_tile_test;   // tiles tested at small (low-level) size
    logic [31:0] small_tile_hidden;
    logic [31:0] line_hidden;       // scan-lines rejected inside visible tiles
    logic [31:0] pix_in;            // pixels into the pixel test
    logic [31:0] pix_discard;       // pixels rejected by the pixel test
    logic [31:0] hz_update;         // low-level HZ entries raised
    logic [31:0] cache_evict;       // bit-mask cache entries evicted unfinished
  } stats_t;

  // Round a Q.16 value up to the next integer.
  function automatic fx_t fx_ceil(fx_t v);
    return (v + fx_t'((1 << FRAC) - 1)) >>> FRAC;
  endfunction

  // Integer part of a Q.16 value, clamped to an unsigned range of w bits.
  function automatic logic [Z_W-1:0] fx_clamp(fx_t v, int w);
    fx_t i;
    fx_t lim;
    i   = v >>> FRAC;
    lim = (fx_t'(1) <<< w) - 1;
    if (i < 0)        return '0;
    else if (i > lim) return Z_W'(lim);
    else              return Z_W'(i);
  endfunction

endpackage
