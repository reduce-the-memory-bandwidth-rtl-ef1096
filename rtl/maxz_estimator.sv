// maxz_estimator: group-of-pixels visibility test of one tile.
//
// Finds the largest depth a tile (and each scan-line in it) can hold and
// compares it with the HZ-buffer entry of the tile's block. With dz/dx and
// dz/dy from setup:
//   * fully covered tile: the maximum is one of the four corners, picked by
//     the signs of dz/dx and dz/dy;
//   * partly covered tile: conservative estimate from the left-end pixels of
//     the lowest (LL) and highest (LH) covered rows,
//       maxL = (dz/dy >= 0) ? LH : LL,  estimate = maxL + T*|dz/dx|,
//     T*|dz/dx| being a shift because T is a power of two. It is never below
//     the true maximum of the covered pixels;
//   * scan-line r: the maximum is its right end if dz/dx >= 0, else its left
//     end.
// A tile or line is hidden when its maximum is below the HZ entry scaled to
// the Q.16 depth. Rows are numbered from the tile's top (smallest y); LH is
// the covered row with the largest y.
//
// Interface: purely combinational. Row r covers tile columns
// [cs_off[r], ce_off[r]) and is covered when row_cov[r] is set; tile size
// is T = 1 << tile_lg (at most TMAX).
module maxz_estimator
  import vdr_pkg::*;
#(
  parameter int TMAX = 8,
  parameter int OW   = $clog2(TMAX + 1)
) (
  input  logic [2:0]          tile_lg,
  input  fx_t                 zorg,      // depth at the tile's (column 0, row 0)
  input  fx_t                 dzdx,
  input  fx_t                 dzdy,
  input  logic [TMAX-1:0]     row_cov,
  input  logic [TMAX-1:0][OW-1:0] cs_off,
  input  logic [TMAX-1:0][OW-1:0] ce_off,
  input  hz_t                 hz,
  output logic                tile_any,
  output logic                tile_full,
  output fx_t                 tile_max,
  output logic                tile_hidden,
  output fx_t [TMAX-1:0]      line_max,
  output logic [TMAX-1:0]     line_hidden
);
  fx_t thr, zrow_lo, zrow_hi, ll, lh, maxl, adx, tsz;
  int  r_lo, r_hi;
  fx_t [TMAX-1:0] zrow;

  always_comb begin
    tsz  = fx_t'(1) <<< tile_lg;
    thr  = fx_t'(hz) <<< (Z_W - HZ_W + FRAC);
    adx  = (dzdx < 0) ? -dzdx : dzdx;
    tile_any  = 1'b0;
    tile_full = 1'b1;
    r_lo = 0;
    r_hi = 0;
    for (int r = TMAX - 1; r >= 0; r--) begin
      zrow[r] = zorg + fx_t'(r) * dzdy;
      if (row_cov[r]) r_lo = r;
    end
    for (int r = 0; r < TMAX; r++) begin
      if (row_cov[r]) begin
        tile_any = 1'b1;
        r_hi     = r;
      end
      if (fx_t'(r) < tsz)
        if (!row_cov[r] || cs_off[r] != 0 || fx_t'(ce_off[r]) != tsz) tile_full = 1'b0;
      line_max[r]    = zrow[r] + (dzdx >= 0 ? fx_t'(ce_off[r]) - 1 : fx_t'(cs_off[r])) * dzdx;
      line_hidden[r] = row_cov[r] && (line_max[r] < thr);
    end
    zrow_lo = zorg + fx_t'(r_lo) * dzdy;
    zrow_hi = zorg + fx_t'(r_hi) * dzdy;
    ll   = zrow_lo + fx_t'(cs_off[r_lo]) * dzdx;
    lh   = zrow_hi + fx_t'(cs_off[r_hi]) * dzdx;
    maxl = (dzdy >= 0) ? lh : ll;
    if (tile_full)
      tile_max = zorg + ((dzdx >= 0) ? (tsz - 1) * dzdx : '0)
                      + ((dzdy >= 0) ? (tsz - 1) * dzdy : '0);
    else
      tile_max = maxl + (adx <<< tile_lg);
    tile_hidden = tile_any && (tile_max < thr);
  end

endmodule
