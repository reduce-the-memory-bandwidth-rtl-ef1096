// tb_maxz_estimator: group-of-pixels visibility test.
// Random tiles (4x4 and 8x8) with random slopes and random row spans,
// including fully covered tiles. For each one the exact maximum depth over
// the covered pixels is found by brute force. Checks: full-tile detection;
// a fully covered tile's maximum is exact (corner rule); a partly covered
// tile's estimate is never below the true maximum and exceeds it by at most
// T*|dz/dx| + T*|dz/dy|; every scan-line maximum is exact; the hidden
// flags agree with comparing those values to the HZ threshold.
module tb_maxz_estimator;
  import vdr_pkg::*;
  localparam int TMAX = 8, OW = 4;
  logic [2:0] tile_lg;
  fx_t zorg, dzdx, dzdy;
  logic [TMAX-1:0] row_cov;
  logic [TMAX-1:0][OW-1:0] cs_off, ce_off;
  hz_t hz;
  logic tile_any, tile_full, tile_hidden;
  fx_t tile_max;
  fx_t [TMAX-1:0] line_max;
  logic [TMAX-1:0] line_hidden;

  maxz_estimator #(.TMAX(TMAX)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_part = 0;

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int t, mode;
      longint mx, thr, lm, adx, ady;
      logic any, full;
      t = (n % 2) ? 8 : 4;
      tile_lg = (t == 8) ? 3 : 2;
      zorg = (longint'($urandom_range(0, 65535)) << 16) + $urandom_range(0, 65535);
      dzdx = longint'($urandom_range(0, 4000000)) - 2000000;
      dzdy = longint'($urandom_range(0, 4000000)) - 2000000;
      hz   = hz_t'($urandom);
      mode = $urandom_range(0, 3);
      row_cov = '0; cs_off = '0; ce_off = '0;
      for (int r = 0; r < t; r++) begin
        int a, b;
        if (mode == 0) begin a = 0; b = t; end
        else begin a = $urandom_range(0, t - 1); b = $urandom_range(a + 1, t); end
        if (mode == 3 && $urandom_range(0, 2) == 0) continue;
        row_cov[r] = 1; cs_off[r] = OW'(a); ce_off[r] = OW'(b);
      end
      #1;
      thr = longint'(hz) << 24;
      any = row_cov != 0;
      full = 1;
      mx = -(64'sd1 <<< 62);
      for (int r = 0; r < t; r++) begin
        if (!row_cov[r] || cs_off[r] != 0 || ce_off[r] != OW'(t)) full = 0;
        if (row_cov[r]) begin
          lm = -(64'sd1 <<< 62);
          for (int c = int'(cs_off[r]); c < int'(ce_off[r]); c++) begin
            longint z;
            z = zorg + longint'(c) * dzdx + longint'(r) * dzdy;
            if (z > lm) lm = z;
          end
          if (lm > mx) mx = lm;
          checks++;
          if (line_max[r] != lm || line_hidden[r] != (lm < thr)) begin
            failures++;
            if (failures < 5) $display("FAIL line %0d max %0d exp %0d", r, line_max[r], lm);
          end
        end
      end
      adx = dzdx < 0 ? -dzdx : dzdx;
      ady = dzdy < 0 ? -dzdy : dzdy;
      checks++;
      if (tile_any != any || tile_full != full) begin failures++; $display("FAIL any/full"); end
      if (any) begin
        checks++;
        if (full) begin
          n_full++;
          if (tile_max != mx) begin failures++; $display("FAIL full tile max %0d exp %0d", tile_max, mx); end
        end else begin
          n_part++;
          if (tile_max < mx || tile_max > mx + t * adx + t * ady) begin
            failures++;
            if (failures < 5) $display("FAIL partial estimate %0d true max %0d", tile_max, mx);
          end
        end
        checks++;
        if (tile_hidden != (tile_max < thr)) failures++;
      end
    end
    $display("full tiles %0d partial tiles %0d", n_full, n_part);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
