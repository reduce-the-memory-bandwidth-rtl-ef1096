// tb_vdr_top: end-to-end test of the visibility driven rasterizer at its
// default size (1600x1200 screen, 8x8-4x4 HZ configuration, 64-entry
// bit-mask cache).
//
// The testbench plays the parts outside the design: a lighting stage that
// passes triangles through a queue, and a Z-buffer/colour stage that keeps
// a full-screen depth and colour buffer, performs the depth test
// (larger z is nearer) and reports the writes back. Independently it
// renders every triangle, without any culling, into a reference buffer by
// evaluating the same edge and plane equations pixel by pixel. Culling must
// be conservative, so the two final images have to be identical.
//
// Scene (inside a 160x120 window): a few near, nearly flat occluders, then,
// once the HZ-buffer has caught up, a mix of large and small triangles at
// random depths, some tilted steeply in y, many behind the occluders, and a
// spray of tiny triangles that overflows the bit-mask cache. Each mechanism
// of the design (triangle discard, large and small tile tests and hidden
// tiles, hidden scan-lines, pixel discards, HZ updates, cache evictions,
// back-pressure) must occur at least once. The Z-buffer reads saved are
// printed as the bandwidth figure.
module tb_vdr_top;
  import vdr_pkg::*;

  localparam int SW = 1600, SH = 1200;
  localparam int WX = 200, WY = 100, WW = 160, WH = 120;
  localparam int NOCC = 4, NRAND = 150, NTINY = 160;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic frame_clear, clear_busy, tri_valid, tri_ready;
  tri_t tri_in;
  logic lit_out_valid, lit_out_ready, lit_in_valid, lit_in_ready;
  tri_t lit_out_tri, lit_in_tri;
  logic pix_valid, pix_ready, zw_valid, zw_ready, idle;
  pix_group_t pix_out;
  zwrite_t zw_in;
  stats_t stats;

  vdr_top dut (.*);

  int checks = 0, failures = 0;
  longint unsigned cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // ------------------------------------------------ buffers
  logic [15:0] zb_dut [SW*SH];
  logic [23:0] cb_dut [SW*SH];
  logic [15:0] zb_ref [SW*SH];
  logic [23:0] cb_ref [SW*SH];
  longint ref_frags = 0, dut_frags = 0;

  // ------------------------------------------------ lighting stage model
  tri_t lq[$];
  assign lit_out_ready = 1'b1;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lit_in_valid <= 1'b0;
      lit_in_tri   <= '0;
    end else begin
      if (lit_in_valid && lit_in_ready) void'(lq.pop_front());
      if (lit_out_valid && lit_out_ready) lq.push_back(lit_out_tri);
      lit_in_valid <= lq.size() > 0;
      lit_in_tri   <= lq.size() > 0 ? lq[0] : '0;
    end
  end

  // ------------------------------------------------ Z-buffer stage model
  zwrite_t zq[$];
  int bp_cnt = 0;
  logic bp;
  always @(posedge clk) bp <= ($urandom_range(0, 7) == 0);
  assign pix_ready = !bp && !zfull;
  logic zfull = 1'b0;
  initial begin zw_valid = 1'b0; zw_in = '0; end
  always @(posedge clk) begin
    if (pix_valid && !pix_ready) bp_cnt++;
    if (zw_valid && zw_ready) void'(zq.pop_front());
    if (pix_valid && pix_ready) begin
      zwrite_t w;
      w = '0;
      w.x = pix_out.x; w.y0 = pix_out.y0;
      for (int p = 0; p < NLANE; p++) if (pix_out.mask[p]) begin
        int a;
        a = (int'(pix_out.y0) + p) * SW + int'(pix_out.x);
        dut_frags++;
        if (pix_out.z[p] > zb_dut[a]) begin
          zb_dut[a] = pix_out.z[p];
          cb_dut[a] = pix_out.rgb[p];
          w.mask[p] = 1'b1;
          w.z[p]    = pix_out.z[p];
        end
      end
      if (w.mask != '0) zq.push_back(w);
    end
    zw_valid <= zq.size() > 0;
    zw_in    <= zq.size() > 0 ? zq[0] : '0;
    zfull    <= zq.size() >= 3;
  end

  // ------------------------------------------------ reference renderer
  function automatic longint q16div(longint n, longint d);
    if (d == 0) return 0;
    return (n * 65536) / d;    // SystemVerilog division truncates toward zero
  endfunction
  function automatic longint ceil16(longint v);
    return (v + 65535) >>> 16;
  endfunction
  function automatic int clampi(longint v, int hi);
    longint i = v >>> 16;
    if (i < 0) return 0;
    if (i > hi) return hi;
    return int'(i);
  endfunction

  task automatic ref_draw(tri_t t);
    vertex_t v[3], tmp;
    longint x1, y1, x2, y2, x3, y3, area, s13, s12, s23, xl, xr, xa, xb;
    longint a1[4], a2[4], a3[4], dadx[4], dady[4], av[4];
    v[0] = t.v[0]; v[1] = t.v[1]; v[2] = t.v[2];
    // stable insertion sort by y
    for (int i = 1; i < 3; i++)
      for (int j = i; j > 0 && v[j].y < v[j-1].y; j--) begin
        tmp = v[j]; v[j] = v[j-1]; v[j-1] = tmp;
      end
    x1 = v[0].x; y1 = v[0].y; x2 = v[1].x; y2 = v[1].y; x3 = v[2].x; y3 = v[2].y;
    area = (x3 - x1) * (y2 - y1) - (x2 - x1) * (y3 - y1);
    if (area == 0) return;
    a1 = '{v[0].z, v[0].r, v[0].g, v[0].b};
    a2 = '{v[1].z, v[1].r, v[1].g, v[1].b};
    a3 = '{v[2].z, v[2].r, v[2].g, v[2].b};
    for (int k = 0; k < 4; k++) begin
      dadx[k] = q16div((y2 - y1) * (a3[k] - a1[k]) - (y3 - y1) * (a2[k] - a1[k]), area);
      dady[k] = q16div((x3 - x1) * (a2[k] - a1[k]) - (a3[k] - a1[k]) * (x2 - x1), area);
    end
    s13 = q16div(x3 - x1, y3 - y1);
    s12 = q16div(x2 - x1, y2 - y1);
    s23 = q16div(x3 - x2, y3 - y2);
    for (longint y = y1; y < y3; y++) begin
      xa = (x1 << 16) + (y - y1) * s13;
      xb = (y < y2) ? (x1 << 16) + (y - y1) * s12 : (x2 << 16) + (y - y2) * s23;
      xl = ceil16(area < 0 ? xa : xb);
      xr = ceil16(area < 0 ? xb : xa);
      if (xl < 0) xl = 0;
      if (xr < 0) xr = 0;
      for (longint x = xl; x < xr; x++) begin
        int a, zi;
        for (int k = 0; k < 4; k++)
          av[k] = (a1[k] << 16) + (x - x1) * dadx[k] + (y - y1) * dady[k];
        a  = int'(y) * SW + int'(x);
        zi = clampi(av[0], 65535);
        ref_frags++;
        if (zi > int'(zb_ref[a])) begin
          zb_ref[a] = 16'(zi);
          cb_ref[a] = {8'(clampi(av[1], 255)), 8'(clampi(av[2], 255)), 8'(clampi(av[3], 255))};
        end
      end
    end
  endtask

  // ------------------------------------------------ stimulus helpers
  function automatic vertex_t mkv(int x, int y, int z);
    vertex_t v;
    v.x = coord_t'(x); v.y = coord_t'(y);
    v.z = z_t'(z < 0 ? 0 : (z > 65535 ? 65535 : z));
    v.r = 8'($urandom); v.g = 8'($urandom); v.b = 8'($urandom);
    return v;
  endfunction

  task automatic send(tri_t t);
    ref_draw(t);
    @(negedge clk);
    tri_in    = t;
    tri_valid = 1'b1;
    while (!tri_ready) @(negedge clk);
    @(posedge clk);
    tri_valid <= 1'b0;
  endtask

  task automatic wait_idle();
    int quiet = 0;
    while (quiet < 8) begin
      @(posedge clk);
      if (idle && lq.size() == 0 && zq.size() == 0 && !tri_valid) quiet++;
      else quiet = 0;
    end
  endtask

  function automatic tri_t rand_tri(int maxsz, int zlo, int zhi, int zslope);
    tri_t t;
    int cx, cy, z;
    cx = WX + $urandom_range(0, WW - 1);
    cy = WY + $urandom_range(0, WH - 1);
    z  = $urandom_range(zlo, zhi);
    for (int i = 0; i < 3; i++) begin
      int x, y;
      x = cx + $urandom_range(0, 2 * maxsz) - maxsz;
      y = cy + $urandom_range(0, 2 * maxsz) - maxsz;
      if (x < WX) x = WX;
      if (x > WX + WW) x = WX + WW;
      if (y < WY) y = WY;
      if (y > WY + WH) y = WY + WH;
      t.v[i] = mkv(x, y, z + (y - cy) * zslope + $urandom_range(0, 400) - 200);
    end
    return t;
  endfunction

  // ------------------------------------------------ main
  initial begin
    tri_t t;
    int mism;
    for (int i = 0; i < SW * SH; i++) begin
      zb_dut[i] = '0; cb_dut[i] = '0; zb_ref[i] = '0; cb_ref[i] = '0;
    end
    frame_clear = 1'b0; tri_valid = 1'b0; tri_in = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    frame_clear <= 1'b1;
    @(posedge clk);
    frame_clear <= 1'b0;
    @(posedge clk);
    while (clear_busy) @(posedge clk);

    // near occluders covering most of the window, two quads
    t.v[0] = mkv(WX, WY, 60000);           t.v[1] = mkv(WX + WW, WY, 60000);
    t.v[2] = mkv(WX, WY + 80, 60200);      send(t);
    t.v[0] = mkv(WX + WW, WY, 60000);      t.v[1] = mkv(WX + WW, WY + 80, 60200);
    t.v[2] = mkv(WX, WY + 80, 60200);      send(t);
    t.v[0] = mkv(WX, WY + 80, 20000);      t.v[1] = mkv(WX + 100, WY + 80, 20000);
    t.v[2] = mkv(WX, WY + WH, 20000);      send(t);
    t.v[0] = mkv(WX + 100, WY + 80, 20000); t.v[1] = mkv(WX + 100, WY + WH, 20000);
    t.v[2] = mkv(WX, WY + WH, 20000);      send(t);
    wait_idle();

    for (int n = 0; n < NRAND; n++) begin
      case (n % 5)
        0: t = rand_tri(40, 5000, 64000, 0);      // large, random depth
        1: t = rand_tri(3, 5000, 58000, 0);       // small, mostly hidden
        2: t = rand_tri(30, 30000, 62000, 400);   // tilted in y
        3: t = rand_tri(12, 10000, 64000, 60);
        default: t = rand_tri(6, 40000, 65000, 0);
      endcase
      send(t);
    end
    // tiny triangles all over the window: open many partial cache entries
    for (int n = 0; n < NTINY; n++) begin
      t = rand_tri(2, 62000, 65000, 0);
      send(t);
    end
    wait_idle();

    mism = 0;
    for (int y = WY; y < WY + WH + 1; y++)
      for (int x = WX; x < WX + WW + 1; x++) begin
        int a;
        a = y * SW + x;
        checks++;
        if (zb_dut[a] !== zb_ref[a] || cb_dut[a] !== cb_ref[a]) begin
          failures++;
          if (mism < 10) $display("MISMATCH (%0d,%0d): dut z=%0d rgb=%h ref z=%0d rgb=%h",
                                  x, y, zb_dut[a], cb_dut[a], zb_ref[a], cb_ref[a]);
          mism++;
        end
      end

    $display("triangles in=%0d tested=%0d discarded=%0d degenerate=%0d",
             stats.tri_in, stats.tri_tested, stats.tri_discard, stats.tri_degenerate);
    $display("large tiles tested=%0d hidden=%0d  small tiles tested=%0d hidden=%0d  lines hidden=%0d",
             stats.large_tile_test, stats.large_tile_hidden, stats.small_tile_test,
             stats.small_tile_hidden, stats.line_hidden);
    $display("pixels tested=%0d discarded=%0d  HZ updates=%0d  cache evictions=%0d  back-pressure cycles=%0d",
             stats.pix_in, stats.pix_discard, stats.hz_update, stats.cache_evict, bp_cnt);
    $display("Z-buffer reads: reference %0d, with culling %0d (%0d%% saved), %0d cycles",
             ref_frags, dut_frags, ref_frags == 0 ? 0 : 100 * (ref_frags - dut_frags) / ref_frags, cycles);

    checks++; if (stats.tri_discard == 0)       begin failures++; $display("FAIL: no triangle discarded"); end
    checks++; if (stats.large_tile_test == 0)   begin failures++; $display("FAIL: no large tile test"); end
    checks++; if (stats.large_tile_hidden == 0) begin failures++; $display("FAIL: no large tile hidden"); end
    checks++; if (stats.small_tile_test == 0)   begin failures++; $display("FAIL: no small tile test"); end
    checks++; if (stats.small_tile_hidden == 0) begin failures++; $display("FAIL: no small tile hidden"); end
    checks++; if (stats.line_hidden == 0)       begin failures++; $display("FAIL: no scan-line hidden"); end
    checks++; if (stats.pix_discard == 0)       begin failures++; $display("FAIL: no pixel discarded"); end
    checks++; if (stats.hz_update == 0)         begin failures++; $display("FAIL: no HZ update"); end
    checks++; if (stats.cache_evict == 0)       begin failures++; $display("FAIL: no cache eviction"); end
    checks++; if (bp_cnt == 0)                  begin failures++; $display("FAIL: no back-pressure"); end
    checks++; if (dut_frags >= ref_frags)       begin failures++; $display("FAIL: no Z-buffer reads saved"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
