// tb_tile_rasterizer: the visibility driven rasterizer on its own.
// Setup records are computed by the testbench from random triangles inside
// a 256x256 area (small ones, which use 4x4 tiles, and large ones, which
// use 8x8 tiles). The HZ-buffer is a testbench array: zero for the first
// triangles (nothing may be culled) and random afterwards, with every
// high-level entry the minimum of its four low-level entries.
// For every triangle the reference enumerates the covered pixels from the
// edge and plane equations. Checks: every emitted pixel is covered, emitted
// once, with the exact depth and colour; every covered pixel that is not
// emitted really is behind the low-level HZ entry of its block (culling is
// conservative); with a zero HZ-buffer every covered pixel is emitted; the
// tile-size rule (large tiles only for triangles of more than 8 lines);
// and over the run tiles of both sizes and scan-lines were rejected.
module tb_tile_rasterizer;
  import vdr_pkg::*;
  localparam int LOW = 4, HIGH = 8, A = 256, N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, hz_level, busy;
  setup_t in_setup = '0;
  pix_group_t out_pix;
  coord_t hz_bx, hz_by;
  hz_t hz_data;
  logic [31:0] large_tile_test, large_tile_hidden, small_tile_test, small_tile_hidden, line_hidden_cnt;

  tile_rasterizer #(.LOW(LOW), .HIGH(HIGH)) dut (.*);

  int hlow[A/LOW][A/LOW], hhigh[A/HIGH][A/HIGH];
  assign hz_data = hz_level ? hz_t'(hhigh[hz_by][hz_bx]) : hz_t'(hlow[hz_by][hz_bx]);

  int checks = 0, failures = 0;
  // expected pixels of the current triangle: key y*A+x -> {z16, rgb, q16 depth}
  longint exp_z[int];
  int     exp_c[int];
  bit     seen[int];

  function automatic longint q16div(longint n, longint d);
    if (d == 0) return 0;
    return (n * 65536) / d;
  endfunction
  function automatic int clampi(longint v, int hi);
    longint i = v >>> 16;
    return (i < 0) ? 0 : ((i > hi) ? hi : int'(i));
  endfunction

  // returns 0 for a zero-area triangle
  function automatic bit build(tri_t t, output setup_t s);
    vertex_t v[3], tmp;
    longint x1, y1, x2, y2, x3, y3, area, xa, xb, xl, xr;
    longint a[3][4], av[4];
    v[0] = t.v[0]; v[1] = t.v[1]; v[2] = t.v[2];
    for (int i = 1; i < 3; i++)
      for (int j = i; j > 0 && v[j].y < v[j-1].y; j--) begin
        tmp = v[j]; v[j] = v[j-1]; v[j-1] = tmp;
      end
    x1 = v[0].x; y1 = v[0].y; x2 = v[1].x; y2 = v[1].y; x3 = v[2].x; y3 = v[2].y;
    for (int i = 0; i < 3; i++) a[i] = '{v[i].z, v[i].r, v[i].g, v[i].b};
    area = (x3 - x1) * (y2 - y1) - (x2 - x1) * (y3 - y1);
    s = '0;
    if (area == 0) return 0;
    s.y_top = coord_t'(y1); s.y_mid = coord_t'(y2); s.y_bot = coord_t'(y3);
    s.x_top = x1 << 16; s.x_mid = x2 << 16;
    s.s_long = q16div(x3 - x1, y3 - y1);
    s.s_upper = q16div(x2 - x1, y2 - y1);
    s.s_lower = q16div(x3 - x2, y3 - y2);
    s.long_left = area < 0;
    s.x_org = coord_t'(x1); s.y_org = coord_t'(y1);
    for (int k = 0; k < 4; k++) begin
      s.a_org[k] = a[0][k] << 16;
      s.dadx[k] = q16div((y2 - y1) * (a[2][k] - a[0][k]) - (y3 - y1) * (a[1][k] - a[0][k]), area);
      s.dady[k] = q16div((x3 - x1) * (a[1][k] - a[0][k]) - (a[2][k] - a[0][k]) * (x2 - x1), area);
    end
    exp_z.delete(); exp_c.delete(); seen.delete();
    for (longint y = y1; y < y3; y++) begin
      xa = (x1 << 16) + (y - y1) * s.s_long;
      xb = (y < y2) ? (x1 << 16) + (y - y1) * s.s_upper : (x2 << 16) + (y - y2) * s.s_lower;
      xl = ((area < 0 ? xa : xb) + 65535) >>> 16;
      xr = ((area < 0 ? xb : xa) + 65535) >>> 16;
      if (xl < 0) xl = 0;
      for (longint x = xl; x < xr; x++) begin
        for (int k = 0; k < 4; k++) av[k] = s.a_org[k] + (x - x1) * s.dadx[k] + (y - y1) * s.dady[k];
        exp_z[int'(y) * A + int'(x)] = av[0];
        exp_c[int'(y) * A + int'(x)] = {8'(clampi(av[1], 255)), 8'(clampi(av[2], 255)), 8'(clampi(av[3], 255))};
      end
    end
    return 1;
  endfunction

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      for (int p = 0; p < NLANE; p++) if (out_pix.mask[p]) begin
        int key;
        key = (int'(out_pix.y0) + p) * A + int'(out_pix.x);
        checks++;
        if (!exp_z.exists(key) || seen.exists(key) || int'(out_pix.z[p]) != clampi(exp_z[key], 65535) ||
            int'(out_pix.rgb[p]) != exp_c[key]) begin
          failures++;
          if (failures < 6) $display("FAIL pixel (%0d,%0d) z=%0d covered=%0d dup=%0d",
                                     out_pix.x, int'(out_pix.y0) + p, out_pix.z[p], exp_z.exists(key), seen.exists(key));
        end
        seen[key] = 1;
      end
    end
    out_ready <= ($urandom_range(0, 4) != 0);
  end

  initial begin
    int n_large = 0, n_small = 0;
    foreach (hlow[i, j]) hlow[i][j] = 0;
    foreach (hhigh[i, j]) hhigh[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      tri_t t;
      setup_t s;
      int cx, cy, sz, z0, ysp;
      logic [31:0] lt0, st0;
      if (n == N / 3) begin   // random HZ contents from here on
        foreach (hlow[i, j]) hlow[i][j] = $urandom_range(0, 255);
        foreach (hhigh[i, j]) begin
          hhigh[i][j] = 255;
          for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++)
            if (hlow[2*i+a][2*j+b] < hhigh[i][j]) hhigh[i][j] = hlow[2*i+a][2*j+b];
        end
      end
      sz = (n % 2) ? 4 : 60;
      cx = $urandom_range(sz, A - 1 - sz); cy = $urandom_range(sz, A - 1 - sz);
      z0 = $urandom_range(0, 65535);
      for (int i = 0; i < 3; i++) begin
        int x, y, z;
        x = cx + $urandom_range(0, 2 * sz) - sz; y = cy + $urandom_range(0, 2 * sz) - sz;
        z = z0 + (n % 3 == 0 ? (y - cy) * 300 : 0) + $urandom_range(0, 600) - 300;
        t.v[i].x = coord_t'(x); t.v[i].y = coord_t'(y);
        t.v[i].z = z_t'(z < 0 ? 0 : (z > 65535 ? 65535 : z));
        t.v[i].r = 8'($urandom); t.v[i].g = 8'($urandom); t.v[i].b = 8'($urandom);
      end
      if (!build(t, s)) continue;
      lt0 = large_tile_test; st0 = small_tile_test;
      @(negedge clk);
      in_setup = s; in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      while (busy || out_valid) @(negedge clk);
      // coverage: every covered pixel not emitted must be hidden
      foreach (exp_z[key]) if (!seen.exists(key)) begin
        int x, y;
        x = key % A; y = key / A;
        checks++;
        if (!(exp_z[key] < (longint'(hlow[y / LOW][x / LOW]) << 24))) begin
          failures++;
          if (failures < 6) $display("FAIL visible pixel (%0d,%0d) not emitted", x, y);
        end
      end
      // tile-size rule
      checks++;
      if ((int'(s.y_bot) - int'(s.y_top) > 2 * LOW) ? (small_tile_test != st0) : (large_tile_test != lt0)) begin
        failures++; $display("FAIL tile size rule");
      end
      if (int'(s.y_bot) - int'(s.y_top) > 2 * LOW) n_large++; else n_small++;
    end
    $display("triangles large %0d small %0d; large tiles %0d/%0d hidden, small tiles %0d/%0d hidden, lines hidden %0d",
             n_large, n_small, large_tile_hidden, large_tile_test, small_tile_hidden, small_tile_test, line_hidden_cnt);
    checks += 3;
    if (large_tile_hidden == 0) begin failures++; $display("FAIL no large tile hidden"); end
    if (small_tile_hidden == 0) begin failures++; $display("FAIL no small tile hidden"); end
    if (line_hidden_cnt == 0)   begin failures++; $display("FAIL no scan-line hidden"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
