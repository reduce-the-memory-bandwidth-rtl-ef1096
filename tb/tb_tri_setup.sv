// tb_tri_setup: triangle setup against a testbench reference.
// Random triangles over the whole 1600x1200 screen, with random depths and
// colours, some with shared y values and some collinear. For each one the
// reference sorts the vertices by y (ties keep their input order), forms
// area, d/dx and d/dy of Z, R, G, B and the three edge slopes with 64-bit
// integer arithmetic (Q.16, truncated toward zero) and compares every field
// of the setup record. Zero-area triangles must produce no output and be
// counted.
module tb_tri_setup;
  import vdr_pkg::*;
  localparam int N = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  tri_t in_tri = '0;
  setup_t out_setup;
  logic [31:0] degenerate;

  tri_setup dut (.*);

  int checks = 0, failures = 0, n_degen = 0;
  setup_t expq[$];

  function automatic longint q16div(longint n, longint d);
    if (d == 0) return 0;
    return (n * 65536) / d;
  endfunction

  function automatic logic ref_setup(tri_t t, output setup_t s);
    vertex_t v[3], tmp;
    longint x1, y1, x2, y2, x3, y3, area;
    longint a[3][4];
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
    return 1;
  endfunction

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_setup !== expq[0]) begin
        failures++;
        if (failures < 5 && expq.size() > 0)
          $display("FAIL setup mismatch: got dzdx=%0d dzdy=%0d sl=%0d exp dzdx=%0d dzdy=%0d sl=%0d",
                   out_setup.dadx[0], out_setup.dady[0], out_setup.s_long,
                   expq[0].dadx[0], expq[0].dady[0], expq[0].s_long);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
    out_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      tri_t t;
      setup_t s;
      int sz;
      sz = (n % 4 == 0) ? 6 : ((n % 4 == 1) ? 60 : 1199);
      for (int i = 0; i < 3; i++) begin
        t.v[i].x = coord_t'($urandom_range(0, sz)); t.v[i].y = coord_t'($urandom_range(0, sz));
        t.v[i].z = z_t'($urandom); t.v[i].r = 8'($urandom); t.v[i].g = 8'($urandom); t.v[i].b = 8'($urandom);
      end
      if (n % 10 == 3) t.v[2].y = t.v[0].y;                  // flat top or bottom
      if (n % 10 == 7) begin                                 // collinear
        t.v[1].x = t.v[0].x + 2; t.v[1].y = t.v[0].y + 3;
        t.v[2].x = t.v[0].x + 4; t.v[2].y = t.v[0].y + 6;
      end
      if (ref_setup(t, s)) expq.push_back(s);
      else n_degen++;
      @(negedge clk);
      in_tri = t; in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      in_valid <= 0;
    end
    while (expq.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (degenerate != n_degen) begin failures++; $display("FAIL degenerate %0d exp %0d", degenerate, n_degen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
