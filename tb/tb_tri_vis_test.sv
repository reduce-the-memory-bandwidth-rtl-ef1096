// tb_tri_vis_test: triangle-level HZ test against a testbench model.
// The HZ entries come from a fixed hash of (level, block). Random small
// and medium triangles are offered with random output back-pressure; the
// model decides for each whether it fits one low-level block, one
// high-level block or neither, and whether its nearest vertex is behind
// the entry. The surviving triangles must come out unchanged and in order,
// and the counters must match.
module tb_tri_vis_test;
  import vdr_pkg::*;
  localparam int LOW = 4, HIGH = 8, N = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, hz_level;
  tri_t in_tri = '0, out_tri;
  coord_t hz_bx, hz_by;
  hz_t hz_data;
  logic [31:0] tri_in, tri_tested, tri_discard;

  tri_vis_test #(.LOW(LOW), .HIGH(HIGH)) dut (.*);

  function automatic hz_t hz_of(int lv, int bx, int by);
    return hz_t'((bx * 7 + by * 13 + lv * 5) * 37);
  endfunction
  assign hz_data = hz_of(int'(hz_level), int'(hz_bx), int'(hz_by));

  int checks = 0, failures = 0, n_tested = 0, n_hidden = 0, n_out = 0;
  tri_t expq[$];

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_tri !== expq[0]) begin
        failures++;
        if (failures < 10) $display("FAIL unexpected output triangle");
      end
      if (expq.size() > 0) void'(expq.pop_front());
      n_out++;
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      tri_t t;
      int x0, y0, sz, zmax, bxl[2], byl[2], bxh[2], byh[2];
      int xs[3], ys[3];
      logic tested, hidden;
      x0 = $urandom_range(0, 200); y0 = $urandom_range(0, 200);
      sz = (n % 3 == 0) ? 3 : ((n % 3 == 1) ? 8 : 20);
      zmax = 0;
      for (int i = 0; i < 3; i++) begin
        xs[i] = x0 + $urandom_range(0, sz); ys[i] = y0 + $urandom_range(0, sz);
        t.v[i].x = coord_t'(xs[i]); t.v[i].y = coord_t'(ys[i]);
        t.v[i].z = z_t'($urandom); t.v[i].r = 8'($urandom); t.v[i].g = 8'($urandom); t.v[i].b = 8'($urandom);
        if (int'(t.v[i].z) > zmax) zmax = int'(t.v[i].z);
      end
      // covered pixels lie in [min, max-1] (or the single column/row min)
      begin
        int mnx, mxx, mny, mxy;
        mnx = xs[0]; mxx = xs[0]; mny = ys[0]; mxy = ys[0];
        for (int i = 1; i < 3; i++) begin
          mnx = xs[i] < mnx ? xs[i] : mnx; mxx = xs[i] > mxx ? xs[i] : mxx;
          mny = ys[i] < mny ? ys[i] : mny; mxy = ys[i] > mxy ? ys[i] : mxy;
        end
        if (mxx > mnx) mxx--;
        if (mxy > mny) mxy--;
        if (mnx / LOW == mxx / LOW && mny / LOW == mxy / LOW) begin
          tested = 1; hidden = zmax < 256 * int'(hz_of(0, mnx / LOW, mny / LOW));
        end else if (mnx / HIGH == mxx / HIGH && mny / HIGH == mxy / HIGH) begin
          tested = 1; hidden = zmax < 256 * int'(hz_of(1, mnx / HIGH, mny / HIGH));
        end else begin
          tested = 0; hidden = 0;
        end
      end
      n_tested += int'(tested);
      n_hidden += int'(hidden);
      if (!hidden) expq.push_back(t);
      @(negedge clk);
      in_tri = t; in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      in_valid <= 0;
    end
    while (expq.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks += 4;
    if (tri_in != N)              begin failures++; $display("FAIL tri_in %0d", tri_in); end
    if (tri_tested != n_tested)   begin failures++; $display("FAIL tested %0d exp %0d", tri_tested, n_tested); end
    if (tri_discard != n_hidden)  begin failures++; $display("FAIL discard %0d exp %0d", tri_discard, n_hidden); end
    if (n_out != N - n_hidden)    begin failures++; $display("FAIL out %0d", n_out); end
    $display("tested %0d hidden %0d", n_tested, n_hidden);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
