// tb_bitmask_cache: coverage tracking of the bit-mask cache.
// A 4-entry cache receives random depth-write reports (one column of up to
// four pixels of a 4x4 block) mostly to three blocks and now and then to four others, more blocks than it has
// entries, with random back-pressure on its update output. A testbench
// model with the same replacement rule (hit, else lowest free entry, else
// the round-robin victim) predicts each update: a block is reported, with
// the minimum depth written while its entry was open, exactly when all 16
// of its pixels have been written. The eviction counter is checked at the
// end.
module tb_bitmask_cache;
  import vdr_pkg::*;
  localparam int E = 4, LOW = 4, N = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, in_valid = 0, in_ready, upd_valid, upd_ready = 0;
  zwrite_t in_wr = '0;
  coord_t upd_bx, upd_by;
  z_t upd_z;
  logic [31:0] evictions;

  bitmask_cache #(.ENTRIES(E), .LOW(LOW)) dut (.*);

  typedef struct { bit v; int bx, by; bit [15:0] m; int z; } ment_t;
  ment_t me[E];
  int rr = 0, n_evict = 0, checks = 0, failures = 0, n_upd = 0;
  typedef struct { int bx, by, z; } upd_t;
  upd_t expq[$];

  always @(posedge clk) begin
    if (upd_valid && upd_ready) begin
      checks++;
      n_upd++;
      if (expq.size() == 0 || int'(upd_bx) != expq[0].bx || int'(upd_by) != expq[0].by || int'(upd_z) != expq[0].z) begin
        failures++;
        if (failures < 5) $display("FAIL update (%0d,%0d) z=%0d", upd_bx, upd_by, upd_z);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
    upd_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    foreach (me[i]) me[i].v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      zwrite_t w;
      int bx, by, slot, zmin;
      bit [15:0] bits;
      bit hit;
      if ($urandom_range(0, 9) == 0) begin bx = $urandom_range(3, 6); by = 1; end
      else begin bx = $urandom_range(0, 2); by = 0; end
      w = '0;
      w.x = coord_t'(bx * 4 + $urandom_range(0, 3));
      w.y0 = coord_t'(by * 4);
      w.mask = 4'($urandom);
      bits = 0; zmin = 65535;
      for (int p = 0; p < 4; p++) begin
        w.z[p] = z_t'($urandom_range(1000, 60000));
        if (w.mask[p]) begin
          bits[p * 4 + int'(w.x) % 4] = 1;
          if (int'(w.z[p]) < zmin) zmin = int'(w.z[p]);
        end
      end
      if (w.mask != 0) begin
        hit = 0; slot = -1;
        for (int i = 0; i < E; i++) if (me[i].v && me[i].bx == bx && me[i].by == by) begin hit = 1; slot = i; end
        if (!hit) begin
          for (int i = E - 1; i >= 0; i--) if (!me[i].v) slot = i;
          if (slot < 0) begin slot = rr; rr = (rr + 1) % E; n_evict++; end
          me[slot].v = 1; me[slot].bx = bx; me[slot].by = by; me[slot].m = 0; me[slot].z = 65535;
        end
        me[slot].m |= bits;
        if (zmin < me[slot].z) me[slot].z = zmin;
        if (me[slot].m == 16'hFFFF) begin
          upd_t u;
          u.bx = bx; u.by = by; u.z = me[slot].z;
          expq.push_back(u);
          me[slot].v = 0;
        end
      end
      @(negedge clk);
      in_wr = w; in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      in_valid <= 0;
    end
    while (expq.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks += 2;
    if (evictions != n_evict) begin failures++; $display("FAIL evictions %0d exp %0d", evictions, n_evict); end
    if (n_upd == 0) begin failures++; $display("FAIL no update"); end
    $display("updates %0d evictions %0d", n_upd, n_evict);
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
