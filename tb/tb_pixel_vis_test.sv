// tb_pixel_vis_test: pixel-level HZ test.
// Random column groups (random masks, depths near the HZ thresholds) are
// sent with random output back-pressure. The HZ entries come from a hash
// of the low-level block. Each group must come out with exactly the lanes
// whose depth is not below the block's entry scaled to 16 bits, groups left
// empty must vanish, and the pixel counters must match.
module tb_pixel_vis_test;
  import vdr_pkg::*;
  localparam int LOW = 4, N = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pix_group_t in_pix = '0, out_pix;
  coord_t hz_bx, hz_by;
  hz_t hz_data;
  logic [31:0] pix_in, pix_discard;

  pixel_vis_test #(.LOW(LOW)) dut (.*);

  function automatic hz_t hz_of(int bx, int by);
    return hz_t'((bx * 11 + by * 5) * 29);
  endfunction
  assign hz_data = hz_of(int'(hz_bx), int'(hz_by));

  int checks = 0, failures = 0, n_in = 0, n_drop = 0;
  pix_group_t expq[$];

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_pix !== expq[0]) begin
        failures++;
        if (failures < 5) $display("FAIL group mismatch mask %b", out_pix.mask);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      pix_group_t g, e;
      int h;
      g.x = coord_t'($urandom_range(0, 1599));
      g.y0 = coord_t'($urandom_range(0, 299) * 4);
      g.mask = 4'($urandom);
      h = 256 * int'(hz_of(int'(g.x) / LOW, int'(g.y0) / LOW));
      for (int p = 0; p < NLANE; p++) begin
        int z;
        z = h + $urandom_range(0, 1000) - 500;
        g.z[p] = z_t'(z < 0 ? 0 : (z > 65535 ? 65535 : z));
        g.rgb[p] = 24'($urandom);
      end
      e = g;
      for (int p = 0; p < NLANE; p++) begin
        e.mask[p] = g.mask[p] && (int'(g.z[p]) >= h);
        n_in += int'(g.mask[p]);
        n_drop += int'(g.mask[p] && !e.mask[p]);
      end
      if (e.mask != 0) expq.push_back(e);
      @(negedge clk);
      in_pix = g; in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      in_valid <= 0;
    end
    while (expq.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks += 2;
    if (pix_in != n_in)        begin failures++; $display("FAIL pix_in"); end
    if (pix_discard != n_drop) begin failures++; $display("FAIL pix_discard"); end
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
