// tb_hz_manager: HZ management unit driving a real hz_buffer (32x16
// screen, 8x8-4x4). Random block updates (some lower than the stored
// entry, which must not lower it) are offered back to back. A testbench
// model keeps low = max(low, z[15:8]) and high = min of its four children;
// after every update all entries of both levels are read through a second
// port and compared. Each update must take 3 + (HIGH/LOW)^2 = 7 cycles.
module tb_hz_manager;
  import vdr_pkg::*;
  localparam int SW = 32, SH = 16, LOW = 4, HIGH = 8;
  localparam int LW = SW / LOW, LH = SH / LOW, HW = SW / HIGH, HH = SH / HIGH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear_start = 0, clear_busy;
  logic [1:0] rd_level;
  coord_t [1:0] rd_bx, rd_by;
  hz_t [1:0] rd_data;
  logic wr_low_en, wr_high_en;
  coord_t wr_low_bx, wr_low_by, wr_high_bx, wr_high_by;
  hz_t wr_low_data, wr_high_data;
  logic upd_valid = 0, upd_ready;
  coord_t upd_bx = 0, upd_by = 0;
  z_t upd_z = 0;
  logic [31:0] hz_updates;

  hz_buffer #(.SCREEN_W(SW), .SCREEN_H(SH), .LOW(LOW), .HIGH(HIGH), .NRD(2)) u_buf (
    .clk, .rst_n, .clear_start, .clear_busy, .rd_level, .rd_bx, .rd_by, .rd_data,
    .wr_low_en, .wr_low_bx, .wr_low_by, .wr_low_data,
    .wr_high_en, .wr_high_bx, .wr_high_by, .wr_high_data);
  assign rd_level[0] = 1'b0;
  hz_manager #(.LOW(LOW), .HIGH(HIGH)) dut (
    .clk, .rst_n, .upd_valid, .upd_ready, .upd_bx, .upd_by, .upd_z,
    .rd_bx(rd_bx[0]), .rd_by(rd_by[0]), .rd_data(rd_data[0]),
    .wr_low_en, .wr_low_bx, .wr_low_by, .wr_low_data,
    .wr_high_en, .wr_high_bx, .wr_high_by, .wr_high_data, .hz_updates);

  int checks = 0, failures = 0, n_raise = 0;
  int mlow[LW*LH], mhigh[HW*HH];

  task automatic check_all();
    for (int lv = 0; lv < 2; lv++)
      for (int by = 0; by < (lv ? HH : LH); by++)
        for (int bx = 0; bx < (lv ? HW : LW); bx++) begin
          rd_level[1] = 1'(lv); rd_bx[1] = coord_t'(bx); rd_by[1] = coord_t'(by);
          #1;
          checks++;
          if (int'(rd_data[1]) != (lv ? mhigh[by*HW+bx] : mlow[by*LW+bx])) begin
            failures++;
            if (failures < 5) $display("FAIL lv%0d (%0d,%0d) %0d", lv, bx, by, rd_data[1]);
          end
        end
  endtask

  initial begin
    rd_level[1] = 0; rd_bx[1] = 0; rd_by[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear_start = 1; @(negedge clk); clear_start = 0;
    while (clear_busy) @(negedge clk);
    foreach (mlow[i]) mlow[i] = 0;
    foreach (mhigh[i]) mhigh[i] = 0;
    for (int n = 0; n < 200; n++) begin
      int bx, by, z, hb, cyc;
      bx = $urandom_range(0, LW - 1); by = $urandom_range(0, LH - 1);
      z = $urandom_range(0, 65535);
      @(negedge clk);
      upd_bx = coord_t'(bx); upd_by = coord_t'(by); upd_z = z_t'(z); upd_valid = 1;
      @(negedge clk);
      upd_valid = 0;
      cyc = 1;
      while (!upd_ready) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 3 + (HIGH / LOW) * (HIGH / LOW)) begin failures++; $display("FAIL update took %0d cycles", cyc); end
      if ((z >> 8) > mlow[by*LW+bx]) begin mlow[by*LW+bx] = z >> 8; n_raise++; end
      hb = (by / 2) * HW + bx / 2;
      mhigh[hb] = 255;
      for (int j = 0; j < 2; j++)
        for (int i = 0; i < 2; i++)
          if (mlow[((by / 2) * 2 + j) * LW + (bx / 2) * 2 + i] < mhigh[hb])
            mhigh[hb] = mlow[((by / 2) * 2 + j) * LW + (bx / 2) * 2 + i];
      check_all();
    end
    checks++;
    if (int'(hz_updates) != n_raise) begin failures++; $display("FAIL hz_updates %0d exp %0d", hz_updates, n_raise); end
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
