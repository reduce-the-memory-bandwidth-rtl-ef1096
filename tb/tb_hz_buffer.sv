// tb_hz_buffer: checks the two-level HZ storage on a 64x32 screen.
// After clear_start every entry of both levels must read 0 and the clear
// must take exactly one cycle per low-level entry. Random writes to both
// levels are mirrored in a testbench model and every read port is compared
// with it, including reads of the address being written (old value until
// the clock edge).
module tb_hz_buffer;
  import vdr_pkg::*;
  localparam int SW = 64, SH = 32, LOW = 4, HIGH = 8, NRD = 2;
  localparam int LW = SW / LOW, LH = SH / LOW, HW = SW / HIGH, HH = SH / HIGH;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear_start = 0, clear_busy;
  logic [NRD-1:0] rd_level;
  coord_t [NRD-1:0] rd_bx, rd_by;
  hz_t [NRD-1:0] rd_data;
  logic wr_low_en = 0, wr_high_en = 0;
  coord_t wr_low_bx = 0, wr_low_by = 0, wr_high_bx = 0, wr_high_by = 0;
  hz_t wr_low_data = 0, wr_high_data = 0;

  hz_buffer #(.SCREEN_W(SW), .SCREEN_H(SH), .LOW(LOW), .HIGH(HIGH), .NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  hz_t mlow [LW*LH];
  hz_t mhigh[HW*HH];

  task automatic check_all();
    for (int lv = 0; lv < 2; lv++)
      for (int by = 0; by < (lv ? HH : LH); by++)
        for (int bx = 0; bx < (lv ? HW : LW); bx++) begin
          hz_t e;
          rd_level[0] = 1'(lv); rd_bx[0] = coord_t'(bx); rd_by[0] = coord_t'(by);
          rd_level[1] = 1'(lv); rd_bx[1] = coord_t'(bx); rd_by[1] = coord_t'(by);
          #1;
          e = lv ? mhigh[by*HW+bx] : mlow[by*LW+bx];
          for (int p = 0; p < NRD; p++) begin
            checks++;
            if (rd_data[p] !== e) begin
              failures++;
              if (failures < 10) $display("FAIL lv%0d (%0d,%0d) port%0d: %h exp %h", lv, bx, by, p, rd_data[p], e);
            end
          end
        end
  endtask

  initial begin
    int t0;
    rd_level = '0; rd_bx = '0; rd_by = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clear_start = 1;
    @(negedge clk);
    clear_start = 0;
    t0 = 0;
    while (clear_busy) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != LW*LH) begin failures++; $display("FAIL clear took %0d cycles, expected %0d", t0, LW*LH); end
    foreach (mlow[i]) mlow[i] = 0;
    foreach (mhigh[i]) mhigh[i] = 0;
    check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_low_en  = $urandom_range(0, 1);
      wr_low_bx  = coord_t'($urandom_range(0, LW-1));
      wr_low_by  = coord_t'($urandom_range(0, LH-1));
      wr_low_data = hz_t'($urandom);
      wr_high_en = $urandom_range(0, 1);
      wr_high_bx = coord_t'($urandom_range(0, HW-1));
      wr_high_by = coord_t'($urandom_range(0, HH-1));
      wr_high_data = hz_t'($urandom);
      // read-before-write on port 0
      rd_level[0] = 0; rd_bx[0] = wr_low_bx; rd_by[0] = wr_low_by;
      rd_level[1] = 1; rd_bx[1] = wr_high_bx; rd_by[1] = wr_high_by;
      #1;
      checks += 2;
      if (rd_data[0] !== mlow[wr_low_by*LW+wr_low_bx]) failures++;
      if (rd_data[1] !== mhigh[wr_high_by*HW+wr_high_bx]) failures++;
      @(posedge clk);
      if (wr_low_en)  mlow[wr_low_by*LW+wr_low_bx] = wr_low_data;
      if (wr_high_en) mhigh[wr_high_by*HW+wr_high_bx] = wr_high_data;
    end
    @(negedge clk);
    wr_low_en = 0; wr_high_en = 0;
    check_all();
    // a second clear empties everything again
    clear_start = 1;
    @(negedge clk);
    clear_start = 0;
    while (clear_busy) @(negedge clk);
    foreach (mlow[i]) mlow[i] = 0;
    foreach (mhigh[i]) mhigh[i] = 0;
    check_all();
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
