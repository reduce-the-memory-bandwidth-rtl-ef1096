// tb_span_processor: the four DDAs of one span processor.
// Random start values and increments (depth and colours, including values
// that run out of range and must clamp) are loaded, then the processor is
// stepped across 16 columns, sometimes with idle cycles in between. At
// every column the depth, colour, x and the coverage decision against a
// random span [xs, xe) are compared with direct evaluation of
// init + n*inc.
module tb_span_processor;
  import vdr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, step = 0, line_en = 0;
  coord_t x0 = 0, xs = 0, xe = 0;
  fx_t [NATTR-1:0] init = '0, inc = '0;
  logic pix_valid;
  coord_t pix_x;
  z_t pix_z;
  logic [3*C_W-1:0] pix_rgb;

  span_processor dut (.*);

  int checks = 0, failures = 0;

  function automatic int clampi(longint v, int hi);
    longint i = v >>> 16;
    return (i < 0) ? 0 : ((i > hi) ? hi : int'(i));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      x0 = coord_t'($urandom_range(0, 1500));
      init[0] = longint'($urandom_range(0, 65535)) << 16 | longint'($urandom_range(0, 65535));
      inc[0]  = longint'($urandom_range(0, 2000000)) - 1000000;
      for (int k = 1; k < 4; k++) begin
        init[k] = longint'($urandom_range(0, 300)) << 16;
        inc[k]  = longint'($urandom_range(0, 2000000)) - 1000000;
      end
      xs = x0 + coord_t'($urandom_range(0, 10));
      xe = x0 + coord_t'($urandom_range(0, 18));
      line_en = $urandom_range(0, 5) != 0;
      load = 1;
      @(negedge clk);
      load = 0;
      for (int c = 0; c < 16; c++) begin
        longint a[4];
        logic ev;
        for (int k = 0; k < 4; k++) a[k] = init[k] + longint'(c) * inc[k];
        ev = line_en && (int'(x0) + c >= int'(xs)) && (int'(x0) + c < int'(xe));
        checks++;
        if (pix_x !== x0 + coord_t'(c) || pix_valid !== ev || int'(pix_z) != clampi(a[0], 65535) ||
            pix_rgb !== {8'(clampi(a[1], 255)), 8'(clampi(a[2], 255)), 8'(clampi(a[3], 255))}) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d c=%0d x=%0d v=%b z=%0d exp z=%0d v=%b", n, c, pix_x, pix_valid, pix_z, clampi(a[0], 65535), ev);
        end
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // idle cycle: must hold
        step = 1;
        @(negedge clk);
        step = 0;
      end
    end
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
