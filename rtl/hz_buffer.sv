// hz_buffer: on-chip storage of the two-level hierarchical Z-buffer.
//
// The low level keeps one depth per LOW x LOW pixel block, the high level one
// depth per HIGH x HIGH block. Each entry is the farthest depth (the minimum,
// see vdr_pkg) of the pixels it covers, reduced to HZ_W bits by truncation,
// which can only move it farther and so keeps every test conservative.
// The default is the 8x8-4x4 configuration at 1600x1200 with 8-bit entries;
// the 16x16-8x8 configuration is HIGH=16, LOW=8.
//
// Interface: NRD combinational read ports, each selecting a level (0 = low,
// 1 = high) and a block coordinate; one write port per level. A pulse on
// clear_start walks both arrays and sets every entry to 0 (farthest), one
// address per cycle; clear_busy is high meanwhile and writes are ignored.
// Reads are asynchronous (register-file style), a choice of this design.
module hz_buffer
  import vdr_pkg::*;
#(
  parameter int SCREEN_W = 1600,
  parameter int SCREEN_H = 1200,
  parameter int LOW      = 4,
  parameter int HIGH     = 8,
  parameter int NRD      = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear_start,
  output logic                 clear_busy,
  input  logic [NRD-1:0]       rd_level,
  input  coord_t [NRD-1:0]     rd_bx,
  input  coord_t [NRD-1:0]     rd_by,
  output hz_t  [NRD-1:0]       rd_data,
  input  logic                 wr_low_en,
  input  coord_t               wr_low_bx,
  input  coord_t               wr_low_by,
  input  hz_t                  wr_low_data,
  input  logic                 wr_high_en,
  input  coord_t               wr_high_bx,
  input  coord_t               wr_high_by,
  input  hz_t                  wr_high_data
);
  localparam int LW = (SCREEN_W + LOW - 1) / LOW;
  localparam int LH = (SCREEN_H + LOW - 1) / LOW;
  localparam int HW = (SCREEN_W + HIGH - 1) / HIGH;
  localparam int HH = (SCREEN_H + HIGH - 1) / HIGH;
  localparam int LN = LW * LH;
  localparam int HN = HW * HH;
  localparam int AW = $clog2(LN + 1);

  hz_t low_mem  [LN];
  hz_t high_mem [HN];

  logic [AW-1:0] clr_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clear_busy <= 1'b0;
      clr_idx    <= '0;
    end else if (clear_start && !clear_busy) begin
      clear_busy <= 1'b1;
      clr_idx    <= '0;
    end else if (clear_busy) begin
      if (clr_idx == AW'(LN - 1)) clear_busy <= 1'b0;
      clr_idx <= clr_idx + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (clear_busy) begin
      low_mem[int'(clr_idx)] <= '0;
      if (clr_idx < AW'(HN)) high_mem[int'(clr_idx)] <= '0;
    end else begin
      if (wr_low_en)  low_mem[int'(wr_low_by) * LW + int'(wr_low_bx)]   <= wr_low_data;
      if (wr_high_en) high_mem[int'(wr_high_by) * HW + int'(wr_high_bx)] <= wr_high_data;
    end
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) begin
      if (rd_level[i]) rd_data[i] = high_mem[int'(rd_by[i]) * HW + int'(rd_bx[i])];
      else             rd_data[i] = low_mem[int'(rd_by[i]) * LW + int'(rd_bx[i])];
    end
  end

endmodule
