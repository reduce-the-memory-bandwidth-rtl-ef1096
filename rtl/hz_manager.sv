// hz_manager: HZ-buffer management unit.
//
// Keeps the two HZ levels consistent with the Z-buffer. For each fully
// covered block reported by the bit-mask cache it
//   1. raises the low-level entry to the block's new farthest depth (the
//      upper HZ_W bits of the temporal farthest depth; never lowered), then
//   2. re-reads the (HIGH/LOW)^2 low-level entries that make up the
//      enclosing high-level block, one per cycle, and writes their minimum
//      (the farthest) into the high level.
// The source states that the management unit updates the HZ-buffer from the
// bit-mask cache's coverage information; the two-step sequence and
// recomputing the high level from its children are choices of this design.
//
// Interface: valid/ready update in (taken only when idle; 3 + (HIGH/LOW)^2
// cycles per update), one combinational low-level HZ read port, one write
// port per level, and a counter of low-level entries actually raised.
module hz_manager
  import vdr_pkg::*;
#(
  parameter int LOW  = 4,
  parameter int HIGH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        upd_valid,
  output logic        upd_ready,
  input  coord_t      upd_bx,
  input  coord_t      upd_by,
  input  z_t          upd_z,
  output coord_t      rd_bx,
  output coord_t      rd_by,
  input  hz_t         rd_data,
  output logic        wr_low_en,
  output coord_t      wr_low_bx,
  output coord_t      wr_low_by,
  output hz_t         wr_low_data,
  output logic        wr_high_en,
  output coord_t      wr_high_bx,
  output coord_t      wr_high_by,
  output hz_t         wr_high_data,
  output logic [31:0] hz_updates
);
  localparam int R  = HIGH / LOW;
  localparam int NC = R * R;
  localparam int CW = $clog2(NC + 1);

  typedef enum logic [1:0] {M_IDLE, M_LOW, M_CHILD, M_HIGH} state_e;
  state_e state;

  coord_t bx, by;
  hz_t    znew, hmin;
  logic [CW-1:0] ci;

  assign upd_ready = (state == M_IDLE);

  always_comb begin
    if (state == M_CHILD) begin
      rd_bx = coord_t'((int'(bx) / R) * R + int'(ci) % R);
      rd_by = coord_t'((int'(by) / R) * R + int'(ci) / R);
    end else begin
      rd_bx = bx;
      rd_by = by;
    end
    wr_low_en    = (state == M_LOW) && (znew > rd_data);
    wr_low_bx    = bx;
    wr_low_by    = by;
    wr_low_data  = znew;
    wr_high_en   = (state == M_HIGH);
    wr_high_bx   = coord_t'(int'(bx) / R);
    wr_high_by   = coord_t'(int'(by) / R);
    wr_high_data = hmin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; bx <= '0; by <= '0; znew <= '0; hmin <= '0; ci <= '0;
      hz_updates <= '0;
    end else begin
      case (state)
        M_IDLE: if (upd_valid) begin
          bx    <= upd_bx;
          by    <= upd_by;
          znew  <= upd_z[Z_W-1 -: HZ_W];
          state <= M_LOW;
        end
        M_LOW: begin
          if (znew > rd_data) hz_updates <= hz_updates + 1;
          ci    <= '0;
          hmin  <= '1;
          state <= M_CHILD;
        end
        M_CHILD: begin
          if (rd_data < hmin) hmin <= rd_data;
          if (ci == CW'(NC - 1)) state <= M_HIGH;
          else ci <= ci + 1'b1;
        end
        M_HIGH: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
