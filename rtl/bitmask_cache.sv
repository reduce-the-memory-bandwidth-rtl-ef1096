// bitmask_cache: coverage bit-mask cache of the HZ-buffer management.
//
// Updating a low-level HZ entry exactly would need all LOW*LOW depths of the
// block read back from the Z-buffer after every write. Instead this cache
// follows the depth writes: per block it keeps a coverage mask with one bit
// per pixel and the temporal farthest depth (the minimum of the depths
// written). When the mask becomes all ones every pixel of the block has been
// overwritten since the entry was opened, no pixel is now farther than the
// temporal value, and the block is sent to the HZ manager as an update and
// the entry freed.
// The cache is fully associative with ENTRIES entries (64, the size used in
// the source's simulations). On a miss a free entry is opened; with none
// free the entry at a round-robin pointer is evicted and its partial
// coverage forgotten, which only delays an update (the replacement policy
// is a choice of this design; the source does not give one).
//
// Interface: valid/ready zwrite_t in (up to NLANE written pixels of one
// column group, one block), valid/ready update out (block and 16-bit
// temporal farthest depth). An input is taken only when the update register
// is free, so one group per cycle when the manager keeps up. flush empties
// the cache (frame start).
module bitmask_cache
  import vdr_pkg::*;
#(
  parameter int ENTRIES = 64,
  parameter int LOW     = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic        in_valid,
  output logic        in_ready,
  input  zwrite_t     in_wr,
  output logic        upd_valid,
  input  logic        upd_ready,
  output coord_t      upd_bx,
  output coord_t      upd_by,
  output z_t          upd_z,
  output logic [31:0] evictions
);
  localparam int LLG = $clog2(LOW);
  localparam int MB  = LOW * LOW;
  localparam int EW  = $clog2(ENTRIES);

  typedef struct packed {
    logic          valid;
    coord_t        bx;
    coord_t        by;
    logic [MB-1:0] mask;
    z_t            zmin;
  } entry_t;

  entry_t ent [ENTRIES];
  logic [EW-1:0] rr;

  coord_t        bx, by;
  logic [MB-1:0] bits;
  z_t            zw;
  logic          hit, has_free;
  logic [EW-1:0] hit_i, free_i, slot;
  logic [MB-1:0] mnew;
  z_t            znew;

  always_comb begin
    bx   = coord_t'(in_wr.x  >> LLG);
    by   = coord_t'(in_wr.y0 >> LLG);
    bits = '0;
    zw   = '1;
    for (int p = 0; p < NLANE; p++)
      if (in_wr.mask[p]) begin
        bits[((int'(in_wr.y0) + p) % LOW) * LOW + int'(in_wr.x) % LOW] = 1'b1;
        if (in_wr.z[p] < zw) zw = in_wr.z[p];
      end
    hit = 1'b0; hit_i = '0; has_free = 1'b0; free_i = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ent[i].valid && ent[i].bx == bx && ent[i].by == by) begin
        hit = 1'b1; hit_i = EW'(i);
      end
      if (!ent[i].valid) begin
        has_free = 1'b1; free_i = EW'(i);
      end
    end
    slot = hit ? hit_i : (has_free ? free_i : rr);
    mnew = hit ? (ent[slot].mask | bits) : bits;
    znew = (hit && ent[slot].zmin < zw) ? ent[slot].zmin : zw;
  end

  assign in_ready = !upd_valid || upd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      rr <= '0; upd_valid <= 1'b0; upd_bx <= '0; upd_by <= '0; upd_z <= '0;
      evictions <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) ent[i].valid <= 1'b0;
      upd_valid <= 1'b0;
    end else begin
      if (upd_valid && upd_ready) upd_valid <= 1'b0;
      if (in_valid && in_ready && in_wr.mask != '0) begin
        if (!hit && !has_free) begin
          evictions <= evictions + 1;
          rr <= rr + 1'b1;
        end
        if (&mnew) begin
          ent[slot].valid <= 1'b0;
          upd_valid <= 1'b1;
          upd_bx    <= bx;
          upd_by    <= by;
          upd_z     <= znew;
        end else begin
          ent[slot] <= '{valid: 1'b1, bx: bx, by: by, mask: mnew, zmin: znew};
        end
      end
    end
  end

endmodule
