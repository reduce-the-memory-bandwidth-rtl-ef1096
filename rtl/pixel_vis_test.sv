// pixel_vis_test: pixel-level hierarchical Z test after the rasterizer.
//
// Every pixel of an incoming column group is compared with the low-level
// HZ entry of its block (all lanes of a group share one block). A pixel
// whose depth is below the block's farthest depth is hidden and removed
// from the group's mask before it reaches the Z-buffer, saving its
// Z-buffer read. A group left with no pixel is dropped.
//
// Interface: valid/ready pix_group_t in and out through one register
// stage (a group per cycle), one combinational low-level HZ read port,
// counters of pixels tested and discarded.
module pixel_vis_test
  import vdr_pkg::*;
#(
  parameter int LOW = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  pix_group_t  in_pix,
  output logic        out_valid,
  input  logic        out_ready,
  output pix_group_t  out_pix,
  output coord_t      hz_bx,
  output coord_t      hz_by,
  input  hz_t         hz_data,
  output logic [31:0] pix_in,
  output logic [31:0] pix_discard
);
  localparam int LLG = $clog2(LOW);

  logic [NLANE-1:0] keep;
  logic [31:0]      n_in, n_drop;

  assign hz_bx = coord_t'(in_pix.x  >> LLG);
  assign hz_by = coord_t'(in_pix.y0 >> LLG);

  always_comb begin
    n_in   = '0;
    n_drop = '0;
    for (int p = 0; p < NLANE; p++) begin
      keep[p] = in_pix.mask[p] && !(in_pix.z[p] < {hz_data, {(Z_W-HZ_W){1'b0}}});
      n_in    += 32'(in_pix.mask[p]);
      n_drop  += 32'(in_pix.mask[p] && !keep[p]);
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_pix     <= '0;
      pix_in      <= '0;
      pix_discard <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        pix_in      <= pix_in + n_in;
        pix_discard <= pix_discard + n_drop;
        if (|keep) begin
          out_valid    <= 1'b1;
          out_pix      <= in_pix;
          out_pix.mask <= keep;
        end
      end
    end
  end

endmodule
