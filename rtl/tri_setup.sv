// tri_setup: triangle setup for the tile-order rasterizer.
//
// Sorts the vertices by y (top, middle, bottom = 1, 2, 3), forms
//   area  = (x3-x1)(y2-y1) - (x2-x1)(y3-y1)
//   da/dx = ((y2-y1)(a3-a1) - (y3-y1)(a2-a1)) / area
//   da/dy = ((x3-x1)(a2-a1) - (a3-a1)(x2-x1)) / area
// for the four attributes a = Z, R, G, B (the slope formulas of the source,
// applied to colour as well as depth), and the edge slopes dx/dy of the
// edges 1-3 (long), 1-2 (upper) and 2-3 (lower). The sign of area tells on
// which side the long edge lies. All quotients are Q.16, truncated toward
// zero, produced one after the other by a shared sequential divider
// (11 divisions of 48 cycles, about 540 cycles per triangle: a choice of
// this design, the source does not describe the setup hardware).
// Triangles with zero area cover no pixel and are dropped (counted in
// degenerate).
//
// Interface: valid/ready tri_t in, valid/ready setup_t out.
module tri_setup
  import vdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  tri_t        in_tri,
  output logic        out_valid,
  input  logic        out_ready,
  output setup_t      out_setup,
  output logic [31:0] degenerate
);
  localparam int NDIV = 2 * NATTR + 3;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_WAIT, S_OUT} state_e;
  state_e state;

  vertex_t vt, vm, vb;            // sorted vertices
  fx_t     num [NDIV];
  fx_t     den [NDIV];
  fx_t     res [NDIV];
  logic [$clog2(NDIV)-1:0] idx;

  // combinational sort of the incoming triangle
  vertex_t s0, s1, s2, t;
  always_comb begin
    s0 = in_tri.v[0]; s1 = in_tri.v[1]; s2 = in_tri.v[2];
    if (s1.y < s0.y) begin t = s0; s0 = s1; s1 = t; end
    if (s2.y < s1.y) begin t = s1; s1 = s2; s2 = t; end
    if (s1.y < s0.y) begin t = s0; s0 = s1; s1 = t; end
    t = s0;
  end

  function automatic fx_t attr(vertex_t v, int k);
    case (k)
      A_Z:     return fx_t'(v.z);
      A_R:     return fx_t'(v.r);
      A_G:     return fx_t'(v.g);
      default: return fx_t'(v.b);
    endcase
  endfunction

  // operands of the divisions, from the sorted registers
  fx_t dx2, dy2, dx3, dy3, area;
  always_comb begin
    dx2  = fx_t'(vm.x) - fx_t'(vt.x);
    dy2  = fx_t'(vm.y) - fx_t'(vt.y);
    dx3  = fx_t'(vb.x) - fx_t'(vt.x);
    dy3  = fx_t'(vb.y) - fx_t'(vt.y);
    area = dx3 * dy2 - dx2 * dy3;
    for (int k = 0; k < NATTR; k++) begin
      num[2*k]   = (dy2 * (attr(vb, k) - attr(vt, k)) - dy3 * (attr(vm, k) - attr(vt, k))) <<< FRAC;
      den[2*k]   = area;
      num[2*k+1] = (dx3 * (attr(vm, k) - attr(vt, k)) - (attr(vb, k) - attr(vt, k)) * dx2) <<< FRAC;
      den[2*k+1] = area;
    end
    num[2*NATTR]   = dx3 <<< FRAC;                           den[2*NATTR]   = dy3;
    num[2*NATTR+1] = dx2 <<< FRAC;                           den[2*NATTR+1] = dy2;
    num[2*NATTR+2] = (fx_t'(vb.x) - fx_t'(vm.x)) <<< FRAC;   den[2*NATTR+2] = fx_t'(vb.y) - fx_t'(vm.y);
  end

  logic div_start, div_busy, div_done;
  fx_t  div_q;
  seq_div #(.N(48)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(num[idx]), .divisor(den[idx]),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );
  assign div_start = (state == S_DIV) && (area != 0);

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; degenerate <= '0;
      vt <= '0; vm <= '0; vb <= '0;
      for (int i = 0; i < NDIV; i++) res[i] <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          vt <= s0; vm <= s1; vb <= s2; idx <= '0;
          state <= S_DIV;
        end
        S_DIV: begin
          if (area == 0) begin
            degenerate <= degenerate + 1;
            state      <= S_IDLE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: if (div_done) begin
          res[idx] <= div_q;
          if (idx == ($clog2(NDIV))'(NDIV - 1)) state <= S_OUT;
          else begin
            idx   <= idx + 1'b1;
            state <= S_DIV;
          end
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    out_setup           = '0;
    out_setup.y_top     = vt.y;
    out_setup.y_mid     = vm.y;
    out_setup.y_bot     = vb.y;
    out_setup.x_top     = fx_t'(vt.x) <<< FRAC;
    out_setup.x_mid     = fx_t'(vm.x) <<< FRAC;
    out_setup.s_long    = res[2*NATTR];
    out_setup.s_upper   = res[2*NATTR+1];
    out_setup.s_lower   = res[2*NATTR+2];
    out_setup.long_left = area < 0;
    out_setup.x_org     = vt.x;
    out_setup.y_org     = vt.y;
    for (int k = 0; k < NATTR; k++) begin
      out_setup.a_org[k] = attr(vt, k) <<< FRAC;
      out_setup.dadx[k]  = res[2*k];
      out_setup.dady[k]  = res[2*k+1];
    end
  end

endmodule
