// tile_rasterizer: visibility driven, tile-order scan-line rasterizer.
//
// A triangle is walked in bands of T scan-lines and, inside a band, tile by
// tile from left to right; inside a tile the NLANE span processors work on
// NLANE scan-lines in parallel, one pixel column per cycle.
//   1. Tile size: if the triangle spans more than 2*LOW scan-lines the large
//      tile (T = HIGH, one high-level HZ block) is used, else the small tile
//      (T = LOW, one low-level block).
//   2. Band setup (T cycles): the edge DDAs step down the long edge and the
//      upper/lower short edge one line per cycle and leave each line's span
//      [xs, xe) in the boundary registers LB/RB. Pixel (x, y) is covered when
//      x_left(y) <= x < x_right(y), i.e. xs = ceil(x_left), xe = ceil(x_right).
//   3. The attribute values at the band's first tile corner are evaluated
//      from the plane equation once per band; moving to the next tile adds
//      T*d/dx (the saved tile-boundary state of the source).
//   4. Tile test (1 cycle): maxz_estimator compares the tile's farthest-Z
//      bound with the HZ entry of the tile's block (high level for a large
//      tile, low level for a small one). A hidden tile is skipped at once.
//      Otherwise each scan-line is tested against the same entry and hidden
//      lines are disabled.
//   5. Rasterize: T/NLANE groups of NLANE lines, T columns each; a cycle
//      whose lanes are all empty emits nothing.
// Following the source: tile-order traversal, LB/RB registers, span
// processors with four DDAs, the tile-size rule, tile and scan-line tests.
// The cycle schedule, the one-cycle test and the plane evaluation per band
// are choices of this design.
//
// Interface: valid/ready setup_t in (taken only when idle), valid/ready
// pix_group_t out (lane p is pixel (x, y0+p); all lanes lie in one
// low-level block because NLANE divides LOW), one combinational HZ read
// port, and event counters.
module tile_rasterizer
  import vdr_pkg::*;
#(
  parameter int LOW  = 4,
  parameter int HIGH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  setup_t      in_setup,
  output logic        out_valid,
  input  logic        out_ready,
  output pix_group_t  out_pix,
  output logic        hz_level,
  output coord_t      hz_bx,
  output coord_t      hz_by,
  input  hz_t         hz_data,
  output logic        busy,
  output logic [31:0] large_tile_test,
  output logic [31:0] large_tile_hidden,
  output logic [31:0] small_tile_test,
  output logic [31:0] small_tile_hidden,
  output logic [31:0] line_hidden_cnt
);
  localparam int TMAX = HIGH;
  localparam int OW   = $clog2(TMAX + 1);
  localparam int RW   = $clog2(TMAX);
  localparam int LLG  = $clog2(LOW);
  localparam int HLG  = $clog2(HIGH);

  typedef enum logic [2:0] {S_IDLE, S_BAND, S_BORG, S_TEST, S_LOAD, S_RUN, S_NTILE, S_NBAND} state_e;
  state_e state;

  setup_t  su;
  logic    big;
  logic [2:0] tlg;
  coord_t  tsz;
  coord_t  ty, tx, bxmin, bxmax, col;
  logic [RW-1:0] r;                      // band-setup row counter
  logic [RW-1:0] g;                      // first row of the current lane group
  fx_t     el, eu, ew;                   // long, upper and lower edge DDAs
  coord_t  lb [TMAX];
  coord_t  rb [TMAX];
  logic [TMAX-1:0] lcov;                 // line inside the triangle with xs < xe
  logic [TMAX-1:0] len;                  // line enabled for rasterization
  fx_t [NATTR-1:0] aorg;                 // attributes at (tx, ty)

  // ------------------------------------------------------------ band setup
  coord_t  yline;
  logic    in_tri;
  fx_t     xshort, xleft, xright, cl, cr;
  always_comb begin
    yline  = ty + coord_t'(r);
    in_tri = (yline >= su.y_top) && (yline < su.y_bot);
    xshort = (yline < su.y_mid) ? eu : ew;
    xleft  = su.long_left ? el : xshort;
    xright = su.long_left ? xshort : el;
    cl     = fx_ceil(xleft);
    cr     = fx_ceil(xright);
    if (cl < 0) cl = '0;
    if (cr < 0) cr = '0;
  end

  // ------------------------------------------------------------ tile test
  logic [TMAX-1:0]          row_cov;
  logic [TMAX-1:0][OW-1:0]  cs_off, ce_off;
  coord_t                   cs_abs, ce_abs;
  always_comb begin
    for (int i = 0; i < TMAX; i++) begin
      cs_abs = (lb[i] > tx) ? lb[i] : tx;
      ce_abs = (rb[i] < tx + tsz) ? rb[i] : tx + tsz;
      row_cov[i] = lcov[i] && (i < int'(tsz)) && (cs_abs < ce_abs);
      cs_off[i]  = row_cov[i] ? OW'(cs_abs - tx) : '0;
      ce_off[i]  = row_cov[i] ? OW'(ce_abs - tx) : '0;
    end
  end

  logic tile_any, tile_full, tile_hidden;
  fx_t  tile_max;
  fx_t [TMAX-1:0] line_max;
  logic [TMAX-1:0] line_hid;
  maxz_estimator #(.TMAX(TMAX)) u_est (
    .tile_lg(tlg), .zorg(aorg[A_Z]), .dzdx(su.dadx[A_Z]), .dzdy(su.dady[A_Z]),
    .row_cov, .cs_off, .ce_off, .hz(hz_data),
    .tile_any, .tile_full, .tile_max, .tile_hidden,
    .line_max, .line_hidden(line_hid)
  );

  assign hz_level = big;
  assign hz_bx    = big ? coord_t'(tx >> HLG) : coord_t'(tx >> LLG);
  assign hz_by    = big ? coord_t'(ty >> HLG) : coord_t'(ty >> LLG);

  // ------------------------------------------------------------ span processors
  logic             sp_load, sp_step;
  logic [NLANE-1:0] sp_valid;
  coord_t [NLANE-1:0] sp_x;
  logic [NLANE-1:0][Z_W-1:0]   sp_z;
  logic [NLANE-1:0][3*C_W-1:0] sp_rgb;
  fx_t  [NLANE-1:0][NATTR-1:0] sp_init;

  for (genvar p = 0; p < NLANE; p++) begin : g_sp
    localparam int P = p;
    always_comb
      for (int k = 0; k < NATTR; k++)
        sp_init[p][k] = aorg[k] + fx_t'(int'(g) + P) * su.dady[k];
    span_processor u_sp (
      .clk, .rst_n, .load(sp_load), .step(sp_step), .x0(tx),
      .init(sp_init[p]), .inc(su.dadx),
      .line_en(len[int'(g) + P]), .xs(lb[int'(g) + P]), .xe(rb[int'(g) + P]),
      .pix_valid(sp_valid[p]), .pix_x(sp_x[p]), .pix_z(sp_z[p]), .pix_rgb(sp_rgb[p])
    );
  end

  assign sp_load   = (state == S_LOAD);
  assign out_valid = (state == S_RUN) && (|sp_valid);
  assign sp_step   = (state == S_RUN) && (!out_valid || out_ready);
  assign in_ready  = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  always_comb begin
    out_pix      = '0;
    out_pix.mask = sp_valid;
    out_pix.x    = sp_x[0];
    out_pix.y0   = ty + coord_t'(g);
    out_pix.z    = sp_z;
    out_pix.rgb  = sp_rgb;
  end

  function automatic logic [31:0] popcount(logic [TMAX-1:0] v);
    logic [31:0] n = 0;
    for (int i = 0; i < TMAX; i++) n += 32'(v[i]);
    return n;
  endfunction

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      su <= '0; big <= 1'b0; tlg <= '0; tsz <= '0;
      ty <= '0; tx <= '0; bxmin <= '0; bxmax <= '0; col <= '0;
      r <= '0; g <= '0; el <= '0; eu <= '0; ew <= '0;
      lcov <= '0; len <= '0; aorg <= '0;
      for (int i = 0; i < TMAX; i++) begin lb[i] <= '0; rb[i] <= '0; end
      large_tile_test <= '0; large_tile_hidden <= '0;
      small_tile_test <= '0; small_tile_hidden <= '0; line_hidden_cnt <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          su    <= in_setup;
          big <= (in_setup.y_bot - in_setup.y_top) > coord_t'(2 * LOW);
          if ((in_setup.y_bot - in_setup.y_top) > coord_t'(2 * LOW)) begin
            tlg <= 3'(HLG); tsz <= coord_t'(HIGH);
            ty  <= in_setup.y_top & ~coord_t'(HIGH - 1);
          end else begin
            tlg <= 3'(LLG); tsz <= coord_t'(LOW);
            ty  <= in_setup.y_top & ~coord_t'(LOW - 1);
          end
          el <= in_setup.x_top;
          eu <= in_setup.x_top;
          ew <= in_setup.x_mid;
          r  <= '0;
          lcov  <= '0;
          bxmin <= '1;
          bxmax <= '0;
          state <= S_BAND;
        end

        S_BAND: begin
          lb[r] <= coord_t'(cl);
          rb[r] <= coord_t'(cr);
          if (in_tri) begin
            el <= el + su.s_long;
            if (yline < su.y_mid) eu <= eu + su.s_upper;
            else                  ew <= ew + su.s_lower;
            if (cl < cr) begin
              lcov[r] <= 1'b1;
              if (coord_t'(cl) < bxmin) bxmin <= coord_t'(cl);
              if (coord_t'(cr) > bxmax) bxmax <= coord_t'(cr);
            end
          end
          if (coord_t'(r) == tsz - 1'b1) state <= S_BORG;
          else r <= r + 1'b1;
        end

        S_BORG: begin
          if (lcov == '0) state <= S_NBAND;
          else begin
            tx <= bxmin & ~(tsz - 1'b1);
            for (int k = 0; k < NATTR; k++)
              aorg[k] <= su.a_org[k]
                       + (fx_t'(bxmin & ~(tsz - 1'b1)) - fx_t'(su.x_org)) * su.dadx[k]
                       + (fx_t'(ty) - fx_t'(su.y_org)) * su.dady[k];
            state <= S_TEST;
          end
        end

        S_TEST: begin
          if (!tile_any) state <= S_NTILE;
          else begin
            if (big) large_tile_test <= large_tile_test + 1;
            else       small_tile_test <= small_tile_test + 1;
            if (tile_hidden) begin
              if (big) large_tile_hidden <= large_tile_hidden + 1;
              else       small_tile_hidden <= small_tile_hidden + 1;
              state <= S_NTILE;
            end else begin
              line_hidden_cnt <= line_hidden_cnt + popcount(row_cov & line_hid);
              len   <= row_cov & ~line_hid;
              g     <= '0;
              state <= S_LOAD;
            end
          end
        end

        S_LOAD: begin
          col   <= '0;
          state <= S_RUN;
        end

        S_RUN: if (sp_step) begin
          if (col == tsz - 1'b1) begin
            if (coord_t'(g) + coord_t'(NLANE) >= tsz) state <= S_NTILE;
            else begin
              g     <= g + RW'(NLANE);
              state <= S_LOAD;
            end
          end else col <= col + 1'b1;
        end

        S_NTILE: begin
          for (int k = 0; k < NATTR; k++) aorg[k] <= aorg[k] + (su.dadx[k] <<< tlg);
          tx <= tx + tsz;
          if (tx + tsz >= bxmax) state <= S_NBAND;
          else                   state <= S_TEST;
        end

        S_NBAND: begin
          r    <= '0;
          lcov <= '0;
          bxmin <= '1;
          bxmax <= '0;
          ty   <= ty + tsz;
          if (ty + tsz >= su.y_bot) state <= S_IDLE;
          else                      state <= S_BAND;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (LOW % NLANE == 0 && HIGH % LOW == 0)
    else $error("NLANE must divide LOW and LOW must divide HIGH");

endmodule
