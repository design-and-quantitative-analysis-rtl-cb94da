// efpga_top: arithmetic-oriented eFPGA macro.
//
// The macro is an NR x NC grid of tiles (2 x 2 by default, each a 4 x 4 LE
// cluster, 64 LEs in all). It is aimed at arithmetic datapaths such as
// correlators, decoders and filters, whose signals mostly travel to the
// next bit or the next row. The interconnect is therefore split in two:
//   * Local interconnect (wired in this module): a fixed, directional
//     nearest-neighbour network over the whole LE array, top-to-bottom and
//     right-to-left, with both lower diagonals. It crosses tile borders.
//   * Global interconnect: one horizontal channel above each tile row and
//     one vertical channel right of each tile column, 16 tracks each
//     (8 wires per direction). A routing switch at every crossing connects
//     the channels; connection boxes feed the channels' wires onto the
//     clusters' broadcast lines, and the bottom ends of the vertical
//     broadcast lines return cluster results to the routing switch.
//
// Channel wiring, with he/hw the east-/west-going wires of the horizontal
// segment above tile (r,c) and vs/vn the south-/north-going wires of the
// vertical segment right of tile (r,c):
//   he[r][c] = c==0    ? west_in[r]  : RS(r,c-1).E      hw[r][c] = RS(r,c).W
//   vs[r][c] = RS(r,c).S         vn[r][c] = r==NR-1 ? south_in[c] : RS(r+1,c).N
// and the wires leaving the grid edge are the *_out ports.
//
// Configuration: word address cfg_addr = {tile index r*NC+c, word}, with
// the word map of ao_tile. A configuration write takes one clock.
// LE coordinates on the local-interconnect ports are global: LE (r,c) of
// tile (tr,tc) is (tr*4 + r, tc*4 + c), row 0 at the top.
//
// The tile count, cluster size, granularity and track count are the
// published macro; the edge ports and the configuration port are this
// implementation's own.
//
// Combinational loops: like any FPGA fabric, the routing switches and the
// transparent LE paths can be configured into a loop (for example a signal
// sent east through one switch and turned back west by the next). Lint
// tools therefore report loops through rs_out and the LE paths. They are
// structural only; a legal configuration never closes one, and every
// configuration used in the testbenches is loop-free.
module efpga_top
  import efpga_pkg::*;
#(
  parameter int unsigned NR       = 2,
  parameter int unsigned NC       = 2,
  parameter int unsigned R        = 4,
  parameter int unsigned C        = 4,
  parameter int unsigned CFG_GRAN = 4,
  localparam int unsigned ROWS    = NR * R,
  localparam int unsigned COLS    = NC * C,
  localparam int unsigned TBITS   = (NR * NC > 1) ? $clog2(NR * NC) : 1,
  localparam int unsigned TAW     = tile_abits(R, C, CFG_GRAN),
  localparam int unsigned ABITS   = TBITS + TAW
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration port
  input  logic               cfg_we,
  input  logic [ABITS-1:0]   cfg_addr,
  input  logic [CFG_W-1:0]   cfg_wdata,
  output logic [CFG_W-1:0]   cfg_rdata,
  // global channels at the macro edge
  input  logic [TRK_DIR-1:0] west_in   [NR],
  output logic [TRK_DIR-1:0] west_out  [NR],
  input  logic [TRK_DIR-1:0] east_in   [NR],
  output logic [TRK_DIR-1:0] east_out  [NR],
  input  logic [TRK_DIR-1:0] north_in  [NC],
  output logic [TRK_DIR-1:0] north_out [NC],
  input  logic [TRK_DIR-1:0] south_in  [NC],
  output logic [TRK_DIR-1:0] south_out [NC],
  // local interconnect at the macro edge
  input  logic               loc_e_in   [ROWS],
  input  logic [1:0]         loc_n_in   [COLS],
  output logic               loc_w_out  [ROWS],
  output logic [1:0]         loc_s_out  [COLS],
  output logic               loc_se_out [ROWS]
);

  // ------------------------------------------------ configuration decode
  logic [TBITS-1:0]      cfg_tile;
  logic [TAW-1:0]        cfg_word;
  logic [CFG_W-1:0]      tile_rdata [NR * NC];

  assign cfg_tile  = cfg_addr[ABITS-1 -: TBITS];
  assign cfg_word  = cfg_addr[TAW-1:0];
  assign cfg_rdata = (32'(cfg_tile) < NR * NC) ? tile_rdata[cfg_tile] : '0;

  // ------------------------------------------------ global channel wires
  logic [TRK_DIR-1:0] he [NR][NC];
  logic [TRK_DIR-1:0] hw [NR][NC];
  logic [TRK_DIR-1:0] vs [NR][NC];
  logic [TRK_DIR-1:0] vn [NR][NC];
  logic [TRK_DIR-1:0] rs_in  [NR][NC][4];
  logic [TRK_DIR-1:0] rs_out [NR][NC][4];

  // ------------------------------------------------ local wires (global coords)
  logic       le_w  [ROWS][COLS];
  logic [1:0] le_s  [ROWS][COLS];
  logic       le_sw [ROWS][COLS];
  logic       le_se [ROWS][COLS];
  logic       le_nw [ROWS][COLS];
  logic [1:0] le_n  [ROWS][COLS];
  logic       le_ne [ROWS][COLS];
  logic       le_e  [ROWS][COLS];

  for (genvar tr = 0; tr < NR; tr++) begin : g_tr
    for (genvar tc = 0; tc < NC; tc++) begin : g_tc
      logic       t_nw [R][C];
      logic [1:0] t_n  [R][C];
      logic       t_ne [R][C];
      logic       t_e  [R][C];
      logic       t_w  [R][C];
      logic [1:0] t_s  [R][C];
      logic       t_sw [R][C];
      logic       t_se [R][C];

      for (genvar r = 0; r < R; r++) begin : g_r
        for (genvar c = 0; c < C; c++) begin : g_c
          assign t_nw[r][c] = le_nw[tr*R + r][tc*C + c];
          assign t_n [r][c] = le_n [tr*R + r][tc*C + c];
          assign t_ne[r][c] = le_ne[tr*R + r][tc*C + c];
          assign t_e [r][c] = le_e [tr*R + r][tc*C + c];
          assign le_w [tr*R + r][tc*C + c] = t_w [r][c];
          assign le_s [tr*R + r][tc*C + c] = t_s [r][c];
          assign le_sw[tr*R + r][tc*C + c] = t_sw[r][c];
          assign le_se[tr*R + r][tc*C + c] = t_se[r][c];
        end
      end

      // channel segments owned by this tile
      if (tc == 0) begin : g_hwest
        assign he[tr][tc] = west_in[tr];
      end else begin : g_hin
        assign he[tr][tc] = rs_out[tr][tc-1][SIDE_E];
      end
      assign hw[tr][tc] = rs_out[tr][tc][SIDE_W];
      assign vs[tr][tc] = rs_out[tr][tc][SIDE_S];
      if (tr == NR-1) begin : g_vsouth
        assign vn[tr][tc] = south_in[tc];
      end else begin : g_vin
        assign vn[tr][tc] = rs_out[tr+1][tc][SIDE_N];
      end

      // wires arriving at this tile's routing switch
      if (tr == 0) begin : g_rsn_edge
        assign rs_in[tr][tc][SIDE_N] = north_in[tc];
      end else begin : g_rsn
        assign rs_in[tr][tc][SIDE_N] = vs[tr-1][tc];
      end
      if (tc == NC-1) begin : g_rse_edge
        assign rs_in[tr][tc][SIDE_E] = east_in[tr];
      end else begin : g_rse
        assign rs_in[tr][tc][SIDE_E] = hw[tr][tc+1];
      end
      assign rs_in[tr][tc][SIDE_S] = vn[tr][tc];
      assign rs_in[tr][tc][SIDE_W] = he[tr][tc];

      ao_tile #(.R(R), .C(C), .CFG_GRAN(CFG_GRAN)) u_tile (
        .clk       (clk),
        .rst_n     (rst_n),
        .cfg_we    (cfg_we && (32'(cfg_tile) == tr*NC + tc)),
        .cfg_addr  (cfg_word),
        .cfg_wdata (cfg_wdata),
        .cfg_rdata (tile_rdata[tr*NC + tc]),
        .h_tracks  ({hw[tr][tc], he[tr][tc]}),
        .v_tracks  ({vs[tr][tc], vn[tr][tc]}),
        .rs_in     (rs_in[tr][tc]),
        .rs_out    (rs_out[tr][tc]),
        .loc_nw    (t_nw),
        .loc_n     (t_n),
        .loc_ne    (t_ne),
        .loc_e     (t_e),
        .out_w     (t_w),
        .out_s     (t_s),
        .out_sw    (t_sw),
        .out_se    (t_se)
      );
    end
  end

  // ------------------------------------------------ macro edge
  for (genvar r = 0; r < NR; r++) begin : g_edge_r
    assign west_out[r] = hw[r][0];
    assign east_out[r] = rs_out[r][NC-1][SIDE_E];
  end
  for (genvar c = 0; c < NC; c++) begin : g_edge_c
    assign north_out[c] = rs_out[0][c][SIDE_N];
    assign south_out[c] = vs[NR-1][c];
  end

  // ------------------------------------------------ local interconnect
  // LE (r,c) receives nw <- (r-1,c-1).se, n <- (r-1,c).s, ne <- (r-1,c+1).sw
  // and e <- (r,c+1).w. At the array border the missing neighbour is
  // replaced by loc_e_in (east column), loc_n_in (top row) or 0 (diagonals).
  for (genvar r = 0; r < ROWS; r++) begin : g_lrow
    for (genvar c = 0; c < COLS; c++) begin : g_lcol
      if (r == 0) begin : g_top
        assign le_n[r][c]  = loc_n_in[c];
        assign le_nw[r][c] = 1'b0;
        assign le_ne[r][c] = 1'b0;
      end else begin : g_inner
        assign le_n[r][c] = le_s[r-1][c];
        if (c == 0) begin : g_nw_edge
          assign le_nw[r][c] = 1'b0;
        end else begin : g_nw
          assign le_nw[r][c] = le_se[r-1][c-1];
        end
        if (c == COLS-1) begin : g_ne_edge
          assign le_ne[r][c] = 1'b0;
        end else begin : g_ne
          assign le_ne[r][c] = le_sw[r-1][c+1];
        end
      end
      if (c == COLS-1) begin : g_e_edge
        assign le_e[r][c] = loc_e_in[r];
      end else begin : g_e
        assign le_e[r][c] = le_w[r][c+1];
      end
    end
    assign loc_w_out[r]  = le_w[r][0];
    assign loc_se_out[r] = le_se[r][COLS-1];
  end

  for (genvar c = 0; c < COLS; c++) begin : g_lbot
    assign loc_s_out[c] = le_s[ROWS-1][c];
  end

endmodule
