// ao_tile: one tile of the arithmetic-oriented eFPGA.
//
// A tile is the repeated unit of the macro: an R x C LE cluster, its
// configuration SRAM, a connection box above the cluster, a connection box
// to its right and a routing switch at the top-right corner.
//   * The top connection box reads the 16 wires of the horizontal channel
//     above the cluster (h_tracks) and drives the C*BV vertical broadcast
//     lines; line k of column c is CB line k*C + c.
//   * The right connection box reads the 16 wires of the vertical channel
//     right of the cluster (v_tracks) and drives the R horizontal broadcast
//     lines.
//   * The bottom ends of the vertical broadcast lines (C*BV = 8 signals,
//     same numbering) are the cluster's outputs into the routing switch.
//
// Configuration words (32 bits, address cfg_addr inside the tile):
//   0 .. NLE-1  LE words (efpga_pkg::le_cfg_t), word i for LEs
//               i*CFG_GRAN .. i*CFG_GRAN+CFG_GRAN-1 in row-major order
//   NLE ..      connection boxes, NCB_W words read as one bit vector:
//               [4*g +: 4] base of top-CB group g (g = 0 .. C*BV/CFG_GRAN-1),
//               then one 4-bit base per right-CB group
//   then        routing switch, NRS_W words read as one bit vector:
//               [3*(side*NGRP+g) +: 3] select of group g of the wires
//               leaving on side (N, E, S, W)
// With the defaults (4 x 4, granularity 4) this is words 0-3 for the LEs,
// word 4 for the connection boxes and word 5 for the routing switch; a finer
// granularity needs more words and a wider cfg_addr (efpga_pkg::tile_words).
// The tile arrangement follows the published floor plan; the word map is
// this implementation's own.
//
// Timing: configuration writes on rising clk; the fabric itself is
// combinational apart from the LE registers.
module ao_tile
  import efpga_pkg::*;
#(
  parameter int unsigned R        = 4,
  parameter int unsigned C        = 4,
  parameter int unsigned CFG_GRAN = 4,
  localparam int unsigned NLE     = (R * C) / CFG_GRAN,
  localparam int unsigned NVL     = C * BV,
  localparam int unsigned NG_TOP  = NVL / CFG_GRAN,
  localparam int unsigned NG_RGT  = R / CFG_GRAN,
  localparam int unsigned NG_RS   = TRK_DIR / CFG_GRAN,
  localparam int unsigned SW      = BASE_W,
  localparam int unsigned NCB_W   = (SW * (NG_TOP + NG_RGT) + CFG_W - 1) / CFG_W,
  localparam int unsigned NRS_W   = (RS_SEL_W * 4 * NG_RS + CFG_W - 1) / CFG_W,
  localparam int unsigned WORDS   = NLE + NCB_W + NRS_W,
  localparam int unsigned AW      = $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration port
  input  logic                  cfg_we,
  input  logic [AW-1:0]         cfg_addr,
  input  logic [CFG_W-1:0]      cfg_wdata,
  output logic [CFG_W-1:0]      cfg_rdata,
  // global channels
  input  logic [TRACKS-1:0]     h_tracks,        // channel above the cluster
  input  logic [TRACKS-1:0]     v_tracks,        // channel right of the cluster
  input  logic [TRK_DIR-1:0]    rs_in  [4],      // wires arriving at the RS
  output logic [TRK_DIR-1:0]    rs_out [4],      // wires leaving the RS
  // local interconnect of every LE
  input  logic                  loc_nw [R][C],
  input  logic [1:0]            loc_n  [R][C],
  input  logic                  loc_ne [R][C],
  input  logic                  loc_e  [R][C],
  output logic                  out_w  [R][C],
  output logic [1:0]            out_s  [R][C],
  output logic                  out_sw [R][C],
  output logic                  out_se [R][C]
);

  logic [CFG_W-1:0] words [WORDS];
  logic [CFG_W-1:0] rdata_w;

  cfg_sram #(.WORDS(WORDS), .W(CFG_W)) u_sram (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cfg_we),
    .addr  (cfg_addr),
    .wdata (cfg_wdata),
    .rdata (rdata_w),
    .cfg_q (words)
  );
  assign cfg_rdata = (32'(cfg_addr) < WORDS) ? rdata_w : '0;

  // ------------------------------------------------ configuration fields
  le_cfg_t       le_cfg   [NLE];
  logic [SW-1:0] top_base [NG_TOP];
  logic [SW-1:0] rgt_base [NG_RGT];
  rs_sel_e       rs_sel   [4][NG_RS];

  for (genvar i = 0; i < NLE; i++) begin : g_lecfg
    assign le_cfg[i] = le_cfg_t'(words[i]);
  end
  // connection-box and routing-switch fields as bit vectors over their words
  localparam int unsigned CB_BITS = SW * (NG_TOP + NG_RGT);
  localparam int unsigned RS_BITS = RS_SEL_W * 4 * NG_RS;
  logic [CB_BITS-1:0] cb_bits;
  logic [RS_BITS-1:0] rs_bits;
  for (genvar i = 0; i < CB_BITS; i++) begin : g_cbb
    assign cb_bits[i] = words[NLE + i / CFG_W][i % CFG_W];
  end
  for (genvar i = 0; i < RS_BITS; i++) begin : g_rsb
    assign rs_bits[i] = words[NLE + NCB_W + i / CFG_W][i % CFG_W];
  end
  for (genvar g = 0; g < NG_TOP; g++) begin : g_topcfg
    assign top_base[g] = cb_bits[SW*g +: SW];
  end
  for (genvar g = 0; g < NG_RGT; g++) begin : g_rgtcfg
    assign rgt_base[g] = cb_bits[SW*(NG_TOP+g) +: SW];
  end
  for (genvar s = 0; s < 4; s++) begin : g_rss
    for (genvar g = 0; g < NG_RS; g++) begin : g_rsg
      assign rs_sel[s][g] = rs_sel_e'(rs_bits[RS_SEL_W*(s*NG_RS+g) +: RS_SEL_W]);
    end
  end

  // ------------------------------------------------ connection boxes
  logic [NVL-1:0] vlines;
  logic [R-1:0]   hlines;

  ao_cb #(.TRACKS(TRACKS), .LINES(NVL), .CFG_GRAN(CFG_GRAN)) u_cb_top (
    .tracks (h_tracks),
    .base   (top_base),
    .lines  (vlines)
  );

  ao_cb #(.TRACKS(TRACKS), .LINES(R), .CFG_GRAN(CFG_GRAN)) u_cb_right (
    .tracks (v_tracks),
    .base   (rgt_base),
    .lines  (hlines)
  );

  // ------------------------------------------------ cluster
  logic          bh     [R];
  logic [BV-1:0] bv_top [C];
  logic [BV-1:0] bv_bot [C];
  logic [NVL-1:0] cl_out;

  for (genvar r = 0; r < R; r++) begin : g_bh
    assign bh[r] = hlines[r];
  end
  for (genvar c = 0; c < C; c++) begin : g_bv
    for (genvar k = 0; k < BV; k++) begin : g_k
      assign bv_top[c][k]  = vlines[k*C + c];
      assign cl_out[k*C + c] = bv_bot[c][k];
    end
  end

  ao_cluster #(.R(R), .C(C), .CFG_GRAN(CFG_GRAN)) u_cluster (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg    (le_cfg),
    .bh     (bh),
    .bv_top (bv_top),
    .bv_bot (bv_bot),
    .loc_nw (loc_nw),
    .loc_n  (loc_n),
    .loc_ne (loc_ne),
    .loc_e  (loc_e),
    .out_w  (out_w),
    .out_s  (out_s),
    .out_sw (out_sw),
    .out_se (out_se)
  );

  // ------------------------------------------------ routing switch
  logic [TRK_DIR-1:0] rs_cl;
  assign rs_cl = TRK_DIR'(cl_out);

  ao_rs #(.WIRES(TRK_DIR), .CFG_GRAN(CFG_GRAN)) u_rs (
    .in_wires  (rs_in),
    .out_wires (rs_out),
    .cl_out    (rs_cl),
    .sel       (rs_sel)
  );

endmodule
