// ao_cluster: a two-dimensional cluster of arithmetic LEs with shared
// configuration and broadcast lines.
//
// R x C LEs (4 x 4 by default) are arranged as a small processing array.
// Operands from the global interconnect reach the LEs as broadcast lines
// instead of through a per-LE connection box:
//   * one horizontal broadcast line per row, read by every LE of the row;
//   * BV (2) vertical broadcast lines per column, entering at the top. The
//     line passes each LE, which may read it and may replace it below
//     itself with one of its outputs; what leaves the bottom row is the
//     cluster's output towards the routing switch.
// Configuration is shared: CFG_GRAN consecutive LEs of a row (counted in
// row-major order) use the same configuration word, so a 4 x 4 cluster with a
// granularity of four needs four LE words. This matches the regular,
// word-oriented structure of arithmetic datapaths, where all bits of a
// word perform the same operation.
//
// The local nearest-neighbour inputs and outputs of every LE are ports, so
// the array-wide local interconnect in efpga_top can join neighbouring
// clusters seamlessly.
//
// Cluster size and granularity follow the published macro; the broadcast
// line counts follow the published LE and interconnect drawings. Timing:
// see ao_le; the only state is the two registers per LE.
//
// Lint tools may report a combinational loop on the broadcast-line array bv:
// the array is written by one row and read by the next, so the loop exists
// only at whole-array granularity; no bit depends on itself.
module ao_cluster
  import efpga_pkg::*;
#(
  parameter int unsigned R        = 4,
  parameter int unsigned C        = 4,
  parameter int unsigned CFG_GRAN = 4,
  localparam int unsigned NCFG    = (R * C) / CFG_GRAN
) (
  input  logic            clk,
  input  logic            rst_n,
  input  le_cfg_t         cfg    [NCFG],
  input  logic            bh     [R],     // horizontal broadcast lines
  input  logic [BV-1:0]   bv_top [C],     // vertical broadcast lines, top
  output logic [BV-1:0]   bv_bot [C],     // vertical broadcast lines, bottom
  // local interconnect of every LE
  input  logic            loc_nw [R][C],
  input  logic [1:0]      loc_n  [R][C],
  input  logic            loc_ne [R][C],
  input  logic            loc_e  [R][C],
  output logic            out_w  [R][C],
  output logic [1:0]      out_s  [R][C],
  output logic            out_sw [R][C],
  output logic            out_se [R][C]
);

  // vertical broadcast line segments: bv[r][c] enters row r
  logic [BV-1:0] bv [R+1][C];

  for (genvar c = 0; c < C; c++) begin : g_vtop
    assign bv[0][c]  = bv_top[c];
    assign bv_bot[c] = bv[R][c];
  end

  for (genvar r = 0; r < R; r++) begin : g_r
    for (genvar c = 0; c < C; c++) begin : g_c
      ao_le u_le (
        .clk     (clk),
        .rst_n   (rst_n),
        .cfg     (cfg[(r * C + c) / CFG_GRAN]),
        .g_h     (bh[r]),
        .g_v_in  (bv[r][c]),
        .g_v_out (bv[r+1][c]),
        .loc_nw  (loc_nw[r][c]),
        .loc_n   (loc_n[r][c]),
        .loc_ne  (loc_ne[r][c]),
        .loc_e   (loc_e[r][c]),
        .out_w   (out_w[r][c]),
        .out_s   (out_s[r][c]),
        .out_sw  (out_sw[r][c]),
        .out_se  (out_se[r][c])
      );
    end
  end

endmodule
