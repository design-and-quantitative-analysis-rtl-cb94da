// efpga_pkg: types and constants shared by the arithmetic-oriented eFPGA.
//
// The fabric is a grid of tiles. Each tile holds a 4x4 cluster of
// arithmetic logic elements (LEs), a configuration SRAM, a connection box
// above the cluster (global tracks -> vertical broadcast lines), a
// connection box to its right (global tracks -> horizontal broadcast lines)
// and a routing switch at its top-right corner. The cluster size, the
// configuration granularity of four LEs per configuration word and the 16
// global tracks per channel are the published figures; the field layout of
// the configuration words below is this implementation's own.
package efpga_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned CFG_W        = 32; // configuration word width
  localparam int unsigned TRACKS       = 16; // wires per global channel
  localparam int unsigned TRK_DIR      = TRACKS / 2; // wires per direction
  localparam int unsigned BV           = 2;  // vertical broadcast lines per LE column
  localparam int unsigned BASE_W       = $clog2(TRACKS); // connection-box base field
  localparam int unsigned RS_SEL_W     = 3;  // routing-switch select field

  // Configuration words of one tile with an r x c cluster and a
  // configuration granularity of gran: one word per gran LEs, then the
  // connection-box fields (one base per group of gran lines), then the
  // routing-switch fields (one select per group of gran wires and side),
  // each packed into as few words as they fit. 6 words at 4 x 4 and gran 4.
  function automatic int unsigned tile_words(int unsigned r, int unsigned c,
                                             int unsigned gran);
    int unsigned cb_bits = BASE_W * ((c * BV) / gran + r / gran);
    int unsigned rs_bits = RS_SEL_W * 4 * (TRK_DIR / gran);
    return (r * c) / gran + (cb_bits + CFG_W - 1) / CFG_W
                          + (rs_bits + CFG_W - 1) / CFG_W;
  endfunction

  // Width of the word address inside a tile (3 at 4 x 4 and gran 4).
  function automatic int unsigned tile_abits(int unsigned r, int unsigned c,
                                             int unsigned gran);
    return $clog2(tile_words(r, c, gran));
  endfunction

  // --------------------------------------------- LE operand source select
  // Each of the four LE operands (A, B feed LUT-A; C, D feed LUT-B and the
  // carry logic) is picked from one of the eight signals reaching the LE.
  typedef enum logic [2:0] {
    SRC_GH  = 3'd0, // horizontal broadcast line of the LE's row
    SRC_GV0 = 3'd1, // vertical broadcast line 0 of the LE's column
    SRC_GV1 = 3'd2, // vertical broadcast line 1 of the LE's column
    SRC_NW  = 3'd3, // local: diagonal from the upper-left LE
    SRC_N0  = 3'd4, // local: output 0 of the LE above
    SRC_N1  = 3'd5, // local: output 1 of the LE above
    SRC_NE  = 3'd6, // local: diagonal from the upper-right LE
    SRC_E   = 3'd7  // local: from the LE to the right
  } le_src_e;

  // Broadcast drive: what an LE puts onto a vertical broadcast line below it.
  typedef enum logic [1:0] {
    BDRV_PASS  = 2'd0, // line passes through unchanged
    BDRV_O0    = 2'd1, // LE output 0 drives the line downwards
    BDRV_O1    = 2'd2, // LE output 1 drives the line downwards
    BDRV_PASS2 = 2'd3  // same as BDRV_PASS
  } le_bdrv_e;

  // One LE configuration word (32 bits). Shared by CFG_GRAN LEs of a row.
  typedef struct packed {
    le_bdrv_e    bdrv1;    // [31:30] drive of vertical broadcast line 1
    le_bdrv_e    bdrv0;    // [29:28] drive of vertical broadcast line 0
    logic        se_o1;    // [27]    south-east output carries o1 (else o0)
    logic        sw_o1;    // [26]    south-west output carries o1 (else o0)
    logic        w_o1;     // [25]    west output carries o1 (else o0)
    logic        reg1;     // [24]    output 1 taken from its register
    logic        reg0;     // [23]    output 0 taken from its register
    logic        d1_carry; // [22]    path 1 = carry logic (else LUT-B)
    logic        d0_sum;   // [21]    path 0 = sum logic (else LUT result t)
    logic        lut3;     // [20]    LUT-A and LUT-B form one LUT-3 on (A, D, C)
    logic [3:0]  lut_b;    // [19:16] truth table of LUT-B
    logic [3:0]  lut_a;    // [15:12] truth table of LUT-A
    le_src_e     src_d;    // [11:9]
    le_src_e     src_c;    // [8:6]
    le_src_e     src_b;    // [5:3]
    le_src_e     src_a;    // [2:0]
  } le_cfg_t;

  // Routing switch: source of one group of outgoing wires.
  typedef enum logic [2:0] {
    RS_OFF  = 3'd0, // drive 0
    RS_FROM_N = 3'd1,
    RS_FROM_E = 3'd2,
    RS_FROM_S = 3'd3,
    RS_FROM_W = 3'd4,
    RS_FROM_CL = 3'd5, // from the cluster's broadcast-line outputs
    RS_RSV6 = 3'd6,
    RS_RSV7 = 3'd7
  } rs_sel_e;

  // Side index used for routing-switch arrays.
  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  // Common LUT-2 truth tables, indexed by {second input, first input}.
  localparam logic [3:0] LUT_AND   = 4'b1000;
  localparam logic [3:0] LUT_XOR   = 4'b0110;
  localparam logic [3:0] LUT_OR    = 4'b1110;
  localparam logic [3:0] LUT_PASSA = 4'b1010;
  localparam logic [3:0] LUT_PASSB = 4'b1100;
  localparam logic [3:0] LUT_ZERO  = 4'b0000;

endpackage
