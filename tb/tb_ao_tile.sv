// tb_ao_tile: self-checking testbench of one tile (cluster, SRAM, CBs, RS).
//
// Every scenario is loaded through the configuration port and read back.
// The cluster is set up so that its outputs depend on the connection boxes:
//   row 0: o0 = (vertical line 0) AND (row-0 horizontal line), driven onto
//          vertical line 0 below the row;
//   row 2: o0 = (vertical line 1) XOR (row-2 horizontal line), driven onto
//          vertical line 1 below the row;
//   rows 1, 3: pass the lines through.
// With random CB bases and random channel values the expected cluster
// outputs (bottom ends of the lines) follow from the CB rule
// line k <- track (base + k) mod 16. The routing switch is configured to
// send the cluster outputs north, pass west->east and north->south and
// turn east->west, each checked against the arriving wires.
module tb_ao_tile;
  import efpga_pkg::*;

  localparam int R = 4;
  localparam int C = 4;
  localparam int AW = tile_abits(R, C, 4);

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  cfg_we;
  logic [AW-1:0]         cfg_addr;
  logic [CFG_W-1:0]      cfg_wdata;
  logic [CFG_W-1:0]      cfg_rdata;
  logic [TRACKS-1:0]     h_tracks;
  logic [TRACKS-1:0]     v_tracks;
  logic [TRK_DIR-1:0]    rs_in  [4];
  logic [TRK_DIR-1:0]    rs_out [4];
  logic                  loc_nw [R][C];
  logic [1:0]            loc_n  [R][C];
  logic                  loc_ne [R][C];
  logic                  loc_e  [R][C];
  logic                  out_w  [R][C];
  logic [1:0]            out_s  [R][C];
  logic                  out_sw [R][C];
  logic                  out_se [R][C];

  int checks = 0;
  int failures = 0;

  ao_tile #(.R(R), .C(C), .CFG_GRAN(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic cfg_write(input int addr, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_addr = AW'(addr);
    cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
    cfg_addr = AW'(addr);
    #1;
    check(cfg_rdata === data, $sformatf("read-back word %0d", addr));
  endtask

  le_cfg_t w_and, w_xor, w_pass;
  logic [3:0] b0, b1, br;
  logic [31:0] rs_word;

  initial begin
    rst_n = 1'b0;
    cfg_we = 1'b0;
    cfg_addr = '0;
    cfg_wdata = '0;
    h_tracks = '0;
    v_tracks = '0;
    for (int s = 0; s < 4; s++) rs_in[s] = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        loc_nw[r][c] = 1'b0; loc_n[r][c] = '0; loc_ne[r][c] = 1'b0; loc_e[r][c] = 1'b0;
      end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    w_and = '0;
    w_and.src_a = SRC_GV0; w_and.src_b = SRC_GH; w_and.lut_a = LUT_AND; w_and.bdrv0 = BDRV_O0;
    w_xor = '0;
    w_xor.src_a = SRC_GV1; w_xor.src_b = SRC_GH; w_xor.lut_a = LUT_XOR; w_xor.bdrv1 = BDRV_O0;
    w_pass = '0;
    cfg_write(0, w_and);
    cfg_write(1, w_pass);
    cfg_write(2, w_xor);
    cfg_write(3, w_pass);
    // RS: N <- cluster (both groups), E <- W, S <- N, W <- E
    rs_word = '0;
    rs_word[0 +: 3] = RS_FROM_CL;  rs_word[3 +: 3]  = RS_FROM_CL;
    rs_word[6 +: 3] = RS_FROM_W;   rs_word[9 +: 3]  = RS_FROM_W;
    rs_word[12 +: 3] = RS_FROM_N;  rs_word[15 +: 3] = RS_FROM_N;
    rs_word[18 +: 3] = RS_FROM_E;  rs_word[21 +: 3] = RS_FROM_E;
    cfg_write(5, rs_word);

    for (int it = 0; it < 40; it++) begin
      b0 = 4'($urandom); b1 = 4'($urandom); br = 4'($urandom);
      cfg_write(4, {20'h0, br, b1, b0});
      for (int j = 0; j < 20; j++) begin
        @(negedge clk);
        h_tracks = TRACKS'($urandom);
        v_tracks = TRACKS'($urandom);
        for (int s = 0; s < 4; s++) rs_in[s] = TRK_DIR'($urandom);
        #1;
        for (int c = 0; c < C; c++) begin
          logic a, b, h0, h2;
          a  = h_tracks[4'(b0 + 4'(c))];
          b  = h_tracks[4'(b1 + 4'(c))];
          h0 = v_tracks[4'(br + 4'd0)];
          h2 = v_tracks[4'(br + 4'd2)];
          check(rs_out[SIDE_N][c] === (a & h0), $sformatf("cluster out line0 col %0d", c));
          check(rs_out[SIDE_N][4 + c] === (b ^ h2), $sformatf("cluster out line1 col %0d", c));
          check(out_s[0][c][0] === (a & h0), "row 0 LE output");
        end
        check(rs_out[SIDE_E] === rs_in[SIDE_W], "RS W->E");
        check(rs_out[SIDE_S] === rs_in[SIDE_N], "RS N->S");
        check(rs_out[SIDE_W] === rs_in[SIDE_E], "RS E->W");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
