// tb_efpga_gran2: one tile built with a configuration granularity of two
// instead of four, to exercise the parametrised configuration sharing.
//
// With two LEs per configuration word the tile has eight LE words, the
// connection boxes switch groups of two lines and the routing switch
// groups of two wires, so its fields take one connection-box word and two
// routing-switch words (11 words, 4-bit word address).
//   * LE row 0: the left two LEs compute x AND y, the right two x XOR y,
//     each driving the result onto vertical line 0; rows 1-3 pass it down.
//   * Top connection box: the two groups of line 0 take their operands with
//     the halves swapped; line 1 takes its operands in order.
//   * Routing switch: north = {west wires 7..4, cluster outputs 3..0}; east
//     group 0 = cluster outputs 1..0; south group 2 = west wires 5..4, a
//     field that straddles the two switch words.
// Also checks configuration read-back and that unused words read 0.
module tb_efpga_gran2;
  import efpga_pkg::*;

  localparam int NR = 1, NC = 1, ROWS = 4, COLS = 4, GRAN = 2;
  localparam int AW = tile_abits(4, 4, GRAN);

  logic               clk = 1'b0;
  logic               rst_n;
  logic               cfg_we;
  logic [AW:0]        cfg_addr;
  logic [CFG_W-1:0]   cfg_wdata;
  logic [CFG_W-1:0]   cfg_rdata;
  logic [TRK_DIR-1:0] west_in   [NR];
  logic [TRK_DIR-1:0] west_out  [NR];
  logic [TRK_DIR-1:0] east_in   [NR];
  logic [TRK_DIR-1:0] east_out  [NR];
  logic [TRK_DIR-1:0] north_in  [NC];
  logic [TRK_DIR-1:0] north_out [NC];
  logic [TRK_DIR-1:0] south_in  [NC];
  logic [TRK_DIR-1:0] south_out [NC];
  logic               loc_e_in   [ROWS];
  logic [1:0]         loc_n_in   [COLS];
  logic               loc_w_out  [ROWS];
  logic [1:0]         loc_s_out  [COLS];
  logic               loc_se_out [ROWS];

  int checks = 0;
  int failures = 0;
  int n_halves_differ = 0;
  int n_straddle = 0;

  efpga_top #(.NR(NR), .NC(NC), .CFG_GRAN(GRAN)) dut (.*);

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

  task automatic cfg_write(input int word, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_addr = (AW + 1)'(word);
    cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
    #1;
    check(cfg_rdata === data, $sformatf("read-back word %0d", word));
  endtask

  le_cfg_t w_and, w_xor;
  logic [3:0] x, y;
  logic [47:0] rs;

  initial begin
    rst_n = 1'b0;
    cfg_we = 1'b0;
    cfg_addr = '0;
    cfg_wdata = '0;
    west_in[0] = '0; east_in[0] = '0; north_in[0] = '0; south_in[0] = '0;
    for (int i = 0; i < ROWS; i++) loc_e_in[i] = 1'b0;
    for (int i = 0; i < COLS; i++) loc_n_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    check(AW == 4, "tile word address is 4 bits at granularity 2");

    w_and = '0;
    w_and.src_a = SRC_GV0; w_and.src_b = SRC_GV1; w_and.lut_a = LUT_AND;
    w_and.bdrv0 = BDRV_O0;
    w_xor = w_and;
    w_xor.lut_a = LUT_XOR;
    cfg_write(0, w_and);                 // LEs (0,0), (0,1)
    cfg_write(1, w_xor);                 // LEs (0,2), (0,3)
    // top CB groups: line0 cols 0-1 base 2, line0 cols 2-3 base 0,
    // line1 cols 0-1 base 4, line1 cols 2-3 base 6
    cfg_write(8, 32'h0000_6402);
    rs = '0;
    rs[3*(0*4 + 0) +: 3] = RS_FROM_CL;
    rs[3*(0*4 + 1) +: 3] = RS_FROM_CL;
    rs[3*(0*4 + 2) +: 3] = RS_FROM_W;
    rs[3*(0*4 + 3) +: 3] = RS_FROM_W;
    rs[3*(1*4 + 0) +: 3] = RS_FROM_CL;
    rs[3*(2*4 + 2) +: 3] = RS_FROM_W;   // bits 32..30: across the word boundary
    cfg_write(9, rs[31:0]);
    cfg_write(10, 32'(rs[47:32]));
    for (int w = 11; w < 16; w++) begin
      @(negedge clk);
      cfg_addr = (AW + 1)'(w);
      #1;
      check(cfg_rdata === '0, $sformatf("unused word %0d reads 0", w));
    end

    for (int it = 0; it < 256; it++) begin
      logic [3:0] res;
      logic [7:0] w_in;
      @(negedge clk);
      {x, y} = 8'(it);
      w_in = {y, x};
      west_in[0] = w_in;
      #1;
      res[0] = x[2] & y[0];
      res[1] = x[3] & y[1];
      res[2] = x[0] ^ y[2];
      res[3] = x[1] ^ y[3];
      check(north_out[0] === {w_in[7:4], res}, $sformatf("north %h", it));
      check(east_out[0] === {6'b0, res[1:0]}, $sformatf("east %h", it));
      check(south_out[0] === {2'b0, w_in[5:4], 4'b0}, $sformatf("south %h", it));
      check(west_out[0] === '0, "west off");
      if ((x[2] & y[0]) != (x[2] ^ y[0])) n_halves_differ++;
      if (w_in[5:4] != 2'b00) n_straddle++;
    end

    $display("vectors where the AND half and XOR half differ: %0d", n_halves_differ);
    $display("vectors routed through the straddling switch field: %0d", n_straddle);
    if (n_halves_differ == 0) failures++;
    if (n_straddle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
