// tb_efpga_1x3: the macro built with a different tile grid (1 row of 3
// tiles) to exercise the parametrised generation, running a 12-bit
// ripple-carry adder over all three tiles.
//
// Tile c holds bits 11-4c .. 8-4c in LE row 0; the carry crosses two tile
// borders. Operands for tile 0 enter on the west edge; those for tiles 1
// and 2 enter on the north edge above tiles 0 and 1 and turn east in their
// routing switches. Each tile's sums leave north through its own switch.
// Also checks configuration read-back of every tile and that an address
// beyond the last tile reads 0.
module tb_efpga_1x3;
  import efpga_pkg::*;

  localparam int NR = 1, NC = 3, ROWS = 4, COLS = 12;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               cfg_we;
  logic [4:0]         cfg_addr;
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
  int n_two_borders = 0;

  efpga_top #(.NR(NR), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input int tile, input int word, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_addr = 5'(tile * 8 + word);
    cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
    #1;
    checks++;
    if (cfg_rdata !== data) failures++;
  endtask

  function automatic logic [31:0] rs_cfg(input rs_sel_e n, input rs_sel_e e,
                                         input rs_sel_e s, input rs_sel_e w);
    logic [31:0] v = '0;
    v[0 +: 3] = n;  v[3 +: 3] = n;
    v[6 +: 3] = e;  v[9 +: 3] = e;
    v[12 +: 3] = s; v[15 +: 3] = s;
    v[18 +: 3] = w; v[21 +: 3] = w;
    return v;
  endfunction

  le_cfg_t w_add;
  logic [11:0] a, b;
  logic cin;

  initial begin
    rst_n = 1'b0;
    cfg_we = 1'b0;
    cfg_addr = '0;
    cfg_wdata = '0;
    west_in[0] = '0;
    east_in[0] = '0;
    for (int i = 0; i < NC; i++) begin north_in[i] = '0; south_in[i] = '0; end
    for (int i = 0; i < ROWS; i++) loc_e_in[i] = 1'b0;
    for (int i = 0; i < COLS; i++) loc_n_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    w_add = '0;
    w_add.src_a = SRC_GV0; w_add.lut_a = LUT_PASSA;
    w_add.src_c = SRC_GV1; w_add.src_d = SRC_E; w_add.lut_b = LUT_XOR;
    w_add.d0_sum = 1'b1; w_add.d1_carry = 1'b1; w_add.w_o1 = 1'b1;
    w_add.bdrv0 = BDRV_O0;
    for (int t = 0; t < NC; t++) begin
      cfg_write(t, 0, w_add);
      cfg_write(t, 4, 32'h0000_0040);
      cfg_write(t, 5, rs_cfg(RS_FROM_CL, (t < NC - 1) ? RS_FROM_N : RS_OFF, RS_OFF, RS_OFF));
    end
    // no tile 3: reads 0
    @(negedge clk);
    cfg_addr = 5'(3 * 8);
    #1;
    checks++;
    if (cfg_rdata !== '0) failures++;

    for (int it = 0; it < 500; it++) begin
      logic [12:0] exp;
      logic [11:0] s;
      @(negedge clk);
      a = 12'($urandom); b = 12'($urandom); cin = 1'($urandom);
      if (it == 0) begin a = 12'h0FF; b = 12'h001; cin = 1'b0; end
      for (int c = 0; c < 4; c++) begin
        west_in[0][c]      = a[11 - c];
        west_in[0][4 + c]  = b[11 - c];
        north_in[0][c]     = a[7 - c];
        north_in[0][4 + c] = b[7 - c];
        north_in[1][c]     = a[3 - c];
        north_in[1][4 + c] = b[3 - c];
      end
      loc_e_in[0] = cin;
      #1;
      exp = {1'b0, a} + {1'b0, b} + {12'h0, cin};
      for (int t = 0; t < NC; t++)
        for (int c = 0; c < 4; c++) s[11 - 4*t - c] = north_out[t][c];
      checks++;
      if (s !== exp[11:0] || loc_w_out[0] !== exp[12]) begin
        failures++;
        if (failures < 10) $display("%h + %h + %b: got %b%h exp %h", a, b, cin, loc_w_out[0], s, exp);
      end
      if ((({1'b0, a[7:0]} + {1'b0, b[7:0]} + {8'h0, cin}) >> 8) != 0 &&
          ((a[3:0] + b[3:0] + cin) >> 4) != 0) n_two_borders++;
    end
    $display("carries that crossed two tile borders: %0d", n_two_borders);
    if (n_two_borders == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
