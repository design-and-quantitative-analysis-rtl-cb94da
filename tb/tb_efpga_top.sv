// tb_efpga_top: end-to-end testbench of the eFPGA macro at its default size
// (2 x 2 tiles, 64 LEs, 16-track channels).
//
// The fabric is configured through its configuration port with three
// circuits that run side by side, and each is checked against arithmetic
// done here:
//   1. An 8-bit ripple-carry adder in LE row 0, spread over tiles (0,0)
//      (bits 7..4) and (0,1) (bits 3..0). Each LE is a full adder: operand
//      a on vertical broadcast line 0, operand b on line 1, carry from the
//      right neighbour, carry to the left neighbour, so the carry crosses
//      the tile border on the local interconnect. Operands for tile (0,0)
//      enter on the west edge; those for tile (0,1) enter on the north edge
//      and turn east in routing switch (0,0). Sums travel down broadcast
//      line 0 and leave northwards through each tile's routing switch.
//      Phase 2 registers the sums and checks the one-clock latency.
//   2. A LUT-3 in LE row 4 of tile (1,0): a random 3-input function of
//      lines 0, 1 and the row's horizontal broadcast line, which comes from
//      the south edge through the right connection box. Results leave west.
//   3. Diagonal shifts in tile (1,1): row 4 forwards line 0, row 5 takes the
//      upper-left diagonal (shift towards higher column) and the upper-right
//      diagonal (shift towards lower column); both leave east. The left
//      input of column 4 comes across the tile border from the LUT-3 row.
// Counters record how often each mechanism happened (carry across the tile
// border, registered-output latency, LUT-3 evaluation, routing-switch turn,
// diagonal transfers across a border); one that never happened is a
// failure.
module tb_efpga_top;
  import efpga_pkg::*;

  localparam int NR = 2, NC = 2, ROWS = 8, COLS = 8;

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
  int n_border_carry = 0, n_latency = 0, n_lut3 = 0, n_rs_turn = 0;
  int n_diag_border = 0, n_add = 0;

  efpga_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic cfg_write(input int tile, input int word, input logic [31:0] data);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_addr = 5'(tile * 8 + word);
    cfg_wdata = data;
    @(negedge clk);
    cfg_we = 1'b0;
    #1;
    check(cfg_rdata === data, $sformatf("read-back tile %0d word %0d", tile, word));
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

  le_cfg_t w_add, w_lut3, w_fwd, w_shift;
  logic [7:0] a, b, lut3_tab;
  logic       cin;
  logic [3:0] x, y, z;     // LUT-3 inputs per column (tile (1,0))
  logic [3:0] h;           // horizontal lines of rows 4..7

  // drive operands for one vector
  task automatic drive();
    for (int c = 0; c < 4; c++) begin
      // tile (0,0): column c holds bit 7-c; line 0 <- wire c, line 1 <- wire 4+c
      west_in[0][c]      = a[7 - c];
      west_in[0][4 + c]  = b[7 - c];
      // tile (0,1): column c holds bit 3-c, enters from the north
      north_in[0][c]     = a[3 - c];
      north_in[0][4 + c] = b[3 - c];
      // tile (1,0): LUT-3 inputs
      west_in[1][c]      = x[c];
      west_in[1][4 + c]  = y[c];
      south_in[0][c]     = h[c];
    end
    loc_e_in[0] = cin;
  endtask

  function automatic logic lut3_of(input int col);
    return lut3_tab[{h[0], y[col], x[col]}];
  endfunction

  task automatic check_lut3_and_shift();
    for (int c = 0; c < 4; c++) begin
      check(west_out[1][c] === lut3_of(c), $sformatf("LUT-3 column %0d", c));
      n_lut3++;
    end
    // row 5 of tile (1,1), global column 4+c
    for (int c = 0; c < 4; c++) begin
      logic left_in, right_in;
      // upper-left neighbour: global column 3+c of row 4
      left_in  = (c == 0) ? lut3_of(3) : x[c - 1];
      // upper-right neighbour: global column 5+c of row 4 (none past column 7)
      right_in = (c == 3) ? 1'b0 : x[c + 1];
      check(east_out[1][c] === left_in, $sformatf("shift from upper-left col %0d", c));
      check(east_out[1][4 + c] === right_in, $sformatf("shift from upper-right col %0d", c));
      if (c == 0) n_diag_border++;
    end
  endtask

  task automatic check_sum(input logic [8:0] exp, input string what);
    logic [7:0] s;
    for (int c = 0; c < 4; c++) begin
      s[7 - c] = north_out[0][c];
      s[3 - c] = north_out[1][c];
    end
    check(s === exp[7:0], $sformatf("%s: %h + %h + %b = %h, got %h", what, a, b, cin, exp[7:0], s));
  endtask

  initial begin
    rst_n = 1'b0;
    cfg_we = 1'b0;
    cfg_addr = '0;
    cfg_wdata = '0;
    for (int i = 0; i < NR; i++) begin west_in[i] = '0; east_in[i] = '0; end
    for (int i = 0; i < NC; i++) begin north_in[i] = '0; south_in[i] = '0; end
    for (int i = 0; i < ROWS; i++) loc_e_in[i] = 1'b0;
    for (int i = 0; i < COLS; i++) loc_n_in[i] = '0;
    a = '0; b = '0; cin = 1'b0; x = '0; y = '0; h = '0;
    lut3_tab = 8'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ------------------------------------------------ configuration
    w_add = '0;
    w_add.src_a = SRC_GV0; w_add.lut_a = LUT_PASSA;
    w_add.src_c = SRC_GV1; w_add.src_d = SRC_E; w_add.lut_b = LUT_XOR;
    w_add.d0_sum = 1'b1; w_add.d1_carry = 1'b1; w_add.w_o1 = 1'b1;
    w_add.bdrv0 = BDRV_O0;
    w_lut3 = '0;
    w_lut3.src_a = SRC_GH; w_lut3.src_c = SRC_GV0; w_lut3.src_d = SRC_GV1;
    w_lut3.lut3 = 1'b1; w_lut3.lut_a = lut3_tab[3:0]; w_lut3.lut_b = lut3_tab[7:4];
    w_lut3.bdrv0 = BDRV_O0;
    w_fwd = '0;
    w_fwd.src_a = SRC_GV0; w_fwd.lut_a = LUT_PASSA;
    w_shift = '0;
    w_shift.src_a = SRC_NW; w_shift.lut_a = LUT_PASSA;
    w_shift.src_c = SRC_NE; w_shift.lut_b = LUT_PASSA;
    w_shift.bdrv0 = BDRV_O0; w_shift.bdrv1 = BDRV_O1;

    // tile 0 = (0,0), 1 = (0,1), 2 = (1,0), 3 = (1,1)
    cfg_write(0, 0, w_add);
    cfg_write(0, 4, 32'h0000_0040);                       // line0 base 0, line1 base 4
    cfg_write(0, 5, rs_cfg(RS_FROM_CL, RS_FROM_N, RS_OFF, RS_OFF));
    cfg_write(1, 0, w_add);
    cfg_write(1, 4, 32'h0000_0040);
    cfg_write(1, 5, rs_cfg(RS_FROM_CL, RS_OFF, RS_OFF, RS_OFF));
    cfg_write(2, 0, w_lut3);
    cfg_write(2, 4, 32'h0000_0040);                       // right CB base 0
    cfg_write(2, 5, rs_cfg(RS_OFF, RS_FROM_W, RS_OFF, RS_FROM_CL));
    cfg_write(3, 0, w_fwd);
    cfg_write(3, 1, w_shift);
    cfg_write(3, 4, 32'h0000_0040);
    cfg_write(3, 5, rs_cfg(RS_OFF, RS_FROM_CL, RS_OFF, RS_OFF));

    // ------------------------------------------------ phase 1: combinational
    for (int it = 0; it < 600; it++) begin
      logic [8:0] exp;
      @(negedge clk);
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      x = 4'($urandom); y = 4'($urandom); h = 4'($urandom);
      if (it == 0) begin a = 8'h0F; b = 8'h01; cin = 1'b0; end  // carry across border
      drive();
      #1;
      exp = {1'b0, a} + {1'b0, b} + {8'h0, cin};
      check_sum(exp, "adder");
      check(loc_w_out[0] === exp[8], "carry out");
      n_add++;
      if ((({1'b0, a[3:0]} + {1'b0, b[3:0]} + {4'h0, cin}) >> 4) != 0) n_border_carry++;
      n_rs_turn++;
      check_lut3_and_shift();
    end

    // ------------------------------------------------ phase 2: registered sums
    w_add.reg0 = 1'b1;
    cfg_write(0, 0, w_add);
    cfg_write(1, 0, w_add);
    for (int it = 0; it < 300; it++) begin
      logic [8:0] exp_old, exp_new;
      logic [7:0] a_old, b_old;
      logic c_old;
      @(negedge clk);
      a_old = a; b_old = b; c_old = cin;
      exp_old = {1'b0, a} + {1'b0, b} + {8'h0, cin};
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      drive();
      #1;
      // still the previous sum before the clock edge (unless equal)
      check_sum(exp_old, "registered, before edge");
      exp_new = {1'b0, a} + {1'b0, b} + {8'h0, cin};
      check(loc_w_out[0] === exp_new[8], "carry out stays combinational");
      @(posedge clk);
      #1;
      check_sum(exp_new, "registered, after edge");
      if (exp_new[7:0] != exp_old[7:0]) n_latency++;
    end

    $display("additions %0d, carries across tile border %0d, registered-latency events %0d",
             n_add, n_border_carry, n_latency);
    $display("LUT-3 evaluations %0d, routing-switch turns %0d, diagonal border transfers %0d",
             n_lut3, n_rs_turn, n_diag_border);
    if (n_border_carry == 0) failures++;
    if (n_latency == 0) failures++;
    if (n_lut3 == 0) failures++;
    if (n_rs_turn == 0) failures++;
    if (n_diag_border == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
