// tb_array_multiplier: a 4 x 4 unsigned array multiplier mapped onto the
// eFPGA macro at its default size, checked for all 256 operand pairs.
//
// Mapping (global LE coordinates, row 0 at the top):
//   * Rows 0..3, columns 4..7 (tile (0,1)) form a carry-save array. LE
//     (j, 4+k) forms the partial product a[3-k] & b[j] in LUT-A from its
//     vertical broadcast line 0 (a bit, shared by the column) and its
//     horizontal broadcast line (b bit, shared by the row), and adds the sum
//     from its upper-left neighbour and the carry from the LE above. Sums go
//     down-right (south-east output), carries straight down. All 16 LEs use
//     the same configuration, so the four shared words hold one value.
//   * Product bits p0..p3 leave the east edge of rows 0..3.
//   * Row 4, columns 4..7 (tile (1,1)) is a ripple-carry adder that merges
//     the last sums and carries; its outputs p7..p4 travel down broadcast
//     line 0 and leave east through routing switch (1,1).
//   * Operand a enters on the west edge and passes routing switch (0,0)
//     eastwards; operand b enters on the south edge and passes routing
//     switch (1,1) northwards into the right connection box of tile (0,1).
// Phase 1 runs every LE transparently and checks all products.
// Phase 2 registers both outputs of every array LE and the sum of the
// final row (a pipeline stage per row) and checks that, with operands held,
// the product is complete exactly five clocks after the operands change.
module tb_array_multiplier;
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
  int n_products = 0, n_pipe_early = 0;

  efpga_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  task automatic drive(input logic [3:0] a, input logic [3:0] b);
    for (int k = 0; k < 4; k++) west_in[0][k] = a[3 - k];
    for (int j = 0; j < 4; j++) south_in[1][j] = b[j];
  endtask

  function automatic logic [7:0] product();
    logic [7:0] p;
    for (int r = 0; r < 4; r++) p[r] = loc_se_out[r];
    for (int k = 0; k < 4; k++) p[7 - k] = east_out[1][k];
    return p;
  endfunction

  le_cfg_t w_csa, w_rca;

  task automatic configure(input logic pipelined);
    w_csa = '0;
    w_csa.src_a = SRC_GV0; w_csa.src_b = SRC_GH; w_csa.lut_a = LUT_AND;
    w_csa.src_c = SRC_NW;  w_csa.src_d = SRC_N1; w_csa.lut_b = LUT_XOR;
    w_csa.d0_sum = 1'b1;   w_csa.d1_carry = 1'b1;
    w_csa.reg0 = pipelined; w_csa.reg1 = pipelined;
    w_rca = '0;
    w_rca.src_a = SRC_NW;  w_rca.lut_a = LUT_PASSA;
    w_rca.src_c = SRC_N1;  w_rca.src_d = SRC_E; w_rca.lut_b = LUT_XOR;
    w_rca.d0_sum = 1'b1;   w_rca.d1_carry = 1'b1; w_rca.w_o1 = 1'b1;
    w_rca.bdrv0 = BDRV_O0; w_rca.reg0 = pipelined;
    for (int w = 0; w < 4; w++) cfg_write(1, w, w_csa);      // tile (0,1)
    cfg_write(1, 4, 32'h0000_0000);                           // all CB bases 0
    cfg_write(0, 5, rs_cfg(RS_OFF, RS_FROM_W, RS_OFF, RS_OFF));
    cfg_write(3, 0, w_rca);                                   // tile (1,1) row 4
    cfg_write(3, 4, 32'h0000_0000);
    cfg_write(3, 5, rs_cfg(RS_FROM_S, RS_FROM_CL, RS_OFF, RS_OFF));
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
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ------------------------------------------------ phase 1: combinational
    configure(1'b0);
    for (int v = 0; v < 256; v++) begin
      logic [3:0] a, b;
      @(negedge clk);
      a = 4'(v);
      b = 4'(v >> 4);
      drive(a, b);
      #1;
      checks++;
      n_products++;
      if (product() !== 8'(a * b)) begin
        failures++;
        if (failures < 10) $display("%0d * %0d: got %0d", a, b, product());
      end
    end

    // ------------------------------------------------ phase 2: pipelined
    configure(1'b1);
    for (int it = 0; it < 60; it++) begin
      logic [3:0] a, b;
      @(negedge clk);
      a = 4'($urandom);
      b = 4'($urandom);
      drive(a, b);
      for (int e = 1; e <= 5; e++) begin
        @(posedge clk);
        #1;
        if (e == 4 && product() !== 8'(a * b)) n_pipe_early++;
      end
      checks++;
      n_products++;
      if (product() !== 8'(a * b)) begin
        failures++;
        if (failures < 10) $display("pipelined %0d * %0d: got %0d", a, b, product());
      end
      // settle the pipeline with an all-zero product before the next pair
      @(negedge clk);
      drive(4'd0, 4'd0);
      repeat (6) @(posedge clk);
    end
    $display("products checked %0d; pipelined results not yet complete after four clocks: %0d",
             n_products, n_pipe_early);
    if (n_pipe_early == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
