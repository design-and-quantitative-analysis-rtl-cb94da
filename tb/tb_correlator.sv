// tb_correlator: the accumulate stage of a code correlator (as in a
// spread-spectrum receiver) mapped onto the eFPGA macro at its default size.
//
// Every clock a sample sign bit s and a code chip c arrive; the circuit
// counts the chips where they agree, acc <= acc + (s XNOR c), in a 4-bit
// register (mod 16). The correlation over N chips is 2*acc - N.
// Mapping (global LE coordinates):
//   * LE (0,4), tile (0,1): LUT-A = XNOR of vertical lines 0 and 1 (s, c,
//     routed from the north edge through routing switch (0,0) eastwards);
//     the result leaves west, across the tile border, as the carry-in of
//     the accumulator.
//   * LEs (0,0..3), tile (0,0): a 4-bit incrementer. Each LE adds its
//     accumulator bit (vertical line 1) and the carry from the right; the
//     sum is registered and driven down line 0, the carry goes west.
//   * Feedback: the bottom ends of line 0 enter routing switch (0,0), leave
//     it westwards on the horizontal channel above tile (0,0), and the top
//     connection box puts them back on line 1 of the same columns. The
//     register in each LE breaks the loop.
//   * The accumulator is also sent north out of the macro for observation.
// The testbench compares acc with its own count after every chip.
module tb_correlator;
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
  int n_wraps = 0;

  efpga_top dut (.*);

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

  function automatic logic [3:0] acc_out();
    logic [3:0] v;
    for (int c = 0; c < 4; c++) v[3 - c] = north_out[0][c];
    return v;
  endfunction

  le_cfg_t w_inc, w_match;
  logic [3:0] acc_ref;

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

    // hold a mismatching chip while the fabric is configured, so the
    // accumulator stays at 0 until the first real chip
    north_in[0][0] = 1'b1;
    north_in[0][4] = 1'b0;

    // incrementer bit: t = acc (line 1), fB = 0 ^ carry-in, sum registered
    w_inc = '0;
    w_inc.src_a = SRC_GV1; w_inc.lut_a = LUT_PASSA;
    w_inc.src_c = SRC_GH;  w_inc.src_d = SRC_E; w_inc.lut_b = LUT_XOR;
    w_inc.d0_sum = 1'b1;   w_inc.d1_carry = 1'b1; w_inc.w_o1 = 1'b1;
    w_inc.reg0 = 1'b1;     w_inc.bdrv0 = BDRV_O0;
    // chip match: XNOR of the two vertical lines, sent west
    w_match = '0;
    w_match.src_a = SRC_GV0; w_match.src_b = SRC_GV1; w_match.lut_a = 4'b1001;

    cfg_write(0, 0, w_inc);
    cfg_write(0, 4, 32'h0000_0080);        // line 1 <- wires 8..11 (west-going)
    cfg_write(0, 5, rs_cfg(RS_FROM_CL, RS_FROM_N, RS_OFF, RS_FROM_CL));
    cfg_write(1, 4, 32'h0000_0040);        // line 0 <- wire 0, line 1 <- wire 4
    cfg_write(1, 0, w_match);

    acc_ref = '0;
    for (int n = 0; n < 400; n++) begin
      logic s, c;
      @(negedge clk);
      checks++;
      if (acc_out() !== acc_ref) begin
        failures++;
        if (failures < 10) $display("chip %0d: acc %0d expected %0d", n, acc_out(), acc_ref);
      end
      s = 1'($urandom);
      c = (n % 5 == 0) ? s : 1'($urandom);
      north_in[0][0] = s;
      north_in[0][4] = c;
      @(posedge clk);
      if (acc_ref == 4'hF && s == c) n_wraps++;
      acc_ref = acc_ref + 4'(s == c);
    end
    @(negedge clk);
    checks++;
    if (acc_out() !== acc_ref) failures++;
    $display("accumulator wrapped %0d times", n_wraps);
    if (n_wraps == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
