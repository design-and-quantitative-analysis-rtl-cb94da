// tb_ao_cluster: self-checking testbench of the 4 x 4 LE cluster.
//
// The testbench plays the role of the surrounding fabric: it drives the
// broadcast lines and every LE's local inputs with random values and loads
// four random LE configuration words (one per group of four LEs). A
// reference model, evaluated row by row so that a vertical broadcast line
// replaced by an LE is seen by the rows below, predicts every LE output and
// the bottom ends of the broadcast lines. The model keeps its own copy of
// the LE registers, so registered outputs are checked one clock late.
// A directed part then checks configuration sharing: a single changed word
// must change exactly the four LEs of its row.
module tb_ao_cluster;
  import efpga_pkg::*;

  localparam int R = 4;
  localparam int C = 4;
  localparam int GRAN = 4;
  localparam int NCFG = R * C / GRAN;

  logic          clk = 1'b0;
  logic          rst_n;
  le_cfg_t       cfg    [NCFG];
  logic          bh     [R];
  logic [BV-1:0] bv_top [C];
  logic [BV-1:0] bv_bot [C];
  logic          loc_nw [R][C];
  logic [1:0]    loc_n  [R][C];
  logic          loc_ne [R][C];
  logic          loc_e  [R][C];
  logic          out_w  [R][C];
  logic [1:0]    out_s  [R][C];
  logic          out_sw [R][C];
  logic          out_se [R][C];

  int checks = 0;
  int failures = 0;

  ao_cluster #(.R(R), .C(C), .CFG_GRAN(GRAN)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic q0m [R][C];
  logic q1m [R][C];
  logic d0m [R][C];
  logic d1m [R][C];
  logic o0m [R][C];
  logic o1m [R][C];
  logic [BV-1:0] bvm [R+1][C];

  task automatic run_model();
    for (int c = 0; c < C; c++) bvm[0][c] = bv_top[c];
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < C; c++) begin
        le_cfg_t k;
        logic [7:0] srcs;
        logic a, b, cc, d, fa, t, fb, s, cy;
        k = cfg[(r * C + c) / GRAN];
        srcs = {loc_e[r][c], loc_ne[r][c], loc_n[r][c][1], loc_n[r][c][0],
                loc_nw[r][c], bvm[r][c][1], bvm[r][c][0], bh[r]};
        a = srcs[k.src_a]; b = srcs[k.src_b]; cc = srcs[k.src_c]; d = srcs[k.src_d];
        fa = k.lut_a[2*b + a];
        fb = k.lut_b[2*d + cc];
        t  = k.lut3 ? (({k.lut_b, k.lut_a} >> (4*a + 2*d + cc)) & 1) : fa;
        s  = fa ^ fb;
        cy = (fa & fb) | (cc & d);
        d0m[r][c] = k.d0_sum ? s : t;
        d1m[r][c] = k.d1_carry ? cy : fb;
        o0m[r][c] = k.reg0 ? q0m[r][c] : d0m[r][c];
        o1m[r][c] = k.reg1 ? q1m[r][c] : d1m[r][c];
        bvm[r+1][c][0] = (k.bdrv0 == BDRV_O0) ? o0m[r][c] :
                         (k.bdrv0 == BDRV_O1) ? o1m[r][c] : bvm[r][c][0];
        bvm[r+1][c][1] = (k.bdrv1 == BDRV_O0) ? o0m[r][c] :
                         (k.bdrv1 == BDRV_O1) ? o1m[r][c] : bvm[r][c][1];
      end
    end
  endtask

  task automatic compare();
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < C; c++) begin
        le_cfg_t k;
        k = cfg[(r * C + c) / GRAN];
        checks++;
        if (out_s[r][c] !== {o1m[r][c], o0m[r][c]} ||
            out_w[r][c] !== (k.w_o1 ? o1m[r][c] : o0m[r][c]) ||
            out_sw[r][c] !== (k.sw_o1 ? o1m[r][c] : o0m[r][c]) ||
            out_se[r][c] !== (k.se_o1 ? o1m[r][c] : o0m[r][c])) begin
          failures++;
          if (failures < 10) $display("LE(%0d,%0d) s=%b exp o1o0=%b%b", r, c, out_s[r][c], o1m[r][c], o0m[r][c]);
        end
      end
    end
    for (int c = 0; c < C; c++) begin
      checks++;
      if (bv_bot[c] !== bvm[R][c]) begin
        failures++;
        if (failures < 10) $display("bv_bot[%0d]=%b exp %b", c, bv_bot[c], bvm[R][c]);
      end
    end
  endtask

  task automatic randomize_inputs();
    for (int r = 0; r < R; r++) begin
      bh[r] = 1'($urandom);
      for (int c = 0; c < C; c++) begin
        loc_nw[r][c] = 1'($urandom);
        loc_n[r][c]  = 2'($urandom);
        loc_ne[r][c] = 1'($urandom);
        loc_e[r][c]  = 1'($urandom);
      end
    end
    for (int c = 0; c < C; c++) bv_top[c] = BV'($urandom);
  endtask

  int shared_ok;

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < NCFG; i++) cfg[i] = '0;
    randomize_inputs();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        q0m[r][c] = 1'b0;
        q1m[r][c] = 1'b0;
      end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int it = 0; it < 1500; it++) begin
      @(negedge clk);
      if (it % 4 == 0)
        for (int i = 0; i < NCFG; i++) cfg[i] = le_cfg_t'($urandom);
      randomize_inputs();
      #1;
      run_model();
      compare();
      @(posedge clk);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          q0m[r][c] = d0m[r][c];
          q1m[r][c] = d1m[r][c];
        end
    end

    // directed: sharing. All rows output their horizontal broadcast line;
    // then row 2's word alone is changed to invert it.
    @(negedge clk);
    for (int i = 0; i < NCFG; i++) begin
      cfg[i] = '0;
      cfg[i].src_a = SRC_GH;
      cfg[i].lut_a = LUT_PASSA;
    end
    for (int r = 0; r < R; r++) bh[r] = 1'b1;
    #1;
    cfg[2].lut_a = ~LUT_PASSA;
    #1;
    shared_ok = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (out_s[r][c][0] !== (r == 2 ? 1'b0 : 1'b1)) failures++;
        else shared_ok++;
      end
    $display("configuration sharing: %0d of 16 LEs as expected", shared_ok);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
